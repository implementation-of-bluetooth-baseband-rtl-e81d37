// tb_bt_hec: checks the HEC core against long division by
// D8+D7+D5+D2+D+1: the generated HEC for random headers and initial values,
// a zero remainder for every intact 18-bit header, and a nonzero one after
// any single bit error. One bit per clock.
module tb_bt_hec;
  import tb_bt_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, en = 0, gen_out = 0, din = 0;
  logic [7:0] init = 0, rem;
  logic dout, zero;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_hec dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic run(input logic [7:0] iv, input logic [17:0] bits, input int nin,
                     input bit gen, output logic [7:0] hec);
    @(negedge clk); load = 1; init = iv;
    @(negedge clk); load = 0;
    for (int i = 0; i < nin; i++) begin
      en = 1; gen_out = 0; din = bits[i];
      @(negedge clk);
    end
    if (gen) for (int i = 7; i >= 0; i--) begin
      en = 1; gen_out = 1; din = 1'($urandom);
      #1 hec[i] = dout;
      @(negedge clk);
    end
    en = 0; gen_out = 0;
  endtask

  initial begin
    logic [7:0] h, r, dummy;
    logic [9:0] info;
    logic [17:0] cw;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      info = 10'($urandom); r = 8'($urandom);
      if (t == 0) begin info = 0; r = 0; end
      run(r, 18'(info), 10, 1, h);
      chk(h == hec_ref(r, info), $sformatf("HEC %h for %h/%h, expected %h", h, info, r, hec_ref(r, info)));
      chk(zero, "register empty after shifting the HEC out");
      cw = {h[0], h[1], h[2], h[3], h[4], h[5], h[6], h[7], info};
      run(r, cw, 18, 0, dummy);
      chk(zero, "intact header gives zero remainder");
      cw[$urandom_range(17, 0)] ^= 1'b1;
      run(r, cw, 18, 0, dummy);
      chk(!zero, "corrupted header detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
