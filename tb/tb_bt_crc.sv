// tb_bt_crc: checks the CRC core against long division by
// D16+D12+D5+1: the CRC of random 32-bit messages (LSB first) and initial values,
// a zero remainder for every intact 48-bit payload, and a nonzero one after
// any single bit error. One bit per clock.
module tb_bt_crc;
  import tb_bt_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, en = 0, gen_out = 0, din = 0;
  logic [15:0] init = 0, rem;
  logic dout, zero;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_crc dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic run(input logic [15:0] iv, input logic [47:0] bits, input int nin,
                     input bit gen, output logic [15:0] hec);
    @(negedge clk); load = 1; init = iv;
    @(negedge clk); load = 0;
    for (int i = 0; i < nin; i++) begin
      en = 1; gen_out = 0; din = bits[i];
      @(negedge clk);
    end
    if (gen) for (int i = 15; i >= 0; i--) begin
      en = 1; gen_out = 1; din = 1'($urandom);
      #1 hec[i] = dout;
      @(negedge clk);
    end
    en = 0; gen_out = 0;
  endtask

  initial begin
    logic [15:0] h, r, dummy;
    logic [31:0] info;
    logic [47:0] cw;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      info = $urandom; r = 16'($urandom);
      if (t == 0) begin info = 0; r = 0; end
      run(r, 48'(info), 32, 1, h);
      chk(h == crc_ref(r, info), $sformatf("CRC %h for %h/%h, expected %h", h, info, r, crc_ref(r, info)));
      chk(zero, "register empty after shifting the CRC out");
      for (int i = 0; i < 16; i++) cw[32 + i] = h[15 - i];
      cw[31:0] = info;
      run(r, cw, 48, 0, dummy);
      chk(zero, "intact payload gives zero remainder");
      cw[$urandom_range(47, 0)] ^= 1'b1;
      run(r, cw, 48, 0, dummy);
      chk(!zero, "corrupted payload detected");
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
