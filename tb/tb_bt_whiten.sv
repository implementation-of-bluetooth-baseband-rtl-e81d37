// tb_bt_whiten: checks the whitening sequence against the reference
// (coefficient of D^6 in {1,init}*D^n mod D7+D4+1) for 120 bits from several
// initial values, that the sequence repeats after 127 bits, and that a second
// whitener loaded alike restores the data (descrambling).
module tb_bt_whiten;
  import tb_bt_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, en = 0, din = 0;
  logic [5:0] init = 0;
  logic dout, dout2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_whiten dut (.*);
  bt_whiten dut2 (.clk, .rst_n, .load, .init, .en, .din(dout), .dout(dout2));

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    bit w[$];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      init = (t == 0) ? 6'h00 : 6'($urandom);
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      w.delete();
      for (int n = 0; n < 260; n++) begin
        en = 1; din = 1'($urandom);
        #1;
        w.push_back(dout ^ din);
        chk(dout2 == din, "descrambled bit equals original");
        if (n < 120) chk((dout ^ din) == wht_ref(init, n), $sformatf("whitening bit %0d init %h", n, init));
        @(negedge clk);
      end
      en = 0;
      for (int n = 0; n < 127; n++) chk(w[n] == w[n + 127], "period 127");
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
