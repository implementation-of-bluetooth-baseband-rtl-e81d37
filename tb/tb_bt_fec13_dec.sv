// tb_bt_fec13_dec: sends 300 repetition-coded bits, a random one of the
// three copies corrupted in about half of them, and checks that every bit is
// restored, that corrected flags exactly the corrupted groups and that dvalid
// comes one cycle after the third copy.
module tb_bt_fec13_dec;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, din = 0;
  logic dout, dvalid, corrected;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_fec13_dec dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    int nerr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < 300; i++) begin
      automatic bit b = 1'($urandom);
      automatic bit e = 1'($urandom);
      automatic int k = $urandom_range(2, 0);
      if (e) nerr++;
      for (int c = 0; c < 3; c++) begin
        en = 1; din = b ^ (e && c == k);
        @(negedge clk);
        en = 0;
        if (c < 2) chk(!dvalid, "no output before the third copy");
      end
      chk(dvalid && dout == b, $sformatf("bit %0d decoded", i));
      chk(corrected == e, $sformatf("bit %0d corrected flag", i));
      @(negedge clk);
      chk(!dvalid, "dvalid is a single pulse");
    end
    chk(nerr > 100, "errors were injected");
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
