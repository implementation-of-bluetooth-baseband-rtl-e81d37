// tb_bt_fec13_enc: feeds random bits through the rate 1/3 encoder with a
// bit enable every second cycle and checks that each bit appears three times
// in a row, that take fires once per three bit periods, and that clr restarts
// the grouping.
module tb_bt_fec13_enc;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, din = 0;
  logic dout, take;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_fec13_enc dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    bit src[$], out[$];
    int takes = 0, k = 0;
    for (int i = 0; i < 200; i++) src.push_back(1'($urandom));
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int p = 0; p < 600; p++) begin
      en = 1; din = src[k];
      #1;
      chk(take == (p % 3 == 0), $sformatf("take at period %0d", p));
      out.push_back(dout);
      if (take) takes++;
      if (take) k++;
      @(negedge clk);
      // garbage on din while the stored copy is repeated
      en = 0; din = 1'($urandom);
      @(negedge clk);
    end
    chk(takes == 200, "200 bits taken");
    for (int i = 0; i < 600; i++) chk(out[i] == src[i / 3], $sformatf("output bit %0d", i));
    // clr in the middle of a group
    en = 1; @(negedge clk); en = 0;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    en = 1; #1 chk(take, "take after clr"); @(negedge clk); en = 0;
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
