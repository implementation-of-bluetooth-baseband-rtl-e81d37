// tb_bt_fec23_enc: encodes 40 random 10-bit blocks and checks the 15-bit
// output against the reference (10 data bits, then the 5-bit remainder of
// division by D5+D4+D2+1), that take is high for exactly the 10 data periods
// of each block, and that the code words divide evenly by the generator.
module tb_bt_fec23_enc;
  import tb_bt_ref_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, din = 0;
  logic dout, take;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_fec23_enc dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int b = 0; b < 40; b++) begin
      logic [9:0] d;
      logic [4:0] p;
      logic [14:0] cw;
      logic [127:0] a;
      automatic int k = 0;
      d = 10'($urandom);
      p = h23_ref(d);
      for (int t = 0; t < 15; t++) begin
        en = 1; din = (k < 10) ? d[k] : 1'($urandom);
        #1;
        chk(take == (t < 10), $sformatf("take in period %0d", t));
        cw[14 - t] = dout;
        chk(dout == ((t < 10) ? d[t] : p[14 - t]), $sformatf("block %0d bit %0d", b, t));
        if (take) k++;
        @(negedge clk);
        en = 0;
        if (t % 4 == 0) @(negedge clk);   // uneven enable spacing
      end
      a = 128'(cw);
      chk(poly_mod(a, 17'h035, 5) == 0, "code word divisible by g(D)");
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
