// tb_bt_correlator: hides the pattern in random bit streams and checks that an
// exact correlator fires on exactly the bit that completes it and never
// elsewhere, that it ignores a copy with one wrong bit, that a correlator
// allowing 2 errors accepts such a copy, and that nothing fires before 64
// bits have arrived after clr.
module tb_bt_correlator;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, din = 0;
  logic [63:0] pattern = 0;
  logic found0, found2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_correlator #(.MAX_ERR(0)) dut (.clk, .rst_n, .clr, .en, .din, .pattern, .found(found0));
  bt_correlator #(.MAX_ERR(2)) dut2 (.clk, .rst_n, .clr, .en, .din, .pattern, .found(found2));

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      bit s[$];
      int at, bad;
      pattern = {$urandom, $urandom};
      at  = 64 + $urandom_range(100, 0);     // index of last pattern bit
      bad = (t % 2 == 1) ? $urandom_range(63, 0) : -1;
      for (int i = 0; i < 300; i++) s.push_back(1'($urandom));
      for (int i = 0; i < 64; i++) s[at - 63 + i] = pattern[63 - i] ^ (i == bad);
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      for (int i = 0; i < 300; i++) begin
        en = 1; din = s[i];
        #1;
        if (i == at) begin
          chk(found0 == (bad < 0), $sformatf("exact correlator at the pattern (bad=%0d)", bad));
          chk(found2, "tolerant correlator at the pattern");
        end else begin
          chk(!found0, $sformatf("no false match at %0d", i));
        end
        @(negedge clk);
        en = 0;
      end
    end
    // a window filled with fewer than 64 bits never matches
    pattern = 64'h0;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < 64; i++) begin
      en = 1; din = 0; #1;
      chk(found0 == (i == 63), "match only once 64 bits are in");
      @(negedge clk);
    end
    en = 0;
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
