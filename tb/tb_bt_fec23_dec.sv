// tb_bt_fec23_dec: sends 60 reference-encoded (15,10) blocks back to back,
// with no error, one error at a random position or two errors, and checks
// that data comes out intact for zero or one error, that corrected and
// uncorrectable flag the right blocks, and that the ten output bits of a
// block follow one per enable after it, first received first.
module tb_bt_fec23_dec;
  import tb_bt_ref_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, in_valid = 0, din = 0;
  logic dout, dvalid, corrected, uncorrectable;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_fec23_dec dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [9:0] exp_q[$];
  int         kind_q[$];
  bit         got[$];
  int ncorr = 0, nunc = 0, nfix_exp = 0, nunc_exp = 0;

  always @(posedge clk) begin
    if (dvalid) got.push_back(dout);
    if (corrected) ncorr++;
    if (uncorrectable) nunc++;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int b = 0; b < 60; b++) begin
      logic [9:0] d;
      logic [4:0] p;
      logic [14:0] cw;   // cw[14] sent first
      automatic int kind = b % 3;
      d = 10'($urandom);
      p = h23_ref(d);
      for (int i = 0; i < 10; i++) cw[14 - i] = d[i];
      cw[4:0] = p;
      if (kind >= 1) begin
        automatic int e1 = $urandom_range(14, 0);
        cw[e1] ^= 1'b1;
        if (kind == 2) cw[(e1 + 1 + $urandom_range(13, 0)) % 15] ^= 1'b1;
      end
      if (kind == 1) nfix_exp++;
      if (kind == 2) nunc_exp++;
      exp_q.push_back(d);
      kind_q.push_back(kind);
      for (int t = 0; t < 15; t++) begin
        en = 1; in_valid = 1; din = cw[14 - t];
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (12) @(negedge clk);   // drain
    en = 0;
    repeat (3) @(negedge clk);
    chk(got.size() == 600, $sformatf("600 output bits, got %0d", got.size()));
    for (int b = 0; b < 60; b++) begin
      logic [9:0] d;
      for (int i = 0; i < 10; i++) d[i] = got[10 * b + i];
      if (kind_q[b] < 2) chk(d == exp_q[b], $sformatf("block %0d data", b));
    end
    chk(ncorr == nfix_exp, $sformatf("corrected blocks %0d of %0d", ncorr, nfix_exp));
    chk(nunc == nunc_exp, $sformatf("uncorrectable blocks %0d of %0d", nunc, nunc_exp));
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
