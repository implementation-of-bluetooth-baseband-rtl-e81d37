// tb_bt_s2p: shifts random messages in least significant bit first, checks
// the assembled word, then commits and checks that exactly four bytes are
// pushed, least significant first, on consecutive cycles with busy high.
module tb_bt_s2p;
  logic clk = 0, rst_n = 0, shift = 0, din = 0, commit = 0;
  logic [31:0] word;
  logic fifo_push, busy;
  logic [7:0] fifo_wdata;
  logic [7:0] got[$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_s2p dut (.*);
  always @(posedge clk) if (fifo_push) got.push_back(fifo_wdata);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      logic [31:0] m;
      m = $urandom;
      for (int i = 0; i < 32; i++) begin
        shift = 1; din = m[i]; @(negedge clk);
        shift = 0; @(negedge clk);
      end
      chk(word == m, $sformatf("word %h expected %h", word, m));
      got.delete();
      commit = 1; @(negedge clk); commit = 0;
      for (int b = 0; b < 4; b++) begin
        chk(busy && fifo_push, "push cycle");
        @(negedge clk);
      end
      chk(!busy && !fifo_push, "done after four bytes");
      chk(got.size() == 4, "four bytes");
      for (int b = 0; b < 4 && b < got.size(); b++) chk(got[b] == m[8*b +: 8], $sformatf("byte %0d", b));
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
