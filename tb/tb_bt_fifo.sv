// tb_bt_fifo: random pushes and pops on a 16-byte buffer compared with a
// queue model: data order, count, empty and full, and that a push into a full
// buffer and a pop from an empty one change nothing.
module tb_bt_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [7:0] wdata = 0, rdata;
  logic empty, full;
  logic [4:0] count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_fifo #(.WIDTH(8), .DEPTH(16)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    logic [7:0] q[$];
    int nfull = 0, nempty = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      // phases biased towards filling, then towards emptying
      int bias = ((i / 200) % 2 == 0) ? 70 : 30;
      push  = ($urandom_range(99, 0) < bias);
      pop   = ($urandom_range(99, 0) < 100 - bias);
      wdata = 8'($urandom);
      #1;
      chk(count == 5'(q.size()), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == 16), "full");
      if (q.size() != 0) chk(rdata == q[0], "head data");
      if (full) nfull++;
      if (empty) nempty++;
      @(negedge clk);
      begin
        automatic bit acc = push && q.size() < 16;   // a full buffer refuses
        if (pop && q.size() != 0) void'(q.pop_front());
        if (acc) q.push_back(wdata);
      end
    end
    chk(nfull > 0 && nempty > 0, "buffer was full and empty");
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
