// tb_bt_p2s: connects the converter to a small byte queue standing in for the
// transmit buffer, fetches random messages (with the buffer sometimes
// running dry during the fetch) and checks the held message, ready, the
// number of bytes taken and that the bits leave least significant first.
// A second start without a fetch must send the same message again.
module tb_bt_p2s;
  logic clk = 0, rst_n = 0, fetch = 0, start = 0, shift = 0;
  logic [7:0] fifo_rdata;
  logic fifo_empty, fifo_pop, ready, dout;
  logic [31:0] msg;
  logic [7:0] q[$];
  logic hold_empty = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  assign fifo_empty = (q.size() == 0) || hold_empty;
  assign fifo_rdata = (q.size() != 0) ? q[0] : 8'h00;
  always @(posedge clk) if (fifo_pop) void'(q.pop_front());

  bt_p2s dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      logic [31:0] m;
      int n;
      m = $urandom;
      for (int b = 0; b < 4; b++) q.push_back(m[8*b +: 8]);
      q.push_back(8'hA5);                 // next message's byte stays
      @(negedge clk); fetch = 1; @(negedge clk); fetch = 0;
      hold_empty = t[0];
      n = 0;
      while (!ready && n < 40) begin
        @(negedge clk); n++;
        if (n == 3) hold_empty = 0;
      end
      chk(ready, "message fetched");
      chk(msg == m, $sformatf("held message %h, expected %h", msg, m));
      chk(q.size() == 1, "exactly four bytes taken");
      void'(q.pop_front());
      for (int rep = 0; rep < 2; rep++) begin
        @(negedge clk); start = 1; @(negedge clk); start = 0;
        for (int i = 0; i < 32; i++) begin
          chk(dout == m[i], $sformatf("bit %0d", i));
          shift = 1; @(negedge clk); shift = 0;
        end
      end
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
