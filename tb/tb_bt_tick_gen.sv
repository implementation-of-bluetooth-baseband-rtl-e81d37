// tb_bt_tick_gen: checks the bit enable of a divide-by-5 and a divide-by-1
// generator: first tick DIV cycles after reset, then exactly one tick every
// DIV cycles, each one cycle long.
module tb_bt_tick_gen;
  logic clk = 0, rst_n = 0;
  logic tick5, tick1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_tick_gen #(.DIV(5)) dut5 (.clk, .rst_n, .tick(tick5));
  bt_tick_gen #(.DIV(1)) dut1 (.clk, .rst_n, .tick(tick1));

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    int last = 0, n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 1; c <= 200; c++) begin
      @(posedge clk); #1;
      chk(tick1, "divide by 1 ticks every cycle");
      if (tick5) begin
        chk(c - last == 5, $sformatf("tick spacing %0d at cycle %0d", c - last, c));
        last = c; n++;
      end
    end
    chk(n == 40, $sformatf("40 ticks in 200 cycles, got %0d", n));
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
