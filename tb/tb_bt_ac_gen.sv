// tb_bt_ac_gen: for random sync words (and both values of the first and last
// sync bit) checks the 72-bit access code against the reference, that the
// first five and last five bits sent alternate, and that the serial output
// sends the code first bit first, one bit per enable.
module tb_bt_ac_gen;
  import tb_bt_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [63:0] sync_word = 0;
  logic [71:0] access_code;
  logic dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_ac_gen dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      sync_word = {$urandom, $urandom};
      sync_word[63] = t[0];
      sync_word[0]  = t[1];
      #1;
      chk(access_code == ac_ref(sync_word), "access code");
      for (int i = 0; i < 4; i++) begin
        chk(access_code[71 - i] != access_code[70 - i], "preamble alternates into sync word");
        chk(access_code[4 - i] != access_code[3 - i], "trailer alternates out of sync word");
      end
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      for (int i = 0; i < 72; i++) begin
        chk(dout == access_code[71 - i], $sformatf("serial bit %0d", i));
        en = 1; @(negedge clk); en = 0; @(negedge clk);
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
