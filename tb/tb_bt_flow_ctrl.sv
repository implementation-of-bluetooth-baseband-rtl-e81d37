// tb_bt_flow_ctrl: walks the flow control block through a scripted exchange
// and checks every decision: ACK and SEQN toggle, NAK, duplicate, CRC
// failure, HEC failure, a full receive buffer, and FLOW stop/go from the
// other side. Each decision is compared with the expected header bits of the
// next packet and the commit/ack/nak/dup pulses.
module tb_bt_flow_ctrl;
  import bt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_done = 0, rx_hec_ok = 0, rx_crc_ok = 0, rx_space_ok = 1, tx_done = 0;
  bt_hdr_t rx_hdr = '0;
  logic tx_flow, tx_arqn, tx_seqn, remote_go, unacked, commit, ack, nak, dup;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bt_flow_ctrl dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic sent();
    @(negedge clk); tx_done = 1; @(negedge clk); tx_done = 0;
  endtask

  // receive a header; then check the pulses and the next header's bits
  task automatic recv(input bit hec, input bit crc, input bit fl, input bit aq, input bit sq,
                      input bit e_commit, input bit e_ack, input bit e_nak, input bit e_dup,
                      input bit e_arqn, input bit e_seqn, input bit e_go, input bit e_unacked,
                      input string tag);
    @(negedge clk);
    rx_done = 1; rx_hec_ok = hec; rx_crc_ok = crc;
    rx_hdr = '{seqn: sq, arqn: aq, flow: fl, ptype: 4'h4, lt_addr: 3'd1};
    @(negedge clk);
    rx_done = 0;
    chk(commit == e_commit, {tag, ": commit"});
    chk(ack == e_ack, {tag, ": ack"});
    chk(nak == e_nak, {tag, ": nak"});
    chk(dup == e_dup, {tag, ": dup"});
    chk(tx_arqn == e_arqn, {tag, ": ARQN"});
    chk(tx_seqn == e_seqn, {tag, ": SEQN"});
    chk(remote_go == e_go, {tag, ": remote go"});
    chk(unacked == e_unacked, {tag, ": unacked"});
    @(negedge clk);
    chk(!commit && !ack && !nak && !dup, {tag, ": pulses last one cycle"});
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(!tx_arqn && !tx_seqn && remote_go && !unacked, "reset state");
    chk(tx_flow, "FLOW follows buffer room");
    rx_space_ok = 0; #1 chk(!tx_flow, "FLOW stop when no room"); rx_space_ok = 1;
    sent();
    chk(unacked, "unacked after sending");
    //   hec crc fl aq sq | commit ack nak dup | arqn seqn go unacked
    recv(1, 1, 1, 1, 0,   1, 1, 0, 0,   1, 1, 1, 0, "first packet, ACK");
    recv(1, 1, 1, 1, 0,   0, 0, 0, 1,   1, 1, 1, 0, "same SEQN: duplicate");
    sent();
    recv(1, 0, 1, 0, 1,   0, 0, 1, 0,   0, 1, 1, 1, "NAK and bad CRC");
    recv(0, 1, 0, 1, 1,   0, 0, 0, 0,   0, 1, 1, 1, "HEC failure ignored");
    recv(1, 1, 0, 1, 1,   1, 1, 0, 0,   1, 0, 0, 0, "ACK, new data, stop");
    rx_space_ok = 0;
    recv(1, 1, 1, 0, 0,   0, 0, 0, 0,   0, 0, 1, 0, "no room: NAK");
    rx_space_ok = 1;
    recv(1, 1, 1, 0, 0,   1, 0, 0, 0,   1, 0, 1, 0, "room again: accepted");
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
