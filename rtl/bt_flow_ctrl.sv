// bt_flow_ctrl: flow control and acknowledgement (ARQ) block.
//
// Reads the FLOW, ARQN and SEQN bits of every received header together with
// the HEC and CRC results, and decides the FLOW, ARQN and SEQN bits of the
// next transmitted packet, as the document assigns to this block. It also
// tells the controller whether the next packet carries new data or repeats
// the unacknowledged one. The rules are this design's reading of the header
// fields the document lists (FLOW 0 = stop / 1 = go, ARQN 0 = NAK / 1 = ACK,
// SEQN toggled for consecutive packets):
//  - after sending a data packet it is unacknowledged (unacked = 1) until a
//    received header with a good HEC carries ARQN = 1; then SEQN toggles.
//    ARQN = 0 counts a NAK and the packet is sent again with the same SEQN.
//  - a received payload with a good CRC and a SEQN different from the last
//    accepted one is new: it is committed to the receive buffer if there is
//    room (ARQN = 1), else rejected (ARQN = 0). One with the same SEQN is a
//    duplicate: acknowledged again but not committed. A bad CRC gives NAK,
//    and so does a packet whose header failed its HEC.
//  - FLOW of the outgoing header is 1 while the receive buffer has room for a
//    message; remote_go holds the FLOW bit last received (1 after reset).
// Timing: rx_done and tx_done are one-cycle pulses; commit, ack, nak and dup
// pulse in the following cycle.
module bt_flow_ctrl
  import bt_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    rx_done,
  input  bt_hdr_t rx_hdr,
  input  logic    rx_hec_ok,
  input  logic    rx_crc_ok,
  input  logic    rx_space_ok,
  input  logic    tx_done,
  output logic    tx_flow,
  output logic    tx_arqn,
  output logic    tx_seqn,
  output logic    remote_go,
  output logic    unacked,
  output logic    commit,
  output logic    ack,
  output logic    nak,
  output logic    dup
);
  logic last_seqn, have_rx;

  assign tx_flow = rx_space_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_arqn   <= 1'b0;
      tx_seqn   <= 1'b0;
      remote_go <= 1'b1;
      unacked   <= 1'b0;
      last_seqn <= 1'b0;
      have_rx   <= 1'b0;
      commit    <= 1'b0;
      ack       <= 1'b0;
      nak       <= 1'b0;
      dup       <= 1'b0;
    end else begin
      commit <= 1'b0;
      ack    <= 1'b0;
      nak    <= 1'b0;
      dup    <= 1'b0;
      if (tx_done) unacked <= 1'b1;
      if (rx_done && !rx_hec_ok) tx_arqn <= 1'b0;
      if (rx_done && rx_hec_ok) begin
        remote_go <= rx_hdr.flow;
        if (unacked) begin
          if (rx_hdr.arqn) begin
            unacked <= 1'b0;
            tx_seqn <= ~tx_seqn;
            ack     <= 1'b1;
          end else begin
            nak <= 1'b1;
          end
        end
        if (!rx_crc_ok) begin
          tx_arqn <= 1'b0;
        end else if (have_rx && rx_hdr.seqn == last_seqn) begin
          tx_arqn <= 1'b1;
          dup     <= 1'b1;
        end else if (rx_space_ok) begin
          tx_arqn   <= 1'b1;
          commit    <= 1'b1;
          last_seqn <= rx_hdr.seqn;
          have_rx   <= 1'b1;
        end else begin
          tx_arqn <= 1'b0;
        end
      end
    end
  end
endmodule
