// bt_baseband: Bluetooth baseband controller data path (top level).
//
// Turns a 32-bit message from the host into a Bluetooth packet and back. The
// transmit direction adds an 8-bit HEC to the 10-bit header and a 16-bit CRC
// to the message, whitens both, codes them with forward error correction and
// puts the 72-bit access code in front: 72 + 54 + 144 = 270 bits with rate
// 1/3 on the payload (201 bits with rate 2/3, chosen by packet type DM1). The
// receive direction finds the access code with the correlator, undoes each
// step in reverse order, checks HEC and CRC and hands the message to the
// receive buffer. A flow control block turns the check results into the
// FLOW/ARQN/SEQN bits of the next packet and decides on retransmission.
//
// Everything is bit serial at 1 Mbit/s: bt_tick_gen divides the system clock
// by TICK_DIV into a bit enable. HEC, CRC and whitening are single instances
// shared by both directions; bt_controller schedules them. Only one direction
// is active at a time and transmitting takes priority over searching.
//
// Host side: bytes are written into the 8-bit transmit buffer (tx_wr) and
// read from the receive buffer (rx_rd, first-word-fall-through). tx_req asks
// for a packet as soon as a message (4 bytes) is there or one must be
// repeated; rx_en lets the controller search for packets when idle. The
// configuration inputs stand in for the host's register file.
// Radio side: tx_bit/tx_on change on bit_tick; rx_bit is sampled on bit_tick.
module bt_baseband
  import bt_pkg::*;
#(
  parameter int unsigned TICK_DIV   = 16,  // system clocks per bit
  parameter int unsigned BUF_DEPTH  = 16,  // bytes per data buffer
  parameter int unsigned CORR_ERR   = 0    // correlator bit errors allowed
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host: transmit buffer
  input  logic                 tx_wr,
  input  logic [7:0]           tx_wdata,
  output logic                 tx_full,
  // host: receive buffer
  input  logic                 rx_rd,
  output logic [7:0]           rx_rdata,
  output logic                 rx_empty,
  // host: control and configuration
  input  logic                 tx_req,
  input  logic                 rx_en,
  input  logic [2:0]           lt_addr,     // active member address sent and accepted
  input  logic [3:0]           tx_ptype,
  input  logic [SYNC_BITS-1:0] sync_word,   // own sync word and match pattern
  input  logic [7:0]           uap,         // HEC / CRC initial value
  input  logic [5:0]           wht_init,    // whitening initial value
  // radio
  output logic                 bit_tick,
  output logic                 tx_bit,
  output logic                 tx_on,
  input  logic                 rx_bit,
  // status
  output bt_state_e            state,
  output logic                 tx_done,
  output logic                 rx_done,
  output bt_hdr_t              rx_hdr,
  output logic                 rx_hec_ok,
  output logic                 rx_crc_ok,
  output logic                 rx_addr_ok,
  output logic                 tx_fec23,     // packet being sent uses rate 2/3
  output logic                 rx_fec23,     // packet being received uses rate 2/3
  output logic [MSG_BITS-1:0]  rx_msg,
  output logic                 remote_go,
  output logic                 unacked,
  output logic                 ev_commit,    // message accepted into rx buffer
  output logic                 ev_ack,
  output logic                 ev_nak,
  output logic                 ev_dup,
  output logic                 ev_fec_fix,   // FEC corrected an error
  output logic                 ev_fec_fail   // 2/3 FEC block uncorrectable
);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  // ---------------- clock management ----------------
  logic tick;
  bt_tick_gen #(.DIV(TICK_DIV)) u_tick (.clk, .rst_n, .tick);
  assign bit_tick = tick;

  // ---------------- data buffers ----------------
  logic          txb_pop, txb_empty;
  logic [7:0]    txb_rdata;
  logic [CW-1:0] txb_count, rxb_count;
  logic          rxb_push, rxb_full;
  logic [7:0]    rxb_wdata;

  bt_fifo #(.WIDTH(8), .DEPTH(BUF_DEPTH)) u_txbuf (
    .clk, .rst_n, .push(tx_wr), .wdata(tx_wdata), .pop(txb_pop),
    .rdata(txb_rdata), .empty(txb_empty), .full(tx_full), .count(txb_count));

  bt_fifo #(.WIDTH(8), .DEPTH(BUF_DEPTH)) u_rxbuf (
    .clk, .rst_n, .push(rxb_push), .wdata(rxb_wdata), .pop(rx_rd),
    .rdata(rx_rdata), .empty(rx_empty), .full(rxb_full), .count(rxb_count));

  // ---------------- controller wiring ----------------
  logic p2s_fetch, p2s_ready, p2s_start, p2s_shift, p2s_dout;
  logic ac_load, ac_en, ac_dout;
  logic corr_clr, corr_en, corr_found;
  logic hec_load, hec_en, hec_gen_out, hec_din, hec_zero;
  logic [HEC_BITS-1:0] hec_rem;
  logic crc_load, crc_en, crc_gen_out, crc_din, crc_zero;
  logic [CRC_BITS-1:0] crc_rem;
  logic wht_load, wht_en, wht_din, wht_dout;
  logic fec_clr, f13e_en, f23e_en, enc_din, f13e_dout, f13e_take, f23e_dout, f23e_take;
  logic f13d_en, f23d_en, f23d_in_valid, f13d_dout, f13d_dvalid, f23d_dout, f23d_dvalid;
  logic f13d_fix, f23d_fix;
  logic s2p_shift, s2p_din, s2p_busy;
  logic tx_flow, tx_arqn, tx_seqn;
  logic rx_space_ok, msg_avail;
  logic [MSG_BITS-1:0] tx_msg;
  bt_hdr_t tx_hdr;

  assign msg_avail   = txb_count >= CW'(MSG_BYTES);
  assign rx_space_ok = (rxb_count <= CW'(BUF_DEPTH - MSG_BYTES)) && !s2p_busy;
  assign tx_hdr      = '{seqn: tx_seqn, arqn: tx_arqn, flow: tx_flow,
                         ptype: tx_ptype, lt_addr: lt_addr};

  bt_controller u_ctrl (
    .clk, .rst_n, .tick,
    .tx_req, .rx_en, .tx_msg_avail(msg_avail), .remote_go, .unacked,
    .tx_hdr, .rx_lt_addr(lt_addr),
    .p2s_fetch, .p2s_ready, .p2s_start, .p2s_shift, .p2s_dout,
    .ac_load, .ac_en, .ac_dout,
    .corr_clr, .corr_en, .corr_found,
    .hec_load, .hec_en, .hec_gen_out, .hec_din, .hec_msb(hec_rem[7]), .hec_zero,
    .crc_load, .crc_en, .crc_gen_out, .crc_din, .crc_msb(crc_rem[15]), .crc_zero,
    .wht_load, .wht_en, .wht_din, .wht_dout,
    .fec_clr, .f13e_en, .f23e_en, .enc_din, .f13e_dout, .f13e_take, .f23e_dout, .f23e_take,
    .f13d_en, .f23d_en, .f23d_in_valid, .f13d_dout, .f13d_dvalid, .f23d_dout, .f23d_dvalid,
    .s2p_shift, .s2p_din,
    .tx_bit, .tx_on,
    .state, .tx_fec23, .rx_fec23, .tx_done, .rx_done, .rx_hdr,
    .rx_hec_ok, .rx_addr_ok, .rx_crc_ok);

  // ---------------- data path blocks ----------------
  bt_p2s u_p2s (
    .clk, .rst_n, .fetch(p2s_fetch), .fifo_rdata(txb_rdata), .fifo_empty(txb_empty),
    .fifo_pop(txb_pop), .ready(p2s_ready), .msg(tx_msg), .start(p2s_start),
    .shift(p2s_shift), .dout(p2s_dout));

  bt_ac_gen u_acgen (
    .clk, .rst_n, .sync_word, .load(ac_load), .en(ac_en), .access_code(), .dout(ac_dout));

  bt_correlator #(.MAX_ERR(CORR_ERR)) u_corr (
    .clk, .rst_n, .clr(corr_clr), .en(corr_en), .din(rx_bit), .pattern(sync_word),
    .found(corr_found));

  bt_hec u_hec (
    .clk, .rst_n, .load(hec_load), .init(uap), .en(hec_en), .gen_out(hec_gen_out),
    .din(hec_din), .dout(), .rem(hec_rem), .zero(hec_zero));

  bt_crc u_crc (
    .clk, .rst_n, .load(crc_load), .init({8'h00, uap}), .en(crc_en), .gen_out(crc_gen_out),
    .din(crc_din), .dout(), .rem(crc_rem), .zero(crc_zero));

  bt_whiten u_wht (
    .clk, .rst_n, .load(wht_load), .init(wht_init), .en(wht_en), .din(wht_din),
    .dout(wht_dout));

  bt_fec13_enc u_f13e (
    .clk, .rst_n, .clr(fec_clr), .en(f13e_en), .din(enc_din), .dout(f13e_dout),
    .take(f13e_take));

  bt_fec23_enc u_f23e (
    .clk, .rst_n, .clr(fec_clr), .en(f23e_en), .din(enc_din), .dout(f23e_dout),
    .take(f23e_take));

  bt_fec13_dec u_f13d (
    .clk, .rst_n, .clr(fec_clr), .en(f13d_en), .din(rx_bit), .dout(f13d_dout),
    .dvalid(f13d_dvalid), .corrected(f13d_fix));

  bt_fec23_dec u_f23d (
    .clk, .rst_n, .clr(fec_clr), .en(f23d_en), .in_valid(f23d_in_valid), .din(rx_bit),
    .dout(f23d_dout), .dvalid(f23d_dvalid), .corrected(f23d_fix),
    .uncorrectable(ev_fec_fail));

  bt_s2p u_s2p (
    .clk, .rst_n, .shift(s2p_shift), .din(s2p_din), .commit(ev_commit), .word(rx_msg),
    .fifo_push(rxb_push), .fifo_wdata(rxb_wdata), .busy(s2p_busy));

  // A packet with a good header for another active member is ignored.
  logic flow_rx_done;
  assign flow_rx_done = rx_done && !(rx_hec_ok && !rx_addr_ok);

  bt_flow_ctrl u_flow (
    .clk, .rst_n, .rx_done(flow_rx_done), .rx_hdr, .rx_hec_ok, .rx_crc_ok, .rx_space_ok,
    .tx_done, .tx_flow, .tx_arqn, .tx_seqn, .remote_go, .unacked,
    .commit(ev_commit), .ack(ev_ack), .nak(ev_nak), .dup(ev_dup));

  assign ev_fec_fix = f13d_fix || f23d_fix;

  // The receive buffer only takes messages the flow control said fit.
  a_rx_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    rxb_push |-> !rxb_full);
endmodule
