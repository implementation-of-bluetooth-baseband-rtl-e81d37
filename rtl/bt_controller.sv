// bt_controller: centralised controller and time scheduler of the data path.
//
// The data path blocks (HEC, CRC, whitening) are shared by the transmit and
// the receive direction, since only one direction is active at a time; this
// controller decides the direction, feeds each shared block its input bit and
// tells it when to shift. All data movement happens on tick, the 1 Mbit/s bit
// enable.
//
// Transmit (tx_req while idle, remote device said go, and either a message in
// the transmit buffer or an unacknowledged one to repeat):
//   TX_LOAD  fetch the 32-bit message (new data only), load the access code,
//            HEC (UAP), CRC ({8'h00, UAP}) and whitening registers.
//   TX_AC    72 ticks: access code.
//   TX_HDR   54 ticks: the 18 header bits (10 information bits, then the HEC
//            shifted out of the HEC core), whitened and sent at rate 1/3.
//   TX_PAY   144 ticks at rate 1/3, or 75 at rate 2/3 when the packet type is
//            DM1: the 32 message bits (LSB first) through the CRC core, then
//            the 16 CRC bits, whitened; two zero pad bits complete the last
//            (15,10) block at rate 2/3.
// The source bit stream advances only when the FEC encoder takes a bit (every
// third tick at rate 1/3, ten of fifteen ticks at rate 2/3).
//
// Receive (rx_en while idle): the correlator searches for the sync word; after
// a match the 4 trailer bits are skipped, the header is decoded (rate 1/3),
// dewhitened and checked by the HEC core, and the payload is decoded at the
// rate its packet type asks for, dewhitened, checked by the CRC core and
// shifted into the serial-to-parallel converter. A header with a bad HEC or
// another active member address ends the packet early. rx_done pulses at the
// end with rx_hdr, rx_hec_ok, rx_addr_ok and rx_crc_ok valid.
//
// The radio side is a bit-serial port: tx_bit/tx_on change on tick and hold
// for one bit period. Received bits go straight to the correlator and the
// FEC decoders, which sample them on the enables given here.
// The document gives the block's role and the order of the blocks; the state
// sequence, the counters and the early end on a bad header are this design's.
module bt_controller
  import bt_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  // requests and link state
  input  logic          tx_req,
  input  logic          rx_en,
  input  logic          tx_msg_avail,
  input  logic          remote_go,
  input  logic          unacked,
  input  bt_hdr_t       tx_hdr,
  input  logic [2:0]    rx_lt_addr,
  // parallel-to-serial converter
  output logic          p2s_fetch,
  input  logic          p2s_ready,
  output logic          p2s_start,
  output logic          p2s_shift,
  input  logic          p2s_dout,
  // access code generator and correlator
  output logic          ac_load,
  output logic          ac_en,
  input  logic          ac_dout,
  output logic          corr_clr,
  output logic          corr_en,
  input  logic          corr_found,
  // HEC core
  output logic          hec_load,
  output logic          hec_en,
  output logic          hec_gen_out,
  output logic          hec_din,
  input  logic          hec_msb,    // B7 of the HEC core
  input  logic          hec_zero,
  // CRC core
  output logic          crc_load,
  output logic          crc_en,
  output logic          crc_gen_out,
  output logic          crc_din,
  input  logic          crc_msb,    // bit 15 of the CRC core
  input  logic          crc_zero,
  // whitening
  output logic          wht_load,
  output logic          wht_en,
  output logic          wht_din,
  input  logic          wht_dout,
  // FEC encoders
  output logic          fec_clr,
  output logic          f13e_en,
  output logic          f23e_en,
  output logic          enc_din,
  input  logic          f13e_dout,
  input  logic          f13e_take,
  input  logic          f23e_dout,
  input  logic          f23e_take,
  // FEC decoders
  output logic          f13d_en,
  output logic          f23d_en,
  output logic          f23d_in_valid,
  input  logic          f13d_dout,
  input  logic          f13d_dvalid,
  input  logic          f23d_dout,
  input  logic          f23d_dvalid,
  // serial-to-parallel converter
  output logic          s2p_shift,
  output logic          s2p_din,
  // radio side
  output logic          tx_bit,
  output logic          tx_on,
  // status
  output bt_state_e     state,
  output logic          tx_fec23,
  output logic          rx_fec23,
  output logic          tx_done,
  output logic          rx_done,
  output bt_hdr_t       rx_hdr,
  output logic          rx_hec_ok,
  output logic          rx_addr_ok,
  output logic          rx_crc_ok
);
  localparam int unsigned S_HEC = HDR_INFO_BITS;       // 10: HEC bits start
  localparam int unsigned S_PAY = HDR_BITS;            // 18: payload starts
  localparam int unsigned S_CRC = HDR_BITS + MSG_BITS; // 50: CRC bits start
  localparam int unsigned S_END = HDR_BITS + PAY_BITS; // 66: padding starts

  logic [7:0]  cnt;      // ticks within the current phase
  logic [6:0]  s;        // transmit source bit index (0..65, then padding)
  logic [6:0]  d;        // receive decoded bit index
  logic        hdr_checked;
  logic [HDR_INFO_BITS-1:0] hdr_bits, rx_bits;
  logic        src, enc_dout, enc_take;
  logic        dv, dbit;
  logic [7:0]  pay_ticks;

  assign hdr_bits = tx_hdr;
  assign rx_hdr   = bt_hdr_t'(rx_bits);
  assign rx_fec23 = fec23_for(rx_hdr.ptype);

  // ---------------- transmit source bit and FEC encoder selection ----------
  always_comb begin
    if      (s < 7'(S_HEC)) src = hdr_bits[s[3:0]];  // header information
    else if (s < 7'(S_PAY)) src = hec_msb;            // HEC, B7 first
    else if (s < 7'(S_CRC)) src = p2s_dout;           // message, LSB first
    else                    src = crc_msb;            // CRC, MSB first
  end

  wire tx_hdr_phase = (state == ST_TX_HDR);
  wire tx_pay_phase = (state == ST_TX_PAY);
  wire use23        = tx_pay_phase && tx_fec23;

  assign enc_din  = (s >= 7'(S_END)) ? 1'b0 : wht_dout;
  assign enc_dout = use23 ? f23e_dout : f13e_dout;
  assign enc_take = use23 ? f23e_take : f13e_take;
  assign f13e_en  = tick && (tx_hdr_phase || (tx_pay_phase && !tx_fec23));
  assign f23e_en  = tick && use23;

  // ---------------- receive decoded bit stream ----------------
  wire rx_active = (state == ST_RX_HDR) || (state == ST_RX_PAY);
  assign dv   = rx_active && (f13d_dvalid || f23d_dvalid);
  assign dbit = f23d_dvalid ? f23d_dout : f13d_dout;
  wire dv_use = dv && (d < 7'(S_END));

  assign pay_ticks = rx_fec23 ? 8'(PAY_CODED23) : 8'(PAY_CODED13);
  assign f13d_en   = tick && ((state == ST_RX_HDR) ||
                     ((state == ST_RX_PAY) && !rx_fec23 && cnt < pay_ticks));
  assign f23d_en       = tick && (state == ST_RX_PAY) && rx_fec23;
  assign f23d_in_valid = cnt < pay_ticks;

  // ---------------- shared block control (direction multiplexing) ----------
  always_comb begin
    hec_en      = 1'b0;
    hec_gen_out = 1'b0;
    hec_din     = 1'b0;
    crc_en      = 1'b0;
    crc_gen_out = 1'b0;
    crc_din     = 1'b0;
    wht_en      = 1'b0;
    wht_din     = 1'b0;
    p2s_shift   = 1'b0;
    s2p_shift   = 1'b0;
    s2p_din     = wht_dout;
    if (state inside {ST_TX_HDR, ST_TX_PAY}) begin
      hec_din     = hdr_bits[s[3:0]];
      hec_gen_out = (s >= 7'(S_HEC));
      crc_din     = p2s_dout;
      crc_gen_out = (s >= 7'(S_CRC));
      wht_din     = src;
      if (enc_take && s < 7'(S_END)) begin
        wht_en = 1'b1;
        if (s < 7'(S_PAY)) hec_en = 1'b1;
        else begin
          crc_en    = 1'b1;
          p2s_shift = (s < 7'(S_CRC));
        end
      end
    end else if (rx_active) begin
      wht_din = dbit;
      hec_din = wht_dout;
      crc_din = wht_dout;
      if (dv_use) begin
        wht_en = 1'b1;
        if (d < 7'(S_PAY)) hec_en = 1'b1;
        else begin
          crc_en    = 1'b1;
          s2p_shift = (d < 7'(S_CRC));
        end
      end
    end
  end

  // load signals, all from the state machine below
  logic tx_load_go, rx_found;
  assign tx_load_go = (state == ST_TX_LOAD) && p2s_ready;
  assign rx_found   = (state == ST_RX_SEARCH) && corr_found;
  assign ac_load    = tx_load_go;
  assign p2s_start  = tx_load_go;
  assign hec_load   = tx_load_go || rx_found;
  assign crc_load   = tx_load_go || rx_found;
  assign wht_load   = tx_load_go || rx_found;
  assign fec_clr    = tx_load_go || rx_found;
  assign ac_en      = tick && (state == ST_TX_AC);
  assign corr_en    = tick && (state == ST_RX_SEARCH);
  assign corr_clr   = (state == ST_IDLE);

  wire tx_start = tx_req && remote_go && (unacked || tx_msg_avail);
  assign p2s_fetch = (state == ST_IDLE) && tx_start && !unacked;

  // ---------------- state machine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      cnt         <= '0;
      s           <= '0;
      d           <= '0;
      tx_bit      <= 1'b0;
      tx_on       <= 1'b0;
      tx_fec23    <= 1'b0;
      tx_done     <= 1'b0;
      rx_done     <= 1'b0;
      rx_bits     <= '0;
      rx_hec_ok   <= 1'b0;
      rx_addr_ok  <= 1'b0;
      rx_crc_ok   <= 1'b0;
      hdr_checked <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      rx_done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (tx_start) begin
            state    <= ST_TX_LOAD;
            tx_fec23 <= fec23_for(tx_hdr.ptype);
          end else if (rx_en) begin
            state <= ST_RX_SEARCH;
          end
        end
        ST_TX_LOAD: begin
          if (p2s_ready) begin
            state <= ST_TX_AC;
            cnt   <= '0;
            s     <= '0;
          end
        end
        ST_TX_AC: if (tick) begin
          tx_bit <= ac_dout;
          tx_on  <= 1'b1;
          cnt    <= cnt + 8'd1;
          if (cnt == 8'(AC_BITS - 1)) begin
            state <= ST_TX_HDR;
            cnt   <= '0;
          end
        end
        ST_TX_HDR, ST_TX_PAY: if (tick) begin
          tx_bit <= enc_dout;
          cnt    <= cnt + 8'd1;
          if (enc_take) s <= s + 7'd1;
          if (state == ST_TX_HDR && cnt == 8'(HDR_CODED - 1)) begin
            state <= ST_TX_PAY;
            cnt   <= '0;
          end else if (state == ST_TX_PAY &&
                       cnt == (tx_fec23 ? 8'(PAY_CODED23 - 1) : 8'(PAY_CODED13 - 1))) begin
            state <= ST_TX_DONE;
          end
        end
        ST_TX_DONE: if (tick) begin
          tx_on   <= 1'b0;
          tx_done <= 1'b1;
          state   <= ST_IDLE;
        end
        ST_RX_SEARCH: begin
          if (corr_found) begin
            state       <= ST_RX_TRAILER;
            cnt         <= '0;
            d           <= '0;
            hdr_checked <= 1'b0;
            rx_hec_ok   <= 1'b0;
            rx_addr_ok  <= 1'b0;
            rx_crc_ok   <= 1'b0;
          end else if (!rx_en || tx_req) begin
            state <= ST_IDLE;
          end
        end
        ST_RX_TRAILER: if (tick) begin
          cnt <= cnt + 8'd1;
          if (cnt == 8'(TRL_BITS - 1)) begin
            state <= ST_RX_HDR;
            cnt   <= '0;
          end
        end
        ST_RX_HDR, ST_RX_PAY: begin
          if (tick) begin
            if (state == ST_RX_HDR) begin
              cnt <= (cnt == 8'(HDR_CODED - 1)) ? '0 : cnt + 8'd1;
              if (cnt == 8'(HDR_CODED - 1)) state <= ST_RX_PAY;
            end else if (cnt < pay_ticks) begin
              cnt <= cnt + 8'd1;
            end
          end
          if (dv_use) begin
            d <= d + 7'd1;
            if (d < 7'(HDR_INFO_BITS)) rx_bits[d[3:0]] <= wht_dout;
          end
          if (d == 7'(S_PAY) && !hdr_checked) begin
            hdr_checked <= 1'b1;
            rx_hec_ok   <= hec_zero;
            rx_addr_ok  <= hec_zero && (rx_hdr.lt_addr == rx_lt_addr);
            if (!hec_zero || rx_hdr.lt_addr != rx_lt_addr) state <= ST_RX_DONE;
          end
          if (d == 7'(S_END)) begin
            rx_crc_ok <= crc_zero;
            state     <= ST_RX_DONE;
          end
        end
        ST_RX_DONE: begin
          rx_done <= 1'b1;
          state   <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // ---------------- protocol checks ----------------
  // The source index never runs past the padding of the last 2/3 block.
  a_src_bound: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_TX_PAY) |-> s <= 7'(S_END + 2));
  // Only one direction is active at a time.
  a_one_dir: assert property (@(posedge clk) disable iff (!rst_n)
    !(tx_on && rx_active));
endmodule
