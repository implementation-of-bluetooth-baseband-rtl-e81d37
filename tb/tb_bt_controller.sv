// tb_bt_controller: tests the scheduler on its own. Simple behavioural
// stand-ins replace the data path blocks: the FEC encoders' take patterns
// (every third bit, ten of fifteen), decoders that deliver one decoded bit
// per three raw bits (two per three at rate 2/3), a whitener that passes bits unchanged and fixed HEC/CRC
// results. The testbench then counts every enable the controller gives:
//  - transmit at rate 1/3: 72 + 54 + 144 = 270 bit periods, 18 HEC shifts of
//    which the last 8 shift the HEC out, 48 CRC shifts (16 out), 32 message
//    shifts, 66 whitening steps, one fetch and tx_done;
//  - transmit at rate 2/3: 201 bit periods and 75 encoder enables;
//  - a retransmission without a fetch;
//  - receive: header bits land in rx_hdr, 18 HEC and 48 CRC checks, 32 bits to
//    the serial-to-parallel converter, rx_done with the results, and an early
//    end for a header with another address or a bad HEC.
module tb_bt_controller;
  import bt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // tick every 4 cycles
  logic tick = 0;
  int tc = 0;
  always @(posedge clk) begin tc <= (tc + 1) % 4; tick <= (tc == 3); end

  logic tx_req = 0, rx_en = 0, tx_msg_avail = 1, remote_go = 1, unacked = 0;
  bt_hdr_t tx_hdr = '0;
  logic [2:0] rx_lt_addr = 3'd5;
  logic p2s_fetch, p2s_ready = 0, p2s_start, p2s_shift, p2s_dout = 0;
  logic ac_load, ac_en, ac_dout = 1, corr_clr, corr_en, corr_found = 0;
  logic hec_load, hec_en, hec_gen_out, hec_din, hec_msb = 0, hec_zero = 1;
  logic crc_load, crc_en, crc_gen_out, crc_din, crc_msb = 0, crc_zero = 1;
  logic wht_load, wht_en, wht_din, wht_dout;
  logic fec_clr, f13e_en, f23e_en, enc_din, f13e_dout, f13e_take, f23e_dout, f23e_take;
  logic f13d_en, f23d_en, f23d_in_valid;
  logic f13d_dout = 0, f13d_dvalid = 0, f23d_dout = 0, f23d_dvalid = 0;
  logic s2p_shift, s2p_din, tx_bit, tx_on, tx_fec23, rx_fec23;
  logic tx_done, rx_done, rx_hec_ok, rx_addr_ok, rx_crc_ok;
  bt_state_e state;
  bt_hdr_t rx_hdr;

  bt_controller dut (.*);

  // ---- stand-ins ----
  int e13 = 0, e23 = 0;
  assign f13e_take = f13e_en && (e13 == 0);
  assign f23e_take = f23e_en && (e23 < 10);
  assign f13e_dout = enc_din;
  assign f23e_dout = enc_din;
  assign wht_dout  = wht_din;
  always @(posedge clk) begin
    if (fec_clr) begin e13 <= 0; e23 <= 0; end
    else begin
      if (f13e_en) e13 <= (e13 + 1) % 3;
      if (f23e_en) e23 <= (e23 + 1) % 15;
    end
  end
  always @(posedge clk) begin
    if (p2s_fetch) begin p2s_ready <= 0; repeat (3) @(posedge clk); p2s_ready <= 1; end
  end
  // decoder stand-in: bit n of the decoded stream is dstream[n]
  bit dstream[$];
  int raw = 0, dn = 0;
  always @(posedge clk) begin
    f13d_dvalid <= 0;
    f23d_dvalid <= 0;
    if (fec_clr) begin raw <= 0; dn <= 0; end
    else if (f13d_en || (f23d_en && f23d_in_valid)) begin
      raw <= raw + 1;
      if (f13d_en && raw % 3 == 2) begin
        f13d_dvalid <= 1; f13d_dout <= dstream[dn]; dn <= dn + 1;
      end else if (f23d_en && raw % 3 != 2) begin
        f23d_dvalid <= 1; f23d_dout <= dstream[dn]; dn <= dn + 1;
      end
    end
  end

  // ---- enable counters ----
  int n_tick_on, n_ac, n_hec, n_hec_out, n_crc, n_crc_out, n_p2s, n_wht, n_f13, n_f23;
  int n_fetch, n_txdone, n_s2p, n_rxdone;
  task automatic clear_counts();
    n_tick_on = 0; n_ac = 0; n_hec = 0; n_hec_out = 0; n_crc = 0; n_crc_out = 0; n_p2s = 0;
    n_wht = 0; n_f13 = 0; n_f23 = 0; n_fetch = 0; n_txdone = 0; n_s2p = 0; n_rxdone = 0;
  endtask
  always @(posedge clk) begin
    if (tick && tx_on) n_tick_on++;
    if (ac_en) n_ac++;
    if (hec_en) begin n_hec++; if (hec_gen_out) n_hec_out++; end
    if (crc_en) begin n_crc++; if (crc_gen_out) n_crc_out++; end
    if (p2s_shift) n_p2s++;
    if (wht_en) n_wht++;
    if (f13e_en || f13d_en) n_f13++;
    if (f23e_en || (f23d_en && f23d_in_valid)) n_f23++;
    if (p2s_fetch) n_fetch++;
    if (tx_done) n_txdone++;
    if (s2p_shift) n_s2p++;
    if (rx_done) n_rxdone++;
  end

  task automatic transmit(input bit f23, input bit retx, input string tag);
    clear_counts();
    tx_hdr = '{seqn: 1, arqn: 0, flow: 1, ptype: f23 ? PTYPE_DM1 : 4'h4, lt_addr: 3'd5};
    unacked = retx;
    tx_req = 1;
    wait (tx_done);
    tx_req = 0;
    repeat (20) @(negedge clk);
    chk(n_txdone == 1, {tag, ": one tx_done"});
    chk(n_fetch == (retx ? 0 : 1), {tag, ": fetch only for new data"});
    chk(n_tick_on == (f23 ? 201 : 270), $sformatf("%s: %0d bit periods on air", tag, n_tick_on));
    chk(n_ac == 72, {tag, ": 72 access code bits"});
    chk(n_hec == 18 && n_hec_out == 8, {tag, ": HEC 10 in, 8 out"});
    chk(n_crc == 48 && n_crc_out == 16, {tag, ": CRC 32 in, 16 out"});
    chk(n_p2s == 32, {tag, ": 32 message bits"});
    chk(n_wht == 66, {tag, ": 66 whitened bits"});
    chk(n_f13 == (f23 ? 54 : 198), {tag, ": rate 1/3 encoder periods"});
    chk(n_f23 == (f23 ? 75 : 0), {tag, ": rate 2/3 encoder periods"});
    chk(tx_fec23 == f23, {tag, ": payload rate"});
  endtask

  // receive: sync found, trailer, then decoded bits from dstream
  task automatic receive(input bt_hdr_t h, input bit hec_good, input bit crc_good,
                         input bit expect_full, input string tag);
    logic [9:0] hb;
    clear_counts();
    hb = h;
    dstream.delete();
    for (int i = 0; i < 10; i++) dstream.push_back(hb[i]);
    for (int i = 0; i < 60; i++) dstream.push_back(1'($urandom));
    hec_zero = hec_good;
    crc_zero = crc_good;
    rx_en = 1;
    wait (state == ST_RX_SEARCH);
    repeat (10) @(posedge clk);
    @(posedge clk iff tick);
    #1 corr_found = 1;
    @(posedge clk); #1 corr_found = 0;
    wait (rx_done);
    @(negedge clk);
    chk(rx_hdr == h, {tag, ": header bits received"});
    chk(rx_hec_ok == hec_good, {tag, ": HEC result"});
    chk(rx_addr_ok == (hec_good && h.lt_addr == rx_lt_addr), {tag, ": address result"});
    if (expect_full) begin
      chk(rx_crc_ok == crc_good, {tag, ": CRC result"});
      chk(n_hec == 18 && n_hec_out == 0, {tag, ": 18 header bits checked"});
      chk(n_crc == 48 && n_crc_out == 0, {tag, ": 48 payload bits checked"});
      chk(n_s2p == 32, {tag, ": 32 message bits to s2p"});
      chk(n_wht == 66, {tag, ": 66 bits dewhitened"});
      chk(rx_fec23 == fec23_for(h.ptype), {tag, ": payload rate from packet type"});
      chk((n_f23 != 0) == rx_fec23, {tag, ": rate 2/3 decoder used"});
    end else begin
      chk(n_crc == 0 && !rx_crc_ok, {tag, ": payload skipped"});
    end
    rx_en = 0;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    transmit(0, 0, "tx 1/3");
    transmit(1, 0, "tx 2/3");
    transmit(0, 1, "retransmit");
    receive('{seqn: 1, arqn: 1, flow: 1, ptype: 4'h4, lt_addr: 3'd5}, 1, 1, 1, "rx 1/3");
    receive('{seqn: 0, arqn: 0, flow: 1, ptype: PTYPE_DM1, lt_addr: 3'd5}, 1, 0, 1, "rx 2/3 bad CRC");
    receive('{seqn: 0, arqn: 1, flow: 0, ptype: 4'h4, lt_addr: 3'd2}, 1, 1, 0, "rx other address");
    receive('{seqn: 1, arqn: 1, flow: 1, ptype: 4'h4, lt_addr: 3'd5}, 0, 1, 0, "rx bad HEC");
    // no transmission while the other side said stop
    remote_go = 0; tx_req = 1;
    repeat (200) @(negedge clk);
    chk(!tx_on && state != ST_TX_LOAD, "held by remote stop");
    tx_req = 0; remote_go = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
