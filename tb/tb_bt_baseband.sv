// tb_bt_baseband: end-to-end test of two baseband controllers talking to each
// other over a bit-serial channel, at the design's default parameters.
//
// Device A (master) and device B (slave) share one clock. Each one's tx_bit
// drives the other's rx_bit; between packets the channel carries random
// noise, and the testbench can flip chosen bits of a packet. A fixed scenario
// of 16 exchanges walks through: plain rate 1/3 and rate 2/3 (DM1) packets,
// single-bit errors the FEC corrects, a payload error that fails the CRC
// (NAK and retransmission), a header error that fails the HEC, a duplicate
// packet, a full receive buffer that stops the other side (FLOW = 0), and a
// packet for another active member address. Every error-free packet is
// compared bit for bit with the reference model, packet lengths are checked
// (270 and 201 bits, one bit per 16 clock cycles), the header fields are
// checked against the expected ARQ state and every received message is read
// back from the receive buffers. Each mechanism is counted and must occur.

module tb_bt_baseband;
  import bt_pkg::*;
  import tb_bt_ref_pkg::*;

  localparam int TICK = 16;          // default TICK_DIV of bt_baseband
  localparam logic [63:0] SYNC = 64'h4E3A_91C5_2B6F_D807;
  localparam logic [7:0]  UAP  = 8'h47;
  localparam logic [5:0]  WINIT = 6'h2D;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- the two devices ----------------
  logic       tx_wr[2], tx_req[2], rx_rd[2], rx_en[2];
  logic [7:0] tx_wdata[2];
  logic [2:0] lt_addr[2];
  logic [3:0] tx_ptype[2];
  logic       tx_full[2], rx_empty[2], bit_tick[2], tx_bit[2], tx_on[2], rx_bit[2];
  logic [7:0] rx_rdata[2];
  bt_state_e  state[2];
  logic       tx_done[2], rx_done[2], rx_hec_ok[2], rx_crc_ok[2], rx_addr_ok[2];
  logic       tx_fec23[2], rx_fec23[2], remote_go[2], unacked[2];
  logic       ev_commit[2], ev_ack[2], ev_nak[2], ev_dup[2], ev_fix[2], ev_fail[2];
  bt_hdr_t    rx_hdr[2];
  logic [31:0] rx_msg[2];

  for (genvar g = 0; g < 2; g++) begin : g_dev
    bt_baseband dut (
      .clk, .rst_n,
      .tx_wr(tx_wr[g]), .tx_wdata(tx_wdata[g]), .tx_full(tx_full[g]),
      .rx_rd(rx_rd[g]), .rx_rdata(rx_rdata[g]), .rx_empty(rx_empty[g]),
      .tx_req(tx_req[g]), .rx_en(rx_en[g]), .lt_addr(lt_addr[g]), .tx_ptype(tx_ptype[g]),
      .sync_word(SYNC), .uap(UAP), .wht_init(WINIT),
      .bit_tick(bit_tick[g]), .tx_bit(tx_bit[g]), .tx_on(tx_on[g]), .rx_bit(rx_bit[g]),
      .state(state[g]), .tx_done(tx_done[g]), .rx_done(rx_done[g]), .rx_hdr(rx_hdr[g]),
      .rx_hec_ok(rx_hec_ok[g]), .rx_crc_ok(rx_crc_ok[g]), .rx_addr_ok(rx_addr_ok[g]),
      .tx_fec23(tx_fec23[g]), .rx_fec23(rx_fec23[g]),
      .rx_msg(rx_msg[g]), .remote_go(remote_go[g]), .unacked(unacked[g]),
      .ev_commit(ev_commit[g]), .ev_ack(ev_ack[g]), .ev_nak(ev_nak[g]), .ev_dup(ev_dup[g]),
      .ev_fec_fix(ev_fix[g]), .ev_fec_fail(ev_fail[g]));
  end

  // ---------------- channel, capture and error injection ----------------
  bit    cap[2][$];            // bits sent by each device in the current packet
  int    cap_ticks[2];         // clock cycles from first to last bit
  longint first_cyc[2], last_cyc[2];
  bit    flip[2][int];         // bit positions to corrupt, per sender
  logic  noise[2];
  logic  tick_d;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc    <= cyc + 1;
    tick_d <= bit_tick[0];
    if (tick_d) begin
      for (int g = 0; g < 2; g++) begin
        noise[g] <= 1'($urandom);
        if (tx_on[g]) begin
          if (cap[g].size() == 0) first_cyc[g] = cyc;
          last_cyc[g] = cyc;
          cap[g].push_back(tx_bit[g]);
        end
      end
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_ch
    // the bit on the air from device g, possibly corrupted
    wire air = tx_on[g] ? (tx_bit[g] ^ flip[g].exists(cap[g].size() - 1)) : noise[g];
    assign rx_bit[1 - g] = air;
  end

  // ---------------- event counters ----------------
  int n_rx_done[2], n_commit[2], n_ack[2], n_nak[2], n_dup[2], n_fix[2];
  int n_hec_fail, n_crc_fail, n_pkt13, n_pkt23, n_retx, n_flow_stop, n_addr_skip, n_exact;
  always @(posedge clk) begin
    for (int g = 0; g < 2; g++) begin
      if (rx_done[g]) begin
        n_rx_done[g]++;
        if (!rx_hec_ok[g]) n_hec_fail++;
        else if (!rx_addr_ok[g]) n_addr_skip++;
        else if (!rx_crc_ok[g]) n_crc_fail++;
      end
      if (ev_commit[g]) n_commit[g]++;
      if (ev_ack[g])    n_ack[g]++;
      if (ev_nak[g])    n_nak[g]++;
      if (ev_dup[g])    n_dup[g]++;
      if (ev_fix[g])    n_fix[g]++;
    end
  end

  // ---------------- host-side tasks ----------------
  logic [31:0] exp_rx[2][$];   // messages each device should have received

  task automatic ticks(input int n);
    repeat (n * TICK) @(posedge clk);
  endtask

  task automatic write_msg(input int g, input logic [31:0] m);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      tx_wr[g] = 1'b1;
      tx_wdata[g] = m[8*b +: 8];
    end
    @(negedge clk);
    tx_wr[g] = 1'b0;
  endtask

  task automatic drain(input int g);
    logic [31:0] m;
    while (exp_rx[g].size() != 0) begin
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        check(!rx_empty[g], $sformatf("dev %0d rx buffer has byte %0d", g, b));
        m[8*b +: 8] = rx_rdata[g];
        rx_rd[g] = 1'b1;
        @(negedge clk);
        rx_rd[g] = 1'b0;
      end
      check(m == exp_rx[g][0], $sformatf("dev %0d rx message %h, expected %h", g, m, exp_rx[g][0]));
      void'(exp_rx[g].pop_front());
    end
    @(negedge clk);
    check(rx_empty[g], $sformatf("dev %0d rx buffer empty after drain", g));
  endtask

  // One packet from device g. hdr holds the header fields expected on air;
  // msg is the payload expected; exact asks for a bit-exact comparison.
  task automatic send(input int g, input logic [31:0] msg, input bit sq, input bit aq,
                      input bit fl, input bit exact, input string tag);
    int o = 1 - g;
    int n_prev = n_rx_done[o];
    int waited = 0;
    bit f23;
    bt_hdr_t h;
    bitq_t ref_pkt;
    if (unacked[g]) n_retx++;
    cap[g].delete();
    tx_req[g] = 1'b1;
    @(posedge tx_done[g]);
    @(negedge clk);
    tx_req[g] = 1'b0;
    f23 = fec23_for(tx_ptype[g]);
    if (f23) n_pkt23++; else n_pkt13++;
    check(cap[g].size() == (f23 ? 201 : 270),
          $sformatf("%s: packet length %0d", tag, cap[g].size()));
    check(last_cyc[g] - first_cyc[g] == longint'(TICK * (cap[g].size() - 1)),
          $sformatf("%s: one bit every %0d cycles", tag, TICK));
    h = '{seqn: sq, arqn: aq, flow: fl, ptype: tx_ptype[g], lt_addr: lt_addr[g]};
    ref_pkt = build_packet(SYNC, h, msg, UAP, WINIT, f23);
    if (exact) begin
      check(cap[g] == ref_pkt, $sformatf("%s: packet bits match reference", tag));
      if (cap[g] == ref_pkt) n_exact++;
    end else begin
      int diffs = 0;
      foreach (ref_pkt[i]) if (i < cap[g].size() && cap[g][i] != ref_pkt[i]) diffs++;
      check(diffs == 0, $sformatf("%s: sent bits (before channel errors) match reference", tag));
    end
    while (n_rx_done[o] == n_prev && waited < 300) begin
      ticks(1);
      waited++;
    end
    check(n_rx_done[o] == n_prev + 1, $sformatf("%s: receiver finished the packet", tag));
    flip[g].delete();
    ticks(2);
  endtask

  // Flip copy k (0..2) of repetition-coded bit n of the header (n < 18) or
  // payload (n >= 18) at rate 1/3.
  function automatic int pos13(input int n, input int k);
    return 72 + 3 * n + k;
  endfunction

  // ---------------- scenario ----------------
  localparam logic [3:0] PT13 = 4'h4;   // any type other than DM1: rate 1/3
  localparam logic [3:0] PT23 = PTYPE_DM1;
  logic [31:0] M[8], N[8];

  initial begin
    for (int g = 0; g < 2; g++) begin
      tx_wr[g] = 0; tx_req[g] = 0; rx_rd[g] = 0; rx_en[g] = 1; tx_wdata[g] = 0;
      lt_addr[g] = 3'd1; noise[g] = 0;
    end
    tx_ptype[0] = PT13;
    tx_ptype[1] = PT23;
    tick_d = 0;
    for (int i = 0; i < 8; i++) begin
      M[i] = $urandom;
      N[i] = $urandom;
    end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    ticks(100);

    // S1: A -> B, rate 1/3, clean
    write_msg(0, M[1]);
    send(0, M[1], 0, 0, 1, 1, "S1");
    exp_rx[1].push_back(M[1]);
    check(rx_msg[1] == M[1] && rx_crc_ok[1] && rx_hec_ok[1], "S1: B decoded the message");
    check(unacked[0], "S1: A waits for an acknowledgement");

    // S2: B -> A, rate 2/3, clean, acknowledges M1
    write_msg(1, N[1]);
    send(1, N[1], 0, 1, 1, 1, "S2");
    exp_rx[0].push_back(N[1]);
    check(n_ack[0] == 1 && !unacked[0], "S2: A got its ACK");
    check(rx_fec23[0], "S2: A decoded the payload at rate 2/3");
    drain(0);

    // S3: A -> B with one corrupted copy in 5 header and 10 payload bits
    write_msg(0, M[2]);
    for (int n = 0; n < 66; n += 5) flip[0][pos13(n, n % 3)] = 1;
    send(0, M[2], 1, 1, 1, 0, "S3");
    exp_rx[1].push_back(M[2]);
    check(rx_crc_ok[1] && rx_msg[1] == M[2], "S3: FEC 1/3 corrected all errors");

    // S4: B -> A, rate 2/3 with one error in every payload block
    write_msg(1, N[2]);
    for (int b = 0; b < 5; b++) flip[1][126 + 15 * b + 3 * b] = 1;
    send(1, N[2], 1, 1, 1, 0, "S4");
    exp_rx[0].push_back(N[2]);
    check(rx_crc_ok[0] && rx_msg[0] == N[2], "S4: FEC 2/3 corrected all errors");
    drain(0);

    // S5: A -> B, two copies of one payload bit corrupted: CRC fails
    write_msg(0, M[3]);
    flip[0][pos13(30, 0)] = 1;
    flip[0][pos13(30, 2)] = 1;
    send(0, M[3], 0, 1, 1, 0, "S5");
    check(rx_hec_ok[1] && !rx_crc_ok[1], "S5: B detected the payload error");

    // S6: B -> A carries NAK
    write_msg(1, N[3]);
    send(1, N[3], 0, 0, 1, 1, "S6");
    exp_rx[0].push_back(N[3]);
    check(n_nak[0] == 1 && unacked[0], "S6: A got a NAK");
    drain(0);

    // S7: A repeats M3 (nothing new written)
    send(0, M[3], 0, 1, 1, 1, "S7");
    exp_rx[1].push_back(M[3]);
    check(rx_msg[1] == M[3], "S7: retransmitted message received");

    // S8: B -> A with a header bit corrupted twice: HEC fails at A
    write_msg(1, N[4]);
    flip[1][pos13(4, 0)] = 1;
    flip[1][pos13(4, 1)] = 1;
    send(1, N[4], 1, 1, 1, 0, "S8");
    check(!rx_hec_ok[0], "S8: A rejected the header");

    // S9: A repeats M3 again (its ACK never arrived); B sees a duplicate
    send(0, M[3], 0, 0, 1, 1, "S9");
    check(n_dup[1] == 1, "S9: B flagged the duplicate");
    check(n_nak[1] == 1, "S9: B got a NAK for N4");

    // S10: B repeats N4
    send(1, N[4], 1, 1, 1, 1, "S10");
    exp_rx[0].push_back(N[4]);
    drain(0);

    // S11: A -> B fills B's receive buffer (M1..M4, 16 bytes)
    write_msg(0, M[4]);
    send(0, M[4], 1, 1, 1, 1, "S11");
    exp_rx[1].push_back(M[4]);

    // S12: B -> A says stop
    write_msg(1, N[5]);
    send(1, N[5], 0, 1, 0, 1, "S12");
    exp_rx[0].push_back(N[5]);
    check(!remote_go[0], "S12: A was told to stop");
    drain(0);

    // S13: A has data and a request but must wait
    write_msg(0, M[5]);
    tx_req[0] = 1'b1;
    ticks(400);
    check(state[0] != ST_TX_AC && !tx_on[0], "S13: A held back by flow control");
    if (!tx_on[0]) n_flow_stop++;
    tx_req[0] = 1'b0;
    ticks(2);
    drain(1);

    // S14: B repeats N5, now with FLOW = 1; A sees a duplicate
    send(1, N[5], 0, 1, 1, 1, "S14");
    check(remote_go[0], "S14: A may send again");
    check(n_dup[0] == 1, "S14: A flagged the duplicate");

    // S15: A sends M5
    send(0, M[5], 0, 1, 1, 1, "S15");
    exp_rx[1].push_back(M[5]);
    drain(1);

    // S16: M5 is still unacknowledged, so A repeats it, this time to another
    // active member address: B ignores it
    lt_addr[0] = 3'd2;
    send(0, M[5], 0, 1, 1, 1, "S16");
    check(!rx_addr_ok[1] && n_commit[1] == 5, "S16: B ignored a packet for another member");
    lt_addr[0] = 3'd1;

    // every mechanism must have happened
    check(n_pkt13 > 0,     "mechanism: rate 1/3 payload");
    check(n_pkt23 > 0,     "mechanism: rate 2/3 payload (mode switch)");
    check(n_fix[1] > 0,    "mechanism: FEC 1/3 correction");
    check(n_fix[0] > 0,    "mechanism: FEC 2/3 correction");
    check(n_crc_fail > 0,  "mechanism: CRC failure");
    check(n_hec_fail > 0,  "mechanism: HEC failure");
    check(n_ack[0] + n_ack[1] > 0, "mechanism: ACK");
    check(n_nak[0] + n_nak[1] > 0, "mechanism: NAK");
    check(n_retx > 0,      "mechanism: retransmission");
    check(n_dup[0] + n_dup[1] > 0, "mechanism: duplicate discarded");
    check(n_flow_stop > 0, "mechanism: flow stop");
    check(n_addr_skip > 0, "mechanism: address filter");
    check(n_exact > 0,     "mechanism: bit-exact packet");
    $display("packets: %0d at 1/3, %0d at 2/3, %0d bit-exact; fixes A=%0d B=%0d; retx=%0d",
             n_pkt13, n_pkt23, n_exact, n_fix[0], n_fix[1], n_retx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
