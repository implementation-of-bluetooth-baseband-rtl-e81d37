// tb_bt_ref_pkg: reference model for the testbenches.
//
// Computes every step of the Bluetooth packet independently of the RTL, by
// polynomial long division on whole bit vectors instead of shift registers:
//   HEC  = (I * D^10 + sum m_i D^(17-i)) mod (D8+D7+D5+D2+D+1), sent B7 first
//   CRC  = (I * D^32 + sum m_i D^(47-i)) mod (D16+D12+D5+1), sent bit 15 first
//   whitening bit n = coefficient of D^6 in ({1,init} * D^n) mod (D7+D4+1)
//   (15,10) parity = (sum d_i D^(14-i)) mod (D5+D4+D2+1), sent bit 4 first
// where m_i / d_i is the i-th bit sent. build_packet() strings them together
// into the bits a transmitter must send, first bit first.
package tb_bt_ref_pkg;
  typedef bit bitq_t[$];

  // a mod g, with g of degree gd (g includes its leading term).
  function automatic logic [15:0] poly_mod(input logic [127:0] a,
                                           input logic [16:0] g, input int gd);
    for (int k = 127; k >= gd; k--)
      if (a[k]) a = a ^ ({111'd0, g} << (k - gd));
    return a[15:0];
  endfunction

  function automatic logic [7:0] hec_ref(input logic [7:0] init, input logic [9:0] info);
    logic [127:0] a;
    a = 128'(init) << 10;
    for (int i = 0; i < 10; i++) a[17 - i] = a[17 - i] ^ info[i];
    return 8'(poly_mod(a, 17'h1A7, 8));
  endfunction

  function automatic logic [15:0] crc_ref(input logic [15:0] init, input logic [31:0] msg);
    logic [127:0] a;
    a = 128'(init) << 32;
    for (int i = 0; i < 32; i++) a[47 - i] = a[47 - i] ^ msg[i];
    return poly_mod(a, 17'h11021, 16);
  endfunction

  function automatic bit wht_ref(input logic [5:0] init, input int n);
    logic [127:0] a;
    logic [15:0]  r;
    a = 128'({1'b1, init}) << n;
    r = poly_mod(a, 17'h091, 7);
    return r[6];
  endfunction

  function automatic logic [4:0] h23_ref(input logic [9:0] d);
    logic [127:0] a;
    a = '0;
    for (int i = 0; i < 10; i++) a[14 - i] = d[i];
    return 5'(poly_mod(a, 17'h035, 5));
  endfunction

  function automatic logic [71:0] ac_ref(input logic [63:0] sync);
    logic [71:0] ac;
    ac[67:4] = sync;
    for (int i = 0; i < 4; i++) ac[71 - i] = sync[63] ^ ((4 - i) % 2 == 1);
    for (int j = 0; j < 4; j++) ac[3 - j]  = sync[0] ^ ((j + 1) % 2 == 1);
    return ac;
  endfunction

  // hdr10: bit i is the i-th header bit sent (lt_addr[0] first).
  function automatic bitq_t build_packet(input logic [63:0] sync, input logic [9:0] hdr10,
                                         input logic [31:0] msg, input logic [7:0] uap,
                                         input logic [5:0] wi, input bit fec23);
    bitq_t pkt, raw;
    logic [71:0] ac;
    logic [7:0]  hec;
    logic [15:0] crc;
    logic [9:0]  blk;
    ac  = ac_ref(sync);
    hec = hec_ref(uap, hdr10);
    crc = crc_ref({8'h00, uap}, msg);
    for (int i = 71; i >= 0; i--) pkt.push_back(ac[i]);
    for (int i = 0; i < 10; i++) raw.push_back(hdr10[i]);
    for (int i = 7; i >= 0; i--) raw.push_back(hec[i]);
    for (int i = 0; i < 32; i++) raw.push_back(msg[i]);
    for (int i = 15; i >= 0; i--) raw.push_back(crc[i]);
    foreach (raw[n]) raw[n] = raw[n] ^ wht_ref(wi, n);
    for (int n = 0; n < 18; n++) repeat (3) pkt.push_back(raw[n]);
    if (!fec23) begin
      for (int n = 18; n < 66; n++) repeat (3) pkt.push_back(raw[n]);
    end else begin
      raw.push_back(1'b0);
      raw.push_back(1'b0);
      for (int b = 0; b < 5; b++) begin
        logic [4:0] p;
        for (int i = 0; i < 10; i++) blk[i] = raw[18 + 10*b + i];
        p = h23_ref(blk);
        for (int i = 0; i < 10; i++) pkt.push_back(blk[i]);
        for (int i = 4; i >= 0; i--) pkt.push_back(p[i]);
      end
    end
    return pkt;
  endfunction
endpackage
