// bt_fec23_dec: rate 2/3 forward error correction decoder.
//
// Receives 15-bit blocks of the (15,10) shortened Hamming code made by
// bt_fec23_enc. While the bits arrive a 5-bit LFSR (same g(D)) forms the
// syndrome. After the 15th bit a zero syndrome means no error; a syndrome
// equal to that of a single error at position j flips that bit; any other
// syndrome is flagged as uncorrectable (the code detects all double errors).
// The syndrome of a single error in the j-th received bit is D^(19-j) mod
// g(D); the table is computed by a constant function. The syndrome decoding is
// this design's choice; the document gives only the code.
// Ports: a bit is taken when en and in_valid are both high. After each block
// the 10 corrected data bits leave one per en cycle: dvalid pulses the cycle
// after each such en with the bit on dout (first received first). corrected
// and uncorrectable pulse once per block. The output drains even after the
// input has ended, so en must keep running.
module bt_fec23_dec
  import bt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic in_valid,
  input  logic din,
  output logic dout,
  output logic dvalid,
  output logic corrected,
  output logic uncorrectable
);
  function automatic logic [4:0] mul_d(input logic [4:0] p);
    return {p[3:0], 1'b0} ^ (p[4] ? H23_POLY : 5'd0);
  endfunction

  // Syndrome of an error in received bit j (j = 0 is the first bit).
  function automatic logic [4:0] syn_of(input int j);
    logic [4:0] p;
    p = 5'd1;
    for (int k = 0; k < 19 - j; k++) p = mul_d(p);
    return p;
  endfunction

  logic [3:0]  icnt;
  logic [13:0] sr;
  logic [4:0]  s, s_next;
  logic [14:0] cw, cw_fix;
  logic        hit;
  logic [9:0]  obuf;
  logic [3:0]  ocnt;
  logic        take_in;

  assign take_in = en && in_valid;
  assign s_next  = {s[3:0], 1'b0} ^ ((din ^ s[4]) ? H23_POLY : 5'd0);
  assign cw      = {sr, din};

  always_comb begin
    cw_fix = cw;
    hit    = 1'b0;
    for (int j = 0; j < 15; j++) begin
      if (s_next == syn_of(j)) begin
        cw_fix[14-j] = ~cw[14-j];
        hit          = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt          <= '0;
      sr            <= '0;
      s             <= '0;
      obuf          <= '0;
      ocnt          <= '0;
      dout          <= 1'b0;
      dvalid        <= 1'b0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      dvalid        <= 1'b0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
      if (clr) begin
        icnt <= '0;
        s    <= '0;
        ocnt <= '0;
      end else begin
        if (en && ocnt != '0) begin
          dout   <= obuf[9];
          obuf   <= {obuf[8:0], 1'b0};
          ocnt   <= ocnt - 4'd1;
          dvalid <= 1'b1;
        end
        if (take_in) begin
          if (icnt == 4'd14) begin
            icnt          <= '0;
            s             <= '0;
            obuf          <= cw_fix[14:5];
            ocnt          <= 4'd10;
            corrected     <= (s_next != '0) && hit;
            uncorrectable <= (s_next != '0) && !hit;
          end else begin
            icnt <= icnt + 4'd1;
            sr   <= {sr[12:0], din};
            s    <= s_next;
          end
        end
      end
    end
  end
endmodule
