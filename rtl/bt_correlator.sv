// bt_correlator: access code correlator.
//
// Slides a 64-bit window over the received bit stream and compares it with
// the match pattern (the expected sync word, first bit in window bit 63).
// When the window holds the pattern the packet is addressed to this piconet
// and found triggers the start of packet, as the document describes. MAX_ERR
// allows that many differing bits; the document asks for a match, so the
// default is 0 (exact). The window must have been filled with 64 bits since
// clr before a match counts.
// Timing: found is combinational and high in the same cycle as the en that
// shifts in the last sync bit, so the controller can act on the next bit.
module bt_correlator
  import bt_pkg::*;
#(
  parameter int unsigned MAX_ERR = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 en,
  input  logic                 din,
  input  logic [SYNC_BITS-1:0] pattern,
  output logic                 found
);
  logic [SYNC_BITS-1:0] win, win_next, diff;
  logic [6:0]           filled;
  logic [6:0]           mism;

  assign win_next = {win[SYNC_BITS-2:0], din};
  assign diff     = win_next ^ pattern;

  always_comb begin
    mism = '0;
    for (int i = 0; i < SYNC_BITS; i++) mism += 7'(diff[i]);
  end

  assign found = en && (filled >= 7'(SYNC_BITS - 1)) && (mism <= 7'(MAX_ERR));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win    <= '0;
      filled <= '0;
    end else if (clr) begin
      win    <= '0;
      filled <= '0;
    end else if (en) begin
      win <= win_next;
      if (filled < 7'(SYNC_BITS)) filled <= filled + 7'd1;
    end
  end
endmodule
