// bt_ac_gen: access code generator and inserter.
//
// Builds the 72-bit access code from the 64-bit sync word and shifts it out
// ahead of the header. The sync word is sent most significant bit first. The
// 4-bit preamble and 4-bit trailer alternate 0/1 and continue the pattern
// into and out of the sync word, as the document gives them: preamble 0101 if
// the first sync bit is 0 and 1010 if it is 1; trailer 0101 after a last sync
// bit of 1 and 1010 after a 0 (bits listed in transmission order). Deriving
// the sync word from the device address is not described and is left to the
// host: the sync word is an input.
// Ports: access_code is the complete code (bit 71 sent first). load copies it
// into the shift register; each cycle with en high moves to the next bit.
// dout is the current bit.
module bt_ac_gen
  import bt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [SYNC_BITS-1:0] sync_word,
  input  logic                 load,
  input  logic                 en,
  output logic [AC_BITS-1:0]   access_code,
  output logic                 dout
);
  logic [PRE_BITS-1:0] preamble, trailer;
  logic [AC_BITS-1:0]  sr;

  assign preamble    = sync_word[SYNC_BITS-1] ? 4'b1010 : 4'b0101;
  assign trailer     = sync_word[0]           ? 4'b0101 : 4'b1010;
  assign access_code = {preamble, sync_word, trailer};
  assign dout        = sr[AC_BITS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= '0;
    else if (load) sr <= access_code;
    else if (en)   sr <= {sr[AC_BITS-2:0], 1'b0};
  end
endmodule
