// bt_hec: Header Error Check generator and checker (HEC core).
//
// An 8-bit linear-feedback shift register B7..B0 dividing by the document's
// generator polynomial g(D) = D8 + D7 + D5 + D2 + D + 1 (Galois form, the
// incoming bit is added to B7 before it is fed back). One block serves both
// directions:
//   generate: load the initial value, shift the 10 header information bits in
//             with gen_out low, then raise gen_out for 8 more shifts: dout
//             then carries the HEC, B7 first, and the register empties.
//   check:    load the same initial value and shift all 18 received header
//             bits in; zero is high afterwards if the header is intact.
// The initial value is an input (the Bluetooth specification loads the upper
// address part, UAP); the document does not state it.
// Timing: one shift per cycle in which en is high; dout is combinational.
module bt_hec
  import bt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,     // load init (takes priority over en)
  input  logic [HEC_BITS-1:0] init,
  input  logic                en,       // shift one bit
  input  logic                gen_out,  // shift the remainder out instead of din
  input  logic                din,
  output logic                dout,
  output logic [HEC_BITS-1:0] rem,
  output logic                zero
);
  logic d_eff, fb;

  assign d_eff = gen_out ? rem[HEC_BITS-1] : din;
  assign fb    = d_eff ^ rem[HEC_BITS-1];
  assign dout  = d_eff;
  assign zero  = (rem == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rem <= '0;
    else if (load) rem <= init;
    else if (en)   rem <= {rem[HEC_BITS-2:0], 1'b0} ^ (fb ? HEC_POLY : '0);
  end
endmodule
