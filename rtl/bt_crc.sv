// bt_crc: Cyclic Redundancy Check generator and checker (CRC core).
//
// A 16-bit LFSR dividing by the document's generator polynomial
// g(D) = D16 + D12 + D5 + 1 (Galois form). The payload message enters least
// significant bit first, as the document describes. Operation (the states of
// the CRC state diagram: idle/load, shift data, shift CRC out or check):
//   generate: load init, shift the 32 message bits in with gen_out low, then
//             raise gen_out for 16 shifts: dout carries the CRC, MSB first.
//   check:    load init and shift all 48 received payload bits in; zero is
//             high afterwards if the payload is intact.
// The initial value is an input; the document does not state it.
// Timing: one shift per cycle in which en is high; dout is combinational.
module bt_crc
  import bt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [CRC_BITS-1:0] init,
  input  logic                en,
  input  logic                gen_out,
  input  logic                din,
  output logic                dout,
  output logic [CRC_BITS-1:0] rem,
  output logic                zero
);
  logic d_eff, fb;

  assign d_eff = gen_out ? rem[CRC_BITS-1] : din;
  assign fb    = d_eff ^ rem[CRC_BITS-1];
  assign dout  = d_eff;
  assign zero  = (rem == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rem <= '0;
    else if (load) rem <= init;
    else if (en)   rem <= {rem[CRC_BITS-2:0], 1'b0} ^ (fb ? CRC_POLY : '0);
  end
endmodule
