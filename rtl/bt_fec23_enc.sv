// bt_fec23_enc: rate 2/3 forward error correction encoder.
//
// A (15,10) shortened Hamming code: every 10 input bits are sent unchanged and
// followed by 5 parity bits, as the document describes. The parity is the
// remainder of division by g(D) = D5 + D4 + D2 + 1, the generator the
// Bluetooth specification uses (the document does not print it), computed by
// a 5-bit Galois LFSR while the data bits pass. Padding the payload to a
// multiple of 10 bits is left to the source, which feeds zeros.
// Ports: en is the bit-rate enable. take is high in the 10 data periods of
// each 15-bit block (the source advances on it); dout is combinational.
// clr restarts a block.
module bt_fec23_enc
  import bt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic din,
  output logic dout,
  output logic take
);
  logic [3:0] cnt;
  logic [4:0] r;
  logic       data_phase, fb;

  assign data_phase = (cnt < 4'd10);
  assign take       = en && data_phase;
  assign dout       = data_phase ? din : r[4];
  assign fb         = data_phase ? (din ^ r[4]) : 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      r   <= '0;
    end else if (clr) begin
      cnt <= '0;
      r   <= '0;
    end else if (en) begin
      r   <= {r[3:0], 1'b0} ^ (fb ? H23_POLY : '0);
      cnt <= (cnt == 4'd14) ? '0 : cnt + 4'd1;
    end
  end
endmodule
