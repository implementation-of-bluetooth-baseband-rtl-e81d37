// bt_whiten: data whitening (scrambler / descrambler).
//
// Header and payload are XORed with a pseudo-random sequence so that the
// transmitted stream has no long runs, which keeps the radio free of DC bias.
// The same block descrambles on the receive side, because XOR with the same
// sequence is its own inverse. The document names the block and its purpose;
// the sequence generator is the Bluetooth specification's: a 7-bit LFSR with
// g(D) = D7 + D4 + 1, loaded with {1, init[5:0]} (the specification uses
// master clock bits there; here init is a plain input).
// Ports: dout = din ^ w where w is the register's top bit; each cycle with en
// high advances the sequence by one. load takes priority over en.
module bt_whiten
  import bt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [5:0] init,
  input  logic       en,
  input  logic       din,
  output logic       dout
);
  logic [6:0] x;

  assign dout = din ^ x[6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    x <= 7'h7F;
    else if (load) x <= {1'b1, init};
    else if (en)   x <= {x[5:0], 1'b0} ^ (x[6] ? WHT_POLY : '0);
  end
endmodule
