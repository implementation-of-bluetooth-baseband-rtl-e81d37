// bt_fec13_enc: rate 1/3 forward error correction encoder.
//
// Every input bit is sent three times in a row, as the document describes for
// the header and (in its main configuration) the payload. The encoder pulls
// its input: in the first of the three bit periods take is high, dout shows
// din directly and the bit is stored; the next two periods repeat the stored
// copy. The upstream source advances on take.
// Ports: en is the bit-rate enable; clr returns the encoder to the first
// repetition; take and dout are combinational.
module bt_fec13_enc (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic din,
  output logic dout,
  output logic take
);
  logic [1:0] rep;
  logic       hold;

  assign take = en && (rep == 2'd0);
  assign dout = (rep == 2'd0) ? din : hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep  <= 2'd0;
      hold <= 1'b0;
    end else if (clr) begin
      rep  <= 2'd0;
    end else if (en) begin
      if (rep == 2'd0) hold <= din;
      rep <= (rep == 2'd2) ? 2'd0 : rep + 2'd1;
    end
  end
endmodule
