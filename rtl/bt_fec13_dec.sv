// bt_fec13_dec: rate 1/3 forward error correction decoder.
//
// Collects the three received copies of each bit and outputs their majority,
// so any single corrupted copy is corrected. This is the inverse of
// bt_fec13_enc; the document gives the encoding, majority voting is this
// design's (the simplest) decoding rule.
// Ports: a received bit is taken in each cycle with en high. One cycle after
// the third copy, dvalid pulses with the decoded bit on dout, and corrected
// pulses with it if the three copies disagreed. clr restarts the grouping.
module bt_fec13_dec (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic din,
  output logic dout,
  output logic dvalid,
  output logic corrected
);
  logic [1:0] cnt;
  logic       b0, b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= 2'd0;
      b0        <= 1'b0;
      b1        <= 1'b0;
      dout      <= 1'b0;
      dvalid    <= 1'b0;
      corrected <= 1'b0;
    end else begin
      dvalid    <= 1'b0;
      corrected <= 1'b0;
      if (clr) begin
        cnt <= 2'd0;
      end else if (en) begin
        case (cnt)
          2'd0: b0 <= din;
          2'd1: b1 <= din;
          default: begin
            dout      <= (b0 & b1) | (b0 & din) | (b1 & din);
            dvalid    <= 1'b1;
            corrected <= !((b0 == b1) && (b1 == din));
          end
        endcase
        cnt <= (cnt == 2'd2) ? 2'd0 : cnt + 2'd1;
      end
    end
  end
endmodule
