// bt_p2s: parallel-to-serial converter for the transmit payload.
//
// fetch pops one 32-bit message from the 8-bit transmit buffer, four bytes in
// four cycles, the first byte becoming the least significant. ready goes high
// when the message is held. start copies the held message into the shift
// register; each shift then moves to the next bit, least significant bit
// first (the order the document gives for the CRC). The held copy is kept, so
// a message can be sent again for a retransmission without refetching.
// The FIFO is read in first-word-fall-through style: rdata is valid while
// empty is low.
module bt_p2s
  import bt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                fetch,
  input  logic [7:0]          fifo_rdata,
  input  logic                fifo_empty,
  output logic                fifo_pop,
  output logic                ready,
  output logic [MSG_BITS-1:0] msg,
  input  logic                start,
  input  logic                shift,
  output logic                dout
);
  logic [MSG_BITS-1:0] sr;
  logic [2:0]          nbytes;   // bytes still to fetch
  logic [1:0]          bidx;

  assign fifo_pop = (nbytes != '0) && !fifo_empty;
  assign dout     = sr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msg    <= '0;
      sr     <= '0;
      nbytes <= '0;
      bidx   <= '0;
      ready  <= 1'b0;
    end else begin
      if (fetch) begin
        nbytes <= 3'(MSG_BYTES);
        bidx   <= '0;
        ready  <= 1'b0;
      end else if (fifo_pop) begin
        msg[8*bidx +: 8] <= fifo_rdata;
        bidx   <= bidx + 2'd1;
        nbytes <= nbytes - 3'd1;
        if (nbytes == 3'd1) ready <= 1'b1;
      end
      if (start)      sr <= msg;
      else if (shift) sr <= {1'b0, sr[MSG_BITS-1:1]};
    end
  end
endmodule
