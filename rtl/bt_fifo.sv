// bt_fifo: 8-bit wide data buffer, used as the transmit and the receive buffer.
//
// First-word-fall-through FIFO: rdata shows the oldest byte whenever empty is
// low; pop removes it. push writes wdata unless the FIFO is full (a push when
// full is dropped), pop when empty is ignored. count gives the fill level, so
// the controller can tell whether a whole 4-byte message is present and the
// flow control whether there is room for one. The 8-bit width follows the
// document; the depth of 16 bytes is this design's choice.
module bt_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + {{($clog2(DEPTH+1)-1){1'b0}}, do_push} - {{($clog2(DEPTH+1)-1){1'b0}}, do_pop};
    end
  end
endmodule
