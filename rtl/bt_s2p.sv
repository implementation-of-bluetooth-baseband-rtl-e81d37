// bt_s2p: serial-to-parallel converter for the received payload.
//
// Each shift takes one decoded message bit, least significant bit first, so
// after 32 shifts word holds the message. commit then writes it into the
// 8-bit receive buffer, least significant byte first, one byte per cycle;
// busy is high while it does. The commit comes from the flow control once the
// CRC has passed, so a corrupted or duplicate payload never reaches the
// buffer.
module bt_s2p
  import bt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift,
  input  logic                din,
  input  logic                commit,
  output logic [MSG_BITS-1:0] word,
  output logic                fifo_push,
  output logic [7:0]          fifo_wdata,
  output logic                busy
);
  logic [MSG_BITS-1:0] obuf;
  logic [2:0]          left;

  assign busy       = (left != '0);
  assign fifo_push  = busy;
  assign fifo_wdata = obuf[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= '0;
      obuf <= '0;
      left <= '0;
    end else begin
      if (shift) word <= {din, word[MSG_BITS-1:1]};
      if (commit) begin
        obuf <= word;
        left <= 3'(MSG_BYTES);
      end else if (busy) begin
        obuf <= {8'h00, obuf[MSG_BITS-1:8]};
        left <= left - 3'd1;
      end
    end
  end
endmodule
