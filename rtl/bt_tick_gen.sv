// bt_tick_gen: bit-rate enable generator (clock management).
//
// The data path runs on the system clock but only advances on a one-cycle
// enable pulse at the Bluetooth bit rate of 1 Mbit/s, as the document
// describes ("1 MHz clock acts as a switch to enable for data processing").
// DIV is the number of system clock cycles per bit: 16 assumes a 16 MHz
// system clock, which the document does not state. A DIV of 1 gives a tick
// on every cycle.
//
// Ports: tick is high for one cycle every DIV cycles; the first tick comes
// DIV cycles after reset is released.
module bt_tick_gen #(
  parameter int unsigned DIV = 16
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
