// bwc_sync_2ff: two-flop synchroniser for a quasi-static multi-bit level.
//
// Used to bring BusWidth, which the MAC only changes while the link is idle,
// into the pclk domain. Every bit passes through two flops clocked by clk; the
// output follows the input two to three clk cycles later. Reset (active low,
// asynchronous) clears both stages. This helper is a choice of this design: the
// converter's description only asks that BusWidth be synchronised together with
// the data.
`timescale 1ns / 1ps
module bwc_sync_2ff #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
