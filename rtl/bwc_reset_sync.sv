// bwc_reset_sync: reset synchroniser, asynchronous assert, synchronous release.
//
// The converter has a single reset input, sclk_rst_n, for the sys_clk domain.
// This helper derives the pclk-domain reset from it: rst_n_o goes low at once
// when rst_n_i goes low and goes high on the second clk rising edge after
// rst_n_i has gone high. Deriving the pclk reset this way is a choice of this
// design; the interface only defines the sys_clk reset.
`timescale 1ns / 1ps
module bwc_reset_sync (
  input  logic clk,
  input  logic rst_n_i,
  output logic rst_n_o
);

  logic stage;

  always_ff @(posedge clk or negedge rst_n_i) begin
    if (!rst_n_i) begin
      stage   <= 1'b0;
      rst_n_o <= 1'b0;
    end else begin
      stage   <= 1'b1;
      rst_n_o <= stage;
    end
  end

endmodule
