// bit_width_converter: transmit bit width converter of a PCIe 4.0 PHY.
//
// The MAC hands the PHY parallel data on sys_clk in beats of 32, 16 or 8 bits
// (BusWidth 00, 01, 10). Inside the PHY the data channel is always INT_W = 32
// bits wide on pclk. At PCIe 4.0 rates pclk is 500 MHz and sys_clk is 500 MHz,
// 1 GHz or 2 GHz, so the converter packs one, two or four beats into each
// internal word and moves it from the fast clock to the slow one:
//
//   bwc_width_packer  (sys_clk)  packs beats, skips beats with tx_datavalid
//                                low, aligns block starts to lane 0, and holds
//                                each word for at least one pclk period
//   bwc_pclk_capture  (pclk)     samples the held word, detects new words by a
//                                toggle and drives the outputs
//   bwc_reset_sync               pclk reset from sclk_rst_n
//   bwc_sync_2ff                 BusWidth into the pclk domain
//
// Interface: MAC side tx_data (low INT_W/1, /2 or /4 bits used), tx_datavalid,
// tx_startblock and bus_width on sys_clk; internal side data_2ififo,
// tx_datavalid_mac, txstartblock_mac, ss_mode_sync and bus_width_pclk on pclk.
// The only reset input is sclk_rst_n (active low).
//
// Timing: a word is on data_2ififo two pclk cycles after the pclk edge that
// follows the sys_clk edge sampling its last beat (see bwc_pclk_capture). The
// two clocks must come from one source with pclk edges aligned to every first,
// second or fourth sys_clk edge. With INT_W = 64 the same circuit takes 64-,
// 32- and 16-bit beats, the wider internal channel foreseen as an extension.
`timescale 1ns / 1ps
module bit_width_converter
  import bwc_pkg::*;
#(
  parameter int unsigned INT_W = 32
) (
  input  logic             sys_clk,
  input  logic             sclk_rst_n,
  input  logic             pclk,
  input  logic [1:0]       bus_width,
  input  logic [INT_W-1:0] tx_data,
  input  logic             tx_datavalid,
  input  logic             tx_startblock,
  output logic             ss_mode_sync,
  output logic [INT_W-1:0] data_2ififo,
  output logic             txstartblock_mac,
  output logic             tx_datavalid_mac,
  output logic [1:0]       bus_width_pclk
);

  logic [INT_W-1:0] hold_data;
  xflags_t          hold_flags;
  logic             prst_n;
  logic [1:0]       bw_sync;
  bus_width_e       bw_pclk;

  bwc_width_packer #(.INT_W(INT_W)) u_packer (
    .sys_clk      (sys_clk),
    .sclk_rst_n   (sclk_rst_n),
    .bus_width    (bus_width_e'(bus_width)),
    .tx_data      (tx_data),
    .tx_datavalid (tx_datavalid),
    .tx_startblock(tx_startblock),
    .hold_data    (hold_data),
    .hold_flags   (hold_flags)
  );

  bwc_reset_sync u_prst (
    .clk    (pclk),
    .rst_n_i(sclk_rst_n),
    .rst_n_o(prst_n)
  );

  bwc_sync_2ff #(.W(2)) u_bw_sync (
    .clk  (pclk),
    .rst_n(prst_n),
    .d    (bus_width),
    .q    (bw_sync)
  );

  bwc_pclk_capture #(.INT_W(INT_W)) u_capture (
    .pclk            (pclk),
    .prst_n          (prst_n),
    .hold_data       (hold_data),
    .hold_flags      (hold_flags),
    .bus_width_sync  (bus_width_e'(bw_sync)),
    .data_2ififo     (data_2ififo),
    .txstartblock_mac(txstartblock_mac),
    .tx_datavalid_mac(tx_datavalid_mac),
    .ss_mode_sync    (ss_mode_sync),
    .bus_width_pclk  (bw_pclk)
  );

  assign bus_width_pclk = bw_pclk;

endmodule
