// bwc_pclk_capture: pclk half of the PCIe 4.0 transmit bit width converter.
//
// The packer in the sys_clk domain holds every finished internal word, with a
// toggle that flips once per word, for at least one pclk period. This module
// samples that level-extended word on every pclk rising edge into a capture
// register that has no logic in front of it, then compares the captured
// toggle with the one of the previous cycle. A change means a new word: it is
// registered onto data_2ififo with tx_datavalid_mac high and
// txstartblock_mac copied from the word. In a cycle without a new word
// tx_datavalid_mac and txstartblock_mac are low and data_2ififo keeps its
// value. bus_width_pclk gives the BusWidth the current word was packed under.
// ss_mode_sync is high once a word of the current BusWidth (bus_width_sync,
// the MAC's select brought to pclk by a two-flop synchroniser) has come
// through; it is low after reset, after BusWidth changes until the first word
// of the new width arrives, and for the reserved code.
//
// Timing: a word loaded into the hold register at a sys_clk edge is captured
// on the first pclk edge strictly after it and is on the outputs after the
// next pclk edge, so latency is one to two pclk cycles plus one. The direct
// sampling of the multi-bit word relies on sys_clk and pclk coming from one
// source, with a pclk rising edge on every first, second or fourth sys_clk
// rising edge, as in a PHY whose clocks share a PLL; it is not a crossing for
// unrelated clocks.
//
// From the converter's description: the output names and meanings, the
// single register stage ("beat") for the equal-width case and the level
// extension. Choices of this design: the toggle detection, the extra output
// stage, and reading ss_mode_sync as a mode-lock flag.
`timescale 1ns / 1ps
module bwc_pclk_capture
  import bwc_pkg::*;
#(
  parameter int unsigned INT_W = 32
) (
  input  logic             pclk,
  input  logic             prst_n,
  input  logic [INT_W-1:0] hold_data,
  input  xflags_t          hold_flags,
  input  bus_width_e       bus_width_sync,
  output logic [INT_W-1:0] data_2ififo,
  output logic             txstartblock_mac,
  output logic             tx_datavalid_mac,
  output logic             ss_mode_sync,
  output bus_width_e       bus_width_pclk
);

  logic [INT_W-1:0] cap_data;
  xflags_t          cap_flags;
  logic             last_tgl;
  logic             got_word;

  logic             new_word;
  logic             got_word_d;
  bus_width_e       mode_d;

  always_comb begin
    new_word   = (cap_flags.tgl != last_tgl);
    got_word_d = got_word || new_word;
    mode_d     = new_word ? cap_flags.mode : bus_width_pclk;
  end

  always_ff @(posedge pclk or negedge prst_n) begin
    if (!prst_n) begin
      cap_data         <= '0;
      cap_flags        <= '{tgl: 1'b0, startblock: 1'b0, mode: BW_FULL};
      last_tgl         <= 1'b0;
      got_word         <= 1'b0;
      data_2ififo      <= '0;
      txstartblock_mac <= 1'b0;
      tx_datavalid_mac <= 1'b0;
      ss_mode_sync     <= 1'b0;
      bus_width_pclk   <= BW_FULL;
    end else begin
      cap_data  <= hold_data;
      cap_flags <= hold_flags;
      last_tgl  <= cap_flags.tgl;
      got_word  <= got_word_d;
      bus_width_pclk   <= mode_d;
      tx_datavalid_mac <= new_word;
      txstartblock_mac <= new_word && cap_flags.startblock;
      if (new_word) data_2ififo <= cap_data;
      ss_mode_sync <= got_word_d && (bus_width_sync == mode_d) && (bus_width_sync != BW_RSVD);
    end
  end

  // a block start is only ever signalled together with valid data
  a_sb_with_valid : assert property (@(posedge pclk) disable iff (!prst_n)
    txstartblock_mac |-> tx_datavalid_mac);

endmodule
