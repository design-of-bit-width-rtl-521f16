// bwc_width_packer: sys_clk half of the PCIe 4.0 transmit bit width converter.
//
// The MAC delivers data in beats of INT_W, INT_W/2 or INT_W/4 bits (32, 16 or
// 8 bits by default), chosen by bus_width (00, 01, 10; 11 is reserved). The
// packer places the beats side by side into one INT_W-bit internal word, first
// beat in the least significant bits, so that one, two or four beats make a
// word. A beat with tx_datavalid low carries nothing and is skipped: the word
// is then finished one sys_clk later, and because sys_clk runs exactly one,
// two or four times as fast as pclk, the pclk side sees one cycle without a new
// word. This is how the MAC's DataValid gaps (which absorb the 2-bit sync
// headers of 128b/130b blocks) reappear on the internal channel only when the
// gaps add up to a whole internal word.
//
// A beat with tx_startblock high always starts a new word in lane 0; the block
// start flag is kept with the word until it is finished. A change of bus_width
// restarts packing at lane 0, and the reserved code packs nothing.
//
// Every finished word is loaded into the hold register together with its
// flags (bwc_pkg::xflags_t) and a toggle that flips once per word. The hold
// register changes at most once every beats_per_word sys_clk cycles, so each
// value stays for at least one pclk period: this is the level extension that
// lets the slower pclk domain see every word exactly once.
//
// Timing: the word whose last beat is sampled on a sys_clk rising edge appears
// on hold_data/hold_flags right after that edge. Reset is asynchronous, active
// low, and clears the accumulator and the hold register.
//
// From the converter's description: the three widths and their codes, the
// 32-bit internal width, packing two or four beats per word, DataValid and
// StartBlock handling and level extension across the clock domains. Choices of
// this design: byte order, lane-0 alignment on a block start, dropping a
// partial word on a width change, and the toggle that marks new words.
`timescale 1ns / 1ps
module bwc_width_packer
  import bwc_pkg::*;
#(
  parameter int unsigned INT_W = 32
) (
  input  logic             sys_clk,
  input  logic             sclk_rst_n,
  input  bus_width_e       bus_width,
  input  logic [INT_W-1:0] tx_data,
  input  logic             tx_datavalid,
  input  logic             tx_startblock,
  output logic [INT_W-1:0] hold_data,
  output xflags_t          hold_flags
);

  localparam int unsigned HW = INT_W / 2;  // half-width beat
  localparam int unsigned QW = INT_W / 4;  // quarter-width beat

  logic [INT_W-1:0] acc;       // lanes gathered so far
  logic             acc_sb;    // block start seen in this word
  logic [1:0]       cnt;       // next lane to fill
  bus_width_e       bw_q;      // bus_width of the previous cycle

  logic             bw_change;
  logic [1:0]       lane;
  logic [1:0]       last_lane;
  logic             beat_ok;
  logic [INT_W-1:0] merged;
  logic             sb_next;

  always_comb begin
    bw_change = (bus_width != bw_q);
    beat_ok   = tx_datavalid && (bus_width != BW_RSVD);
    last_lane = 2'(beats_per_word(bus_width) - 1);
    if (tx_startblock || bw_change) lane = 2'd0;
    else                            lane = cnt;

    // a word that starts in lane 0 starts from a clean accumulator
    merged = (lane == 2'd0) ? '0 : acc;
    case (bus_width)
      BW_HALF: begin
        if (lane[0]) merged[HW +: HW] = tx_data[HW-1:0];
        else         merged[0  +: HW] = tx_data[HW-1:0];
      end
      BW_QUARTER: begin
        case (lane)
          2'd0:    merged[0    +: QW] = tx_data[QW-1:0];
          2'd1:    merged[QW   +: QW] = tx_data[QW-1:0];
          2'd2:    merged[2*QW +: QW] = tx_data[QW-1:0];
          default: merged[3*QW +: QW] = tx_data[QW-1:0];
        endcase
      end
      default: merged = tx_data;
    endcase

    sb_next = (lane == 2'd0) ? tx_startblock : acc_sb;
  end

  always_ff @(posedge sys_clk or negedge sclk_rst_n) begin
    if (!sclk_rst_n) begin
      acc        <= '0;
      acc_sb     <= 1'b0;
      cnt        <= 2'd0;
      bw_q       <= BW_FULL;
      hold_data  <= '0;
      hold_flags <= '{tgl: 1'b0, startblock: 1'b0, mode: BW_FULL};
    end else begin
      bw_q <= bus_width;
      if (beat_ok) begin
        if (lane == last_lane) begin
          hold_data  <= merged;
          hold_flags <= '{tgl: ~hold_flags.tgl, startblock: sb_next, mode: bus_width};
          cnt        <= 2'd0;
          acc_sb     <= 1'b0;
        end else begin
          acc    <= merged;
          acc_sb <= sb_next;
          cnt    <= lane + 2'd1;
        end
      end else if (bw_change) begin
        cnt    <= 2'd0;
        acc_sb <= 1'b0;
      end
    end
  end

  // the lane counter never runs past the last lane of the current width
  a_cnt_in_range : assert property (@(posedge sys_clk) disable iff (!sclk_rst_n)
    (bus_width == bw_q) && (bus_width != BW_RSVD) |-> (cnt <= last_lane));

endmodule
