// bwc_pkg: types and helpers shared by the PCIe 4.0 transmit bit width converter.
//
// bus_width_e encodes the MAC's BusWidth[1:0] select: 00 = full internal width
// (32 bits by default), 01 = half width (16 bits), 10 = quarter width (8 bits),
// 11 = reserved. The encoding is the one of the MAC/PHY interface the converter
// was designed for.
//
// xflags_t is the control part of the word that crosses from sys_clk to pclk:
// a toggle that flips once per finished word, the block-start flag of that word
// and the BusWidth it was packed under. The data part travels beside it with a
// width set by the modules' INT_W parameter.
`timescale 1ns / 1ps
package bwc_pkg;

  typedef enum logic [1:0] {
    BW_FULL    = 2'b00,
    BW_HALF    = 2'b01,
    BW_QUARTER = 2'b10,
    BW_RSVD    = 2'b11
  } bus_width_e;

  typedef struct packed {
    logic       tgl;         // flips on every new word
    logic       startblock;  // word starts a 128b/130b block
    bus_width_e mode;        // BusWidth the word was packed under
  } xflags_t;

  // Input beats that make up one internal word; 0 for the reserved code.
  function automatic int unsigned beats_per_word(bus_width_e bw);
    case (bw)
      BW_FULL:    return 1;
      BW_HALF:    return 2;
      BW_QUARTER: return 4;
      default:    return 0;
    endcase
  endfunction

endpackage
