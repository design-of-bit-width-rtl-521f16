// tb_bwc_width_packer: self-checking testbench for bwc_width_packer.
//
// Drives the MAC side on sys_clk in all three widths with 128b/130b-like
// traffic: 16-byte blocks with tx_startblock on their first beat and one
// tx_datavalid gap each time the 2-bit sync headers add up to one beat, plus
// random extra gaps, a block start in the middle of a word, a width change in
// the middle of a word and the reserved width. An independent model keeps the
// beats of the word in progress in a list and forms the expected word by
// concatenation. After every sys_clk edge the testbench checks that the hold
// register took a new word exactly on the edge that sampled the word's last
// beat (toggle flipped, data, start flag and width equal to the model) and
// stayed unchanged otherwise, and that loads are at least beats-per-word
// cycles apart.
`timescale 1ns / 1ps
module tb_bwc_width_packer;
  import bwc_pkg::*;

  localparam int unsigned W = 32;

  logic         sys_clk = 1'b0;
  logic         rst_n   = 1'b0;
  bus_width_e   bw      = BW_FULL;
  logic [W-1:0] data    = '0;
  logic         dv      = 1'b0;
  logic         sb      = 1'b0;
  logic [W-1:0] hold_data;
  xflags_t      hold_flags;

  int unsigned checks = 0, failures = 0;

  bwc_width_packer #(.INT_W(W)) dut (
    .sys_clk(sys_clk), .sclk_rst_n(rst_n), .bus_width(bw), .tx_data(data),
    .tx_datavalid(dv), .tx_startblock(sb), .hold_data(hold_data), .hold_flags(hold_flags)
  );

  always #5 sys_clk = ~sys_clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [W-1:0] pend[$];     // beats of the word in progress (already masked)
  logic         pend_sb;
  bus_width_e   prev_bw = BW_FULL;
  logic         exp_load;
  logic [W-1:0] exp_data;
  logic         exp_sb;
  bus_width_e   exp_mode;
  int           last_load_cyc = -100;
  int           cyc = 0;
  int unsigned  n_words = 0, n_realign = 0, n_gaps = 0;

  function automatic int unsigned nbeats(bus_width_e b);
    return (b == BW_FULL) ? 1 : (b == BW_HALF) ? 2 : (b == BW_QUARTER) ? 4 : 0;
  endfunction

  always @(posedge sys_clk) begin
    exp_load = 1'b0;
    cyc++;
    if (rst_n) begin
      if (bw != prev_bw) pend.delete();
      prev_bw = bw;
      if (dv && bw != BW_RSVD) begin
        automatic int unsigned n = nbeats(bw);
        automatic int unsigned bwid = W / n;
        if (sb) begin
          if (pend.size() != 0) n_realign++;
          pend.delete();
        end
        if (pend.size() == 0) pend_sb = sb;
        pend.push_back(data & ((W)'({W{1'b1}}) >> (W - bwid)));
        if (pend.size() == n) begin
          exp_data = '0;
          for (int i = n - 1; i >= 0; i--) exp_data = (exp_data << bwid) | pend[i];
          exp_sb   = pend_sb;
          exp_mode = bw;
          exp_load = 1'b1;
          pend.delete();
        end
      end else if (!dv) n_gaps++;
    end else begin
      pend.delete();
      prev_bw = BW_FULL;
    end
  end

  // ---------------- checker ----------------
  logic prev_tgl = 1'b0;
  always @(negedge sys_clk) begin
    if (rst_n) begin
      checks++;
      if (exp_load) begin
        automatic int unsigned n = nbeats(exp_mode);
        if (hold_flags.tgl == prev_tgl || hold_data != exp_data ||
            hold_flags.startblock != exp_sb || hold_flags.mode != exp_mode) begin
          failures++;
          $display("%0t: load mismatch got %h sb=%0b mode=%0d tgl=%0b, exp %h sb=%0b mode=%0d",
                   $time, hold_data, hold_flags.startblock, hold_flags.mode, hold_flags.tgl,
                   exp_data, exp_sb, exp_mode);
        end
        checks++;
        if (cyc - last_load_cyc < int'(n)) begin
          failures++;
          $display("%0t: loads only %0d cycles apart", $time, cyc - last_load_cyc);
        end
        last_load_cyc = cyc;
        n_words++;
      end else if (hold_flags.tgl != prev_tgl) begin
        failures++;
        $display("%0t: unexpected load", $time);
      end
    end
    prev_tgl = hold_flags.tgl;
  end

  // ---------------- stimulus ----------------
  // One beat; inputs change on the falling edge.
  task automatic beat(input logic v, input logic s);
    @(negedge sys_clk);
    #1;
    dv   = v;
    sb   = s;
    data = $urandom();
  endtask

  // 128b/130b-like stream: nblk blocks of 16 bytes, tx_startblock on each
  // block's first beat, one gap beat per 4*bytes_per_beat blocks, and random
  // extra gaps when rnd_gaps is set.
  task automatic blocks(input bus_width_e b, input int nblk, input bit rnd_gaps);
    int unsigned n = nbeats(b);
    int unsigned bpb = 4 / n;            // bytes per beat
    int unsigned beats_per_blk = 16 / bpb;
    @(negedge sys_clk);
    #1 bw = b;
    for (int k = 0; k < nblk; k++) begin
      for (int j = 0; j < int'(beats_per_blk); j++) begin
        if (rnd_gaps && ($urandom_range(0, 9) == 0)) beat(1'b0, 1'b0);
        beat(1'b1, j == 0);
      end
      if ((k + 1) % (4 * bpb) == 0) beat(1'b0, 1'b0);
    end
  endtask

  initial begin
    repeat (3) @(negedge sys_clk);
    #1 rst_n = 1'b1;
    blocks(BW_FULL, 40, 1'b0);
    blocks(BW_HALF, 40, 1'b0);
    blocks(BW_QUARTER, 40, 1'b0);
    blocks(BW_FULL, 30, 1'b1);
    blocks(BW_HALF, 30, 1'b1);
    blocks(BW_QUARTER, 30, 1'b1);
    // block start in the middle of a word: realignment
    bw = BW_QUARTER;
    beat(1'b1, 1'b1); beat(1'b1, 1'b0); beat(1'b1, 1'b1);
    repeat (7) beat(1'b1, 1'b0);
    bw = BW_HALF;
    beat(1'b1, 1'b1); beat(1'b1, 1'b1); beat(1'b1, 1'b0);
    // width change in the middle of a word
    bw = BW_QUARTER;
    beat(1'b1, 1'b0); beat(1'b1, 1'b0);
    @(negedge sys_clk); #1 bw = BW_HALF;
    repeat (6) beat(1'b1, 1'b0);
    // reserved width: nothing may be packed
    @(negedge sys_clk); #1 bw = BW_RSVD;
    repeat (12) beat(1'b1, 1'b0);
    // random everything
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 63) == 0) begin
        @(negedge sys_clk); #1 bw = bus_width_e'($urandom_range(0, 3));
      end
      beat($urandom_range(0, 5) != 0, $urandom_range(0, 7) == 0);
    end
    beat(1'b0, 1'b0);
    repeat (4) @(negedge sys_clk);
    checks++;
    if (n_words < 1000 || n_realign < 2 || n_gaps < 50) begin
      failures++;
      $display("coverage too low: words=%0d realign=%0d gaps=%0d", n_words, n_realign, n_gaps);
    end
    $display("words=%0d realign=%0d gaps=%0d", n_words, n_realign, n_gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
