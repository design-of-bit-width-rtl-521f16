`timescale 1ns / 1ps
// tb_bwc_pclk_capture: self-checking testbench for bwc_pclk_capture.
//
// pclk runs at 500 MHz. A 2 GHz base clock aligned to pclk stands in for
// sys_clk: in width mode N (1, 2 or 4 beats per word) only every (4/N)-th base
// edge is a sys_clk edge. On sys_clk edges the testbench loads new words into
// the hold register the way the packer does (toggle flipped, data, start flag,
// width), never closer than N sys_clk cycles, with random extra spacing. Each
// load is queued with its time. On every pclk edge the outputs are compared
// with the queue: a valid word must match the oldest queued one and appear
// exactly at the expected latency (loaded in [T-3P, T-2P) for an output seen
// at edge T), no word may be skipped, txstartblock_mac must equal the word's
// flag, and ss_mode_sync must follow an independent model of the lock rule.
module tb_bwc_pclk_capture;
  import bwc_pkg::*;

  localparam int unsigned W = 32;
  localparam realtime P = 2.0;   // pclk period, ns

  logic         pclk = 1'b1;
  logic         base = 1'b1;
  logic         rst_n = 1'b0;
  logic [W-1:0] hold_data = '0;
  xflags_t      hold_flags = '{tgl: 1'b0, startblock: 1'b0, mode: BW_FULL};
  bus_width_e   bw_sync = BW_FULL;
  logic [W-1:0] data_o;
  logic         sb_o, dv_o, ss_o;
  bus_width_e   bw_o;

  int unsigned checks = 0, failures = 0;

  bwc_pclk_capture #(.INT_W(W)) dut (
    .pclk(pclk), .prst_n(rst_n), .hold_data(hold_data), .hold_flags(hold_flags),
    .bus_width_sync(bw_sync), .data_2ififo(data_o), .txstartblock_mac(sb_o),
    .tx_datavalid_mac(dv_o), .ss_mode_sync(ss_o), .bus_width_pclk(bw_o)
  );

  always #1.0  pclk = ~pclk;
  always #0.25 base = ~base;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [W-1:0] d;
    logic         s;
    bus_width_e   m;
    realtime      t;
  } exp_t;
  exp_t q[$];

  // ---------------- hold-register driver ----------------
  int unsigned nmode = 1;       // beats per word of the emulated width
  bus_width_e  mode = BW_FULL;
  bit          run = 1'b0;
  int unsigned slack = 0;       // random extra spacing in sys_clk cycles
  int unsigned since = 100;     // sys_clk cycles since the last load
  int unsigned bc = 0;          // base clock counter
  int unsigned n_loads = 0;

  always @(posedge base) begin
    if (bc % (4 / nmode) == 0) begin
      since++;
      if (run && rst_n && since >= nmode + slack) begin
        hold_data  <= $urandom();
        hold_flags <= '{tgl: ~hold_flags.tgl, startblock: 1'($urandom_range(0, 3) == 0), mode: mode};
        since = 0;
        slack = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 0;
        n_loads++;
      end
    end
    bc++;
  end

  // record loads when they become visible
  logic prev_tgl = 1'b0;
  always @(hold_flags) begin
    if (hold_flags.tgl != prev_tgl) q.push_back('{hold_data, hold_flags.startblock, hold_flags.mode, $realtime});
    prev_tgl = hold_flags.tgl;
  end

  // ---------------- checker ----------------
  bit          got = 1'b0;
  bus_width_e  last_m = BW_FULL;
  bus_width_e  bws_prev = BW_FULL;
  int unsigned n_valid = 0, n_sb = 0, n_gap = 0, n_ss_drop = 0;
  logic        ss_prev = 1'b0;

  always @(posedge pclk) begin
    realtime T;
    T = $realtime;
    if (rst_n) begin
      checks++;
      if (dv_o) begin
        n_valid++;
        if (sb_o) n_sb++;
        if (q.size() == 0) begin
          failures++;
          $display("%0t: valid output with nothing loaded", $realtime);
        end else begin
          exp_t e;
          e = q.pop_front();
          if (e.d != data_o || e.s != sb_o || e.m != bw_o) begin
            failures++;
            $display("%0t: got %h sb=%0b m=%0d exp %h sb=%0b m=%0d", $realtime, data_o, sb_o, bw_o, e.d, e.s, e.m);
          end
          if (!(e.t >= T - 3 * P && e.t < T - 2 * P)) begin
            failures++;
            $display("%0t: latency wrong, loaded at %0t", $realtime, e.t);
          end
          got = 1'b1;
          last_m = e.m;
        end
      end else begin
        n_gap++;
        if (sb_o) begin
          failures++;
          $display("%0t: start flag without valid", $realtime);
        end
        if (q.size() != 0 && q[0].t < T - 3 * P) begin
          failures++;
          $display("%0t: word loaded at %0t was skipped", $realtime, q[0].t);
          void'(q.pop_front());
        end
      end
      checks++;
      if (ss_o != (got && bws_prev == last_m && bws_prev != BW_RSVD)) begin
        failures++;
        $display("%0t: ss_mode_sync %0b wrong", $realtime, ss_o);
      end
      if (ss_prev && !ss_o) n_ss_drop++;
    end
    ss_prev  = ss_o;
    bws_prev = bw_sync;
  end

  // change the emulated width at a pclk edge (all clocks aligned there)
  task automatic set_mode(input bus_width_e m);
    @(posedge pclk);
    #0.1;
    mode    = m;
    bw_sync = m;
    nmode   = (m == BW_FULL) ? 1 : (m == BW_HALF) ? 2 : 4;
  endtask

  initial begin
    repeat (3) @(posedge pclk);
    #0.1 rst_n = 1'b1;
    run = 1'b1;
    for (int r = 0; r < 2; r++) begin
      set_mode(BW_FULL);    repeat (300) @(posedge pclk);
      set_mode(BW_HALF);    repeat (300) @(posedge pclk);
      set_mode(BW_QUARTER); repeat (300) @(posedge pclk);
    end
    run = 1'b0;
    repeat (6) @(posedge pclk);
    #0.1 bw_sync = BW_RSVD;
    repeat (6) @(posedge pclk);
    checks++;
    if (n_valid < 1000 || n_sb < 100 || n_gap < 100 || n_ss_drop < 3 || q.size() != 0) begin
      failures++;
      $display("coverage/leftover: valid=%0d sb=%0d gap=%0d ss_drop=%0d left=%0d",
               n_valid, n_sb, n_gap, n_ss_drop, q.size());
    end
    $display("valid=%0d sb=%0d gap=%0d ss_drop=%0d", n_valid, n_sb, n_gap, n_ss_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
