`timescale 1ns / 1ps
// tb_bit_width_converter: end-to-end testbench of bit_width_converter at its
// default size (32-bit internal channel) and at PCIe 4.0 clock rates.
//
// pclk runs at 500 MHz; sys_clk runs at 500 MHz, 1 GHz or 2 GHz for BusWidth
// 00, 01 and 10, with its edges aligned to pclk. A MAC model sends
// 128b/130b-like traffic: 16-byte blocks, tx_startblock on each block's first
// beat and one tx_datavalid gap beat every time the blocks' 2-bit sync headers
// add up to one beat (every 16, 8 or 4 blocks). The width (and sys_clk) is
// switched between the three widths while the MAC is idle, and the reserved
// code, random extra gaps and a block start in the middle of a word are used
// too.
//
// An independent model concatenates the driven beats into expected 32-bit
// words, noting the time of each word's last beat. On every pclk edge the
// checker compares the outputs with that list: data, block start and width of
// each valid word, its latency (last beat in [T-3P, T-2P) for an output seen
// at edge T), that no word is lost, and that the number of pclk cycles a
// stream occupies on the internal channel matches the sys_clk cycles it took
// divided by the width ratio, i.e. that DataValid gaps reach the internal
// channel only once they add up to a whole word. ss_mode_sync must be high
// while streaming, low in the reserved width, and drop on every width change.
// Every mechanism is counted and must have happened.
module tb_bit_width_converter;
  import bwc_pkg::*;

  localparam int unsigned W = 32;
  localparam int unsigned BPW = W / 8;  // bytes per internal word
  localparam realtime P = 2.0 * W / 32;  // pclk period, ns: 500 MHz at 32 bits

  logic         sys_clk = 1'b1;
  logic         pclk    = 1'b1;
  logic         rst_n   = 1'b0;
  logic [1:0]   bw      = 2'b00;
  logic [W-1:0] data    = '0;
  logic         dv      = 1'b0;
  logic         sb      = 1'b0;
  logic         ss_o, sb_o, dv_o;
  logic [W-1:0] data_o;
  logic [1:0]   bw_o;

  int unsigned checks = 0, failures = 0;

  bit_width_converter dut (
    .sys_clk(sys_clk), .sclk_rst_n(rst_n), .pclk(pclk), .bus_width(bw),
    .tx_data(data), .tx_datavalid(dv), .tx_startblock(sb),
    .ss_mode_sync(ss_o), .data_2ififo(data_o), .txstartblock_mac(sb_o),
    .tx_datavalid_mac(dv_o), .bus_width_pclk(bw_o)
  );

  realtime hs = P / 2;                  // sys_clk half period
  always #(P / 2) pclk = ~pclk;
  always begin
    #hs sys_clk = 1'b0;
    #hs sys_clk = 1'b1;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned nbeats(logic [1:0] b);
    return (b == 2'b00) ? 1 : (b == 2'b01) ? 2 : (b == 2'b10) ? 4 : 0;
  endfunction

  // ---------------- reference model (sys_clk side) ----------------
  typedef struct {
    logic [W-1:0] d;
    logic         s;
    logic [1:0]   m;
    realtime      t;
  } exp_t;
  exp_t         q[$];
  logic [W-1:0] pend[$];
  logic         pend_sb;
  logic [1:0]   prev_bw = 2'b00;
  int unsigned  scyc = 0;               // sys_clk cycle counter
  int unsigned  n_realign = 0;
  // per-stream bookkeeping
  int           s_first_cyc = -1, s_last_cyc = -1, s_words = 0;

  always @(posedge sys_clk) begin
    scyc++;
    if (rst_n) begin
      if (bw != prev_bw) pend.delete();
      prev_bw = bw;
      if (dv && bw != 2'b11) begin
        automatic int unsigned n = nbeats(bw);
        automatic int unsigned bwid = W / n;
        if (sb) begin
          if (pend.size() != 0) n_realign++;
          pend.delete();
        end
        if (pend.size() == 0) pend_sb = sb;
        pend.push_back(data & ({W{1'b1}} >> (W - bwid)));
        if (pend.size() == n) begin
          automatic logic [W-1:0] w = '0;
          for (int i = n - 1; i >= 0; i--) w = (w << bwid) | pend[i];
          q.push_back('{w, pend_sb, bw, $realtime});
          pend.delete();
          if (s_first_cyc < 0) s_first_cyc = scyc;
          s_last_cyc = scyc;
          s_words++;
        end
      end
    end
  end

  // ---------------- checker (pclk side) ----------------
  int unsigned n_valid = 0, n_sb_out = 0, n_ss_drop = 0;
  int unsigned n_words_mode[3] = '{0, 0, 0};
  int          o_first = -1, o_last = -1, o_valid = 0, pcyc = 0;
  logic        ss_prev = 1'b0;
  bit          expect_ss_hi = 1'b0, expect_ss_lo = 1'b0;

  always @(posedge pclk) begin
    realtime T;
    T = $realtime;
    pcyc++;
    if (rst_n) begin
      if (dv_o) begin
        checks++;
        n_valid++;
        if (sb_o) n_sb_out++;
        if (q.size() == 0) begin
          failures++;
          $display("%0t: valid output with no word sent", $realtime);
        end else begin
          exp_t e;
          e = q.pop_front();
          if (e.d != data_o || e.s != sb_o || e.m != bw_o) begin
            failures++;
            $display("%0t: got %h sb=%0b bw=%0d, exp %h sb=%0b bw=%0d",
                     $realtime, data_o, sb_o, bw_o, e.d, e.s, e.m);
          end
          checks++;
          if (!(e.t >= T - 3 * P && e.t < T - 2 * P)) begin
            failures++;
            $display("%0t: latency wrong, last beat at %0t", $realtime, e.t);
          end
          if (e.m != 2'b11) n_words_mode[e.m]++;
        end
        if (o_first < 0) o_first = pcyc;
        o_last = pcyc;
        o_valid++;
      end else begin
        if (sb_o) begin
          failures++;
          $display("%0t: block start without valid", $realtime);
        end
        if (q.size() != 0 && q[0].t < T - 3 * P) begin
          failures++;
          $display("%0t: word with last beat at %0t lost", $realtime, q[0].t);
          void'(q.pop_front());
        end
      end
      if (expect_ss_hi || expect_ss_lo) begin
        checks++;
        if (ss_o != expect_ss_hi) begin
          failures++;
          $display("%0t: ss_mode_sync=%0b unexpected", $realtime, ss_o);
        end
      end
      if (ss_prev && !ss_o) n_ss_drop++;
    end
    ss_prev = ss_o;
  end

  // ---------------- MAC model ----------------
  task automatic beat(input logic v, input logic s);
    @(posedge sys_clk);
    #0.05;
    dv   = v;
    sb   = s;
    data = W'({$urandom(), $urandom()});
  endtask

  // Idle, then switch width and sys_clk together at a pclk edge.
  task automatic set_width(input logic [1:0] b);
    beat(1'b0, 1'b0);
    expect_ss_hi = 1'b0;
    expect_ss_lo = 1'b0;
    repeat (4) @(posedge pclk);
    @(negedge pclk);
    #(P / 2 - 0.1);                     // 0.1 ns before a pclk rising edge
    bw = b;
    hs = P / (2 * nbeats(b == 2'b11 ? 2'b00 : b));
    @(posedge pclk);
  endtask

  int unsigned n_stream_gap = 0;        // internal-channel gaps seen in streams

  // One stream of nblk blocks; afterwards check the pclk cycles it occupied.
  task automatic stream(input logic [1:0] b, input int nblk, input bit rnd_gaps);
    automatic int unsigned n = nbeats(b);
    automatic int unsigned bpb = BPW / n;
    automatic int unsigned beats_per_blk = 16 / bpb;
    automatic int span_out, span_in_lo, span_in_hi;
    s_first_cyc = -1; s_last_cyc = -1; s_words = 0;
    o_first = -1; o_last = -1; o_valid = 0;
    for (int k = 0; k < nblk; k++) begin
      for (int j = 0; j < int'(beats_per_blk); j++) begin
        if (rnd_gaps && $urandom_range(0, 7) == 0) beat(1'b0, 1'b0);
        beat(1'b1, j == 0);
        if (k == 4 && j == 0) expect_ss_hi = 1'b1;
      end
      if ((k + 1) % (4 * bpb) == 0 && k + 1 != nblk) beat(1'b0, 1'b0);
    end
    beat(1'b0, 1'b0);
    expect_ss_hi = 1'b0;
    repeat (6) @(posedge pclk);
    // the stream's words must occupy (sys_clk span)/n pclk cycles
    span_out   = o_last - o_first;
    span_in_lo = (s_last_cyc - s_first_cyc) / int'(n);
    span_in_hi = (s_last_cyc - s_first_cyc + int'(n) - 1) / int'(n);
    checks += 2;
    if (o_valid != s_words || o_valid != nblk * 16 / int'(BPW)) begin
      failures++;
      $display("stream bw=%0d: %0d words out, %0d in, %0d expected", b, o_valid, s_words, nblk * 16 / int'(BPW));
    end
    if (span_out < span_in_lo || span_out > span_in_hi) begin
      failures++;
      $display("stream bw=%0d: %0d pclk cycles for a %0d sys_clk span", b, span_out, s_last_cyc - s_first_cyc);
    end
    n_stream_gap += span_out + 1 - o_valid;
    $display("stream bw=%0d blocks=%0d: %0d words in %0d pclk cycles", b, nblk, o_valid, span_out + 1);
  endtask

  int unsigned n_mode_switch = 0;
  int unsigned stream_gaps_mode[3] = '{0, 0, 0};

  initial begin
    repeat (3) @(posedge pclk);
    #0.1 rst_n = 1'b1;
    repeat (4) @(posedge pclk);
    for (int r = 0; r < 2; r++) begin
      for (int m = 0; m < 3; m++) begin
        automatic int unsigned g0 = n_stream_gap;
        set_width(2'(m));
        n_mode_switch++;
        stream(2'(m), 48, r == 1);
        stream_gaps_mode[m] += n_stream_gap - g0;
      end
    end
    // block start in the middle of a 16-bit word: the partial word is dropped
    set_width(2'b01);
    n_mode_switch++;
    beat(1'b1, 1'b1);
    beat(1'b1, 1'b0);
    beat(1'b1, 1'b0);
    beat(1'b1, 1'b1);
    beat(1'b1, 1'b0);
    beat(1'b0, 1'b0);
    // reserved width: nothing comes through, ss_mode_sync low
    set_width(2'b11);
    n_mode_switch++;
    repeat (8) beat(1'b1, 1'b0);
    repeat (4) @(posedge pclk);
    expect_ss_lo = 1'b1;
    repeat (20) beat(1'b1, 1'($urandom_range(0, 1)));
    beat(1'b0, 1'b0);
    expect_ss_lo = 1'b0;
    // back to 8-bit traffic
    set_width(2'b10);
    n_mode_switch++;
    stream(2'b10, 16, 1'b0);
    repeat (8) @(posedge pclk);

    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d words never came out", q.size());
    end
    $display("words per BusWidth 00/01/10: %0d/%0d/%0d, block starts out %0d, realignments %0d",
             n_words_mode[0], n_words_mode[1], n_words_mode[2], n_sb_out, n_realign);
    $display("DataValid gaps on the internal channel per BusWidth 00/01/10: %0d/%0d/%0d",
             stream_gaps_mode[0], stream_gaps_mode[1], stream_gaps_mode[2]);
    $display("width switches %0d, ss_mode_sync drops %0d", n_mode_switch, n_ss_drop);
    checks++;
    if (n_words_mode[0] == 0 || n_words_mode[1] == 0 || n_words_mode[2] == 0 ||
        stream_gaps_mode[0] == 0 || stream_gaps_mode[1] == 0 || stream_gaps_mode[2] == 0 ||
        n_sb_out == 0 || n_realign == 0 || n_mode_switch < 6 || n_ss_drop < 5) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
