// tb_channel_buffer: drives one channel buffer with hit pulses at known
// times, with the PLL model and coarse counter as time base. Checks that
// each stored edge has the right type, that its tap snapshot encodes the
// phase of the hit within the 12.5 ns ring period (computed from the hit
// time), that coarse copy A counts ring periods since the counter load, that
// pair mode offers leading + trailing together, that a full buffer rejects
// edges and flags the next stored one (enable_rejected = 0) or inserts a
// flagged entry (enable_rejected = 1), and that a disabled channel stores
// nothing.
module tb_channel_buffer;
  import amt_pkg::*;
  logic ref_clk = 0, clk, clk_ring, rst, hit = 0;
  logic [15:0] taps;
  logic [12:0] cnt_a, cnt_b;
  logic par_a, par_b, load;
  logic enable = 1, en_l = 1, en_t = 0, en_p = 0, en_r = 0;
  logic req, grant = 0, rejected;
  chan_word_t word;
  logic [2:0] occ;
  int checks = 0, failures = 0, nrej = 0;
  realtime t_load, t_rise;

  pll_ring_osc u_pll (.ref_clk, .pll_multi(2'd1), .disable_ringosc(1'b0), .clk_ring, .clk40(clk), .taps);
  coarse_counter u_cc (.clk_ring, .load, .coarse_time_offset(12'd0), .count_roll_over(12'hFFF),
                       .cnt_a, .par_a, .cnt_b, .par_b);
  channel_buffer dut (.clk, .rst, .hit, .taps, .cnt_a, .par_a, .cnt_b, .par_b, .enable,
    .enable_leading(en_l), .enable_trailing(en_t), .enable_pair(en_p), .enable_rejected(en_r),
    .req, .word, .grant, .rejected, .occupancy(occ));

  always #12.5 ref_clk = ~ref_clk;
  always @(posedge clk) if (rejected) nrej++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // position of the last tap of the run of ones (reference decoder)
  function automatic int tap_phase(input logic [15:0] t);
    for (int m = 0; m < 16; m++)
      if (t[m] && !t[(m + 1) % 16]) return m;
    return -1;
  endfunction

  // hit edge at absolute time t: expected phase bin and ring period count
  function automatic int exp_bin(input realtime t);
    real x;
    x = t - t_load;
    return int'($floor((x - 12.5 * $floor(x / 12.5)) / 0.78125));
  endfunction
  function automatic int exp_cnt(input realtime t);
    return int'($floor((t - t_load) / 12.5));
  endfunction

  // edge checks (avoid phases within 0.05 ns of a bin edge)
  task automatic check_edge(input edge_raw_t e, input realtime t, input logic trailing, input string what);
    real ph;
    ph = (t - t_load) - 12.5 * $floor((t - t_load) / 12.5);
    check(e.trailing == trailing, {what, ": edge type"});
    if (ph / 0.78125 - $floor(ph / 0.78125) > 0.07 && ph / 0.78125 - $floor(ph / 0.78125) < 0.93)
      check(tap_phase(e.taps) == exp_bin(t), $sformatf("%s: phase bin %0d exp %0d", what, tap_phase(e.taps), exp_bin(t)));
    if (ph > 0.5 && ph < 12.0)
      check(int'(e.ca) == exp_cnt(t) + 1 || int'(e.ca) == exp_cnt(t),
            $sformatf("%s: coarse %0d exp %0d", what, e.ca, exp_cnt(t)));
    check(e.pa == ^e.ca && e.pb == ^e.cb, {what, ": parity stored"});
  endtask

  task automatic pop();
    @(negedge clk); grant = 1; @(negedge clk); grant = 0;
  endtask

  realtime tl [8], tt [8];

  initial begin
    rst = 1; load = 1;
    repeat (4) @(posedge clk);
    @(posedge clk);
    load = 0; rst = 0;
    // the counter leaves {0,0} on the ring edge that sees load low; the
    // next rising edge is where count 1 starts
    @(posedge clk_ring); t_load = $realtime - 12.5;
    // --- leading edge only
    for (int n = 0; n < 3; n++) begin
      #(37.3 + 11.1 * n);
      tl[n] = $realtime; hit = 1; #20; hit = 0;
      repeat (5) @(posedge clk);
      check(req == 1'b1, "leading: request");
      check(word.pair == 1'b0, "leading: single");
      check_edge(word.lead, tl[n], 1'b0, "leading");
      pop();
      check(req == 1'b0 && occ == 0, $sformatf("leading: popped occ=%0d tr=%0d", occ, word.lead.trailing));
    end
    // --- pair mode
    en_p = 1; en_l = 0;
    for (int n = 0; n < 3; n++) begin
      #(53.7 + 3.3 * n);
      tl[n] = $realtime; hit = 1; #(30.0 + 7.0 * n); tt[n] = $realtime; hit = 0;
      repeat (5) @(posedge clk);
      check(req == 1'b1 && word.pair == 1'b1, "pair: request");
      check_edge(word.lead,  tl[n], 1'b0, "pair lead");
      check_edge(word.trail, tt[n], 1'b1, "pair trail");
      pop();
      check(req == 1'b0 && occ == 0, "pair: popped both");
    end
    // --- overflow, flag on next hit
    en_p = 0; en_l = 1; en_t = 1; en_r = 0;
    for (int n = 0; n < 3; n++) begin
      #(113.0); hit = 1; #(100.0); hit = 0;
    end
    repeat (5) @(posedge clk);
    check(occ == 4, "overflow: four edges held");
    check(nrej == 2, $sformatf("overflow: two edges rejected (%0d)", nrej));
    for (int n = 0; n < 4; n++) begin
      check(word.lead.err == 1'b0, "overflow: stored edges unflagged");
      pop();
    end
    #(77.0); hit = 1; #(100.0); hit = 0;
    repeat (5) @(posedge clk);
    check(occ == 2 && word.lead.err == 1'b1, "overflow: next stored edge flagged");
    pop();
    check(word.lead.err == 1'b0, "overflow: flag cleared after one edge");
    pop();
    // --- overflow with immediate flagged insertion
    en_r = 1; nrej = 0;
    for (int n = 0; n < 3; n++) begin
      #(113.0); hit = 1; #(100.0); hit = 0;
    end
    repeat (5) @(posedge clk);
    check(nrej == 2, "forced: rejections counted");
    pop();
    repeat (2) @(posedge clk);
    check(occ == 4, "forced: flagged entry inserted when room appears");
    pop(); pop(); pop();
    check(occ == 1 && word.lead.err == 1'b1, "forced: inserted entry carries the flag");
    pop();
    // --- disabled channel
    enable = 0;
    #(50.0); hit = 1; #(40.0); hit = 0;
    repeat (6) @(posedge clk);
    check(req == 1'b0 && occ == 0, "disabled: nothing stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
