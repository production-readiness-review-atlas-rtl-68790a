// tb_hit_encoder: self-checking test of the hit encoder.
// Builds raw edge snapshots for random true times (coarse count N and
// vernier bin m, with both counter copies set as the two-copy counter would
// hold them at that instant) and checks the coarse and fine time, the channel
// number, the pair width for every width_select setting including
// saturation and the roll-over correction, and the error flag for a parity
// upset of either counter copy, a tap snapshot without an edge, and a
// channel select error.
module tb_hit_encoder;
  import amt_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0, chsel_error = 0;
  chan_word_t in_word;
  logic [4:0] in_ch = 0;
  logic [11:0] roll = 12'd4095;
  logic [2:0] wsel = 0;
  logic out_valid, coarse_error;
  l1_word_t out_word;
  int checks = 0, failures = 0;

  hit_encoder dut (.clk, .rst, .in_valid, .in_word, .in_ch, .chsel_error,
                   .count_roll_over(roll), .width_select(wsel),
                   .out_valid, .out_word, .coarse_error);

  always #12.5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // snapshot of an edge at count n (13 bits, ring length r), bin m
  function automatic edge_raw_t mk(input int n, input int m, input int r, input logic trailing);
    edge_raw_t e;
    e = '0;
    e.trailing = trailing;
    for (int k = 0; k < 8; k++) e.taps[(m - k + 16) % 16] = 1'b1;
    e.ca = CW'(n);
    e.cb = (m >= 8) ? CW'((n + 1) % r) : CW'(n);
    e.pa = ^e.ca;
    e.pb = ^e.cb;
    return e;
  endfunction

  task automatic apply(input chan_word_t w, input int ch);
    @(negedge clk);
    in_word = w; in_ch = 5'(ch); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int n, m, n2, m2, r, t1, t2, dt, expw;
    chan_word_t w;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 400; it++) begin
      roll = (it % 4 == 3) ? 12'd3563 : 12'd4095;
      r    = 2 * (int'(roll) + 1);
      wsel = 3'($urandom_range(0, 7));
      n  = $urandom_range(0, r - 1);  m  = $urandom_range(0, 15);
      n2 = (it % 3 == 0) ? (n + $urandom_range(0, 3)) % r : $urandom_range(0, r - 1);
      m2 = $urandom_range(0, 15);
      w = '0;
      w.pair  = it[0];
      w.lead  = mk(n, m, r, !it[0] && it[1]);   // single trailing edges too
      w.trail = mk(n2, m2, r, 1'b1);
      apply(w, it % 24);
      t1 = n * 16 + m; t2 = n2 * 16 + m2;
      dt = t2 - t1; if (dt < 0) dt += r * 16;
      expw = dt >> wsel; if (expw > 255) expw = 255;
      check(out_valid, "valid after one cycle");
      check(out_word.coarse == 12'(t1 >> 5) && out_word.fine == 5'(t1),
            $sformatf("time n=%0d m=%0d got %0d/%0d", n, m, out_word.coarse, out_word.fine));
      check(out_word.ch == 5'(it % 24), "channel number");
      check(out_word.trailing == (!it[0] && it[1]), "edge type of a single measurement");
      check(out_word.pair == w.pair && out_word.err == 1'b0 && !coarse_error, "flags clean");
      if (w.pair) check(int'(out_word.width) == expw,
                        $sformatf("width ws=%0d dt=%0d got %0d exp %0d", wsel, dt, out_word.width, expw));
      else        check(out_word.width == 0, "no width in single mode");
      @(negedge clk);
      check(!out_valid, "valid is one cycle");
    end
    // error cases
    roll = 12'd4095;
    w = '0; w.lead = mk(100, 5, 8192, 1'b0); w.lead.pa = ~w.lead.pa;
    apply(w, 3);
    check(out_word.err && coarse_error, "parity upset on copy A");
    w = '0; w.pair = 1; w.lead = mk(100, 5, 8192, 1'b0); w.trail = mk(101, 5, 8192, 1'b1);
    w.trail.pb = ~w.trail.pb;
    apply(w, 3);
    check(out_word.err && coarse_error, "parity upset on trailing copy B");
    w = '0; w.lead = mk(100, 5, 8192, 1'b0); w.lead.taps = '0;
    apply(w, 3);
    check(out_word.err && !coarse_error, "no edge in snapshot");
    w = '0; w.lead = mk(100, 5, 8192, 1'b0); w.lead.err = 1;
    apply(w, 3);
    check(out_word.err, "rejected-hit flag carried");
    w = '0; w.lead = mk(100, 5, 8192, 1'b0); chsel_error = 1;
    apply(w, 3);
    chsel_error = 0;
    check(out_word.err, "channel select error flagged");
    w = '0; w.lead = mk(100, 5, 8192, 1'b0);
    apply(w, 3);
    check(!out_word.err && !coarse_error, "clean again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
