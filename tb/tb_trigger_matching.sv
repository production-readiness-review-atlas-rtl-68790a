// tb_trigger_matching: self-checking test of the trigger matching.
// The test bench plays the level 1 buffer (a 256-word memory written one hit
// per cycle in time order, with coarse time = bunch count), the trigger FIFO
// (a queue) and the read-out FIFO (a capture list with a controllable full
// flag). A reference model computes, for each trigger, the expected event:
// header {event ID, tag}, every hit with 0 <= d <= match window in buffer
// order, a mask word with the channels of hits in -mask window <= d < 0, and
// a trailer {event ID, word count}. The reject counter is driven so that the
// automatic rejection may only discard hits no later trigger needs.
// Phases:
//   1 matching, read-out FIFO never full: stream compared word by word
//   2 read-out FIFO full at random: the matching must wait, same stream
//   3 full read-out FIFO with rejection enabled: hits are dropped, the
//     event gets an error word with the read-out overflow bit, and trailer
//     counts and event IDs must still be right; kept + dropped = expected
//   4 lost-trigger entries: one empty event (header, error word with the
//     trigger FIFO overflow bit, trailer) per lost event number
//   5 matching off: every hit copied straight through
// Also counts that auto-rejection, masking, waiting and dropping happened,
// and that the one-hot state check stays quiet.
module tb_trigger_matching;
  import amt_pkg::*;
  localparam int D = 256;
  localparam int LAT = 100;          // trigger latency in bunches
  logic clk = 0, rst = 1;
  ctrl_t cfg;
  logic event_reset = 0;
  logic tf_empty, tf_full = 0, tf_pop;
  trig_word_t tf_word;
  logic [8:0] wr_ptr = 0, start_ptr, rd_ptr;
  logic [7:0] rd_addr;
  l1_word_t rd_word;
  logic l1_nearly_full;
  logic [11:0] reject_count;
  logic ro_full = 0, ro_push;
  ro_word_t ro_word;
  logic state_error, running, rd_valid;
  logic ev_matched, ev_masked, ev_ro_reject, ev_auto_reject, ev_lost_event;
  int checks = 0, failures = 0;

  l1_word_t   l1 [D];
  trig_word_t tq [$];
  ro_word_t   exp_q [$];
  ro_word_t   got_q [$];
  l1_word_t   hits [$];            // the latest hits written, in order
  l1_word_t   h5 [$];              // hits written in phase 5
  logic       rec5 = 0;
  int         bc;                  // bunch counter
  int         n_matched = 0, n_masked = 0, n_rorej = 0, n_auto = 0, n_lost = 0, n_wait = 0;

  trigger_matching #(.L1_DEPTH(D)) dut (.clk, .rst, .cfg, .event_reset, .tf_empty, .tf_full,
    .tf_word, .tf_pop, .wr_ptr, .rd_addr, .rd_word, .l1_nearly_full, .start_ptr,
    .reject_count, .ro_full, .ro_push, .ro_word, .hard_errors(9'd0), .state_error, .running,
    .rd_ptr, .rd_valid, .ev_matched, .ev_masked, .ev_ro_reject, .ev_auto_reject, .ev_lost_event);

  always #12.5 clk = ~clk;

  assign rd_word        = l1[rd_addr];
  assign tf_empty       = (tq.size() == 0);
  assign tf_word        = tf_empty ? trig_word_t'('0) : tq[0];
  assign l1_nearly_full = (9'(wr_ptr - start_ptr) > 9'(D * 3 / 4));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000;
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DUT side effects, sampled at the clock edge
  always @(posedge clk) begin
    if (!rst) begin
      if (ro_push && !ro_full) got_q.push_back(ro_word);
      if (ro_full && running && !ro_push) n_wait++;
      n_matched += int'(ev_matched);
      n_masked  += int'(ev_masked);
      n_rorej   += int'(ev_ro_reject);
      n_auto    += int'(ev_auto_reject);
      n_lost    += int'(ev_lost_event);
      if (state_error) begin failures++; $display("FAIL state error at %0t", $time); end
      if (tf_pop && !tf_empty) #1 void'(tq.pop_front());   // after the design sampled it
    end
  end

  function automatic int sdiff(input int a, input int b);   // folded a - b
    int x;
    x = ((a - b) % 4096 + 4096) % 4096;
    return (x >= 2048) ? x - 4096 : x;
  endfunction

  // expected event for a trigger
  task automatic expect_event(input int evid, input int tag);
    logic [23:0] m;
    int n, d;
    m = '0; n = 1;
    if (cfg.enable_header) exp_q.push_back('{typ: TYPE_HEADER, data: {12'(evid), 12'(tag)}});
    foreach (hits[i]) begin
      d = sdiff(int'(hits[i].coarse), tag);
      if (d >= 0 && d <= int'(cfg.match_window)) begin
        exp_q.push_back('{typ: TYPE_SINGLE, data: {hits[i].ch, hits[i].trailing, hits[i].err,
                                                    hits[i].coarse, hits[i].fine}});
        n++;
      end else if (d < 0 && d >= -int'(cfg.mask_window)) m[hits[i].ch] = 1'b1;
    end
    if (m != 0) begin exp_q.push_back('{typ: TYPE_MASK, data: m}); n++; end
    if (cfg.enable_trailer) exp_q.push_back('{typ: TYPE_TRAILER, data: {12'(evid), 12'(n + 1)}});
  endtask

  // one clock of traffic: maybe a hit, maybe a trigger
  int evid_next;
  int trig_gap;
  logic pushed;
  task automatic cycle(input int hit_pct, input int trig_pct, input logic make_exp);
    l1_word_t h;
    @(negedge clk);
    bc++;
    pushed = 0;
    reject_count = 12'((bc - LAT - int'(cfg.mask_window) - 5 + 8192) % 4096);
    if ($urandom_range(0, 99) < hit_pct && 9'(wr_ptr - start_ptr) < 9'(D - 2)) begin
      h = l1_word_t'({$urandom, $urandom});
      h.full_mark = 0; h.pair = 0;
      h.ch = 5'($urandom_range(0, 23));
      h.coarse = 12'(bc % 4096);
      l1[wr_ptr[7:0]] = h;
      wr_ptr = wr_ptr + 1'b1;
      hits.push_back(h);
      if (rec5) h5.push_back(h);
      if (hits.size() > 400) void'(hits.pop_front());
    end
    if (trig_pct > 0 && trig_gap <= 0 && $urandom_range(0, 99) < trig_pct) begin
      tq.push_back('{lost: 1'b0, event_id: 12'(evid_next), tag: 12'((bc - LAT + 4096) % 4096)});
      trig_gap = 3;
      pushed = 1;
    end
    trig_gap--;
  endtask

  // expectations for triggers are made once their window is complete
  task automatic settle();
    repeat (LAT + 60) cycle(0, 0, 0);
    while (running || !tf_empty) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  // run a phase: triggers are generated and their expected events recorded
  task automatic traffic(input int ncyc, input int hit_pct, input int trig_pct);
    int trig_bc [$];
    int pend_ev [$];
    for (int c = 0; c < ncyc; c++) begin
      cycle(hit_pct, trig_pct, 1);
      if (pushed) begin
        trig_bc.push_back(bc);
        pend_ev.push_back(evid_next);
        evid_next = (evid_next + 1) % 4096;
      end
      // expectation once hits up to tag + match window are all written
      while (trig_bc.size() > 0 && bc > trig_bc[0] - LAT + int'(cfg.search_window) + 2) begin
        expect_event(pend_ev[0], (trig_bc[0] - LAT + 4096) % 4096);
        void'(trig_bc.pop_front()); void'(pend_ev.pop_front());
      end
    end
    while (trig_bc.size() > 0) begin
      cycle(0, 0, 1);
      if (bc > trig_bc[0] - LAT + int'(cfg.search_window) + 2) begin
        expect_event(pend_ev[0], (trig_bc[0] - LAT + 4096) % 4096);
        void'(trig_bc.pop_front()); void'(pend_ev.pop_front());
      end
    end
  endtask

  task automatic compare(input string what);
    int n;
    n = 0;
    check(got_q.size() == exp_q.size(), $sformatf("%s: %0d words, expected %0d", what, got_q.size(), exp_q.size()));
    while (got_q.size() > 0 && exp_q.size() > 0) begin
      if (got_q[0] != exp_q[0] && n < 5) begin
        $display("  got %h expected %h", got_q[0], exp_q[0]); n++;
      end
      check(got_q[0] == exp_q[0], {what, ": word"});
      void'(got_q.pop_front()); void'(exp_q.pop_front());
    end
    got_q.delete(); exp_q.delete();
  endtask

  initial begin
    cfg = '0;
    cfg.mask_window   = 12'd32;
    cfg.search_window = 12'd40;
    cfg.match_window  = 12'd20;
    cfg.count_roll_over = 12'd4095;
    cfg.enable_match  = 1; cfg.enable_mask = 1; cfg.enable_header = 1; cfg.enable_trailer = 1;
    cfg.enable_auto_reject = 1; cfg.enable_l1ovr_detect = 1;
    cfg.event_count_offset = 12'd0;
    bc = 0; evid_next = 0; trig_gap = 0;
    reject_count = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    // phase 1
    traffic(6000, 30, 2);
    settle();
    compare("phase 1");
    check(n_auto > 100, $sformatf("auto rejection happened (%0d)", n_auto));
    check(n_masked > 10 && n_matched > 100, "masking and matching happened");
    // phase 2: read-out FIFO full at random, no rejection
    fork
      begin
        traffic(4000, 30, 4);
        settle();
      end
      begin
        while (bc < 6000 + 4000 + 50) begin
          @(negedge clk); ro_full = ($urandom_range(0, 99) < 40);
        end
        ro_full = 0;
      end
    join
    compare("phase 2");
    check(n_wait > 100, $sformatf("matching waited on a full read-out FIFO (%0d)", n_wait));
    // phase 3: rejection of matched hits while the read-out FIFO is full
    cfg.enable_rofull_reject = 1; cfg.enable_errmark_ovr = 1;
    begin
      int exp_hits, got_hits, rej0, words, evid_h, n_err;
      logic in_ev, had_err;
      rej0 = n_rorej;
      fork
        begin
          traffic(4000, 30, 4);
          settle();
        end
        begin
          while (running || bc < 14100) begin
            @(negedge clk); ro_full = ($urandom_range(0, 99) < 50);
          end
          ro_full = 0;
        end
      join
      settle();
      exp_hits = 0; got_hits = 0; in_ev = 0; words = 0; n_err = 0; had_err = 0; evid_h = 0;
      foreach (exp_q[i]) if (exp_q[i].typ == TYPE_SINGLE) exp_hits++;
      foreach (got_q[i]) begin
        case (got_q[i].typ)
          TYPE_HEADER: begin
            check(!in_ev, "phase 3: header inside event");
            in_ev = 1; words = 1; evid_h = int'(got_q[i].data[23:12]); had_err = 0;
          end
          TYPE_TRAILER: begin
            check(in_ev && int'(got_q[i].data[11:0]) == words + 1
                  && int'(got_q[i].data[23:12]) == evid_h, "phase 3: trailer count and ID");
            in_ev = 0;
          end
          TYPE_ERROR: begin
            check(got_q[i].data[ERR_RO_OVF] == 1'b1, "phase 3: error word has read-out overflow bit");
            words++; n_err++;
          end
          TYPE_SINGLE: begin got_hits++; words++; end
          default: words++;
        endcase
      end
      check(n_rorej - rej0 > 20, $sformatf("phase 3: hits dropped (%0d)", n_rorej - rej0));
      check(got_hits + n_rorej - rej0 == exp_hits,
            $sformatf("phase 3: kept %0d + dropped %0d = expected %0d", got_hits, n_rorej - rej0, exp_hits));
      check(n_err > 5, "phase 3: error words written");
      got_q.delete(); exp_q.delete();
    end
    cfg.enable_rofull_reject = 0;
    // phase 4: lost triggers. The entry says: events up to this number lost.
    begin
      int last;
      last = (evid_next + 4095) % 4096;
      @(negedge clk);
      tq.push_back('{lost: 1'b1, event_id: 12'((last + 3) % 4096), tag: 12'd0});
      for (int k = 1; k <= 3; k++) begin
        exp_q.push_back('{typ: TYPE_HEADER, data: {12'((last + k) % 4096), 12'd0}});
        exp_q.push_back('{typ: TYPE_ERROR, data: 24'(1 << ERR_TF_OVF)});
        exp_q.push_back('{typ: TYPE_TRAILER, data: {12'((last + k) % 4096), 12'd3}});
      end
      evid_next = (last + 4) % 4096;
      repeat (40) @(negedge clk);
      traffic(1000, 30, 4);
      settle();
      compare("phase 4");
      check(n_lost == 3, $sformatf("three lost events (%0d)", n_lost));
    end
    // phase 5: matching off
    // hits still held in the buffer come out first
    @(negedge clk);
    for (logic [8:0] p = start_ptr; p != wr_ptr; p++)
      exp_q.push_back('{typ: TYPE_SINGLE, data: {l1[p[7:0]].ch, l1[p[7:0]].trailing, l1[p[7:0]].err,
                                                l1[p[7:0]].coarse, l1[p[7:0]].fine}});
    cfg.enable_match = 0;
    rec5 = 1;
    repeat (500) cycle(30, 0, 0);
    repeat (10) @(negedge clk);
    foreach (h5[i])
      exp_q.push_back('{typ: TYPE_SINGLE, data: {h5[i].ch, h5[i].trailing, h5[i].err,
                                                h5[i].coarse, h5[i].fine}});
    compare("phase 5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
