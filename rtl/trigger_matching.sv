// trigger_matching: finds the hits in the level 1 buffer that belong to each
// trigger and writes complete events into the read-out FIFO.
//
// Time windows (document). With d = hit coarse time - trigger time tag,
// taken modulo the programmed roll-over and folded to a signed value:
//   matched   0 <= d <= match_window
//   masking   -mask_window <= d < 0     (sets the channel's mask flag)
//   search    the scan stops at the first hit with d > search_window, or
//             when it reaches the write pointer.
// Hits reach the buffer only roughly in time order, so the scan does not
// stop at the first hit past the matching window but at the search limit.
// Pointers (document): the scan starts at the start pointer. The start
// pointer then moves to the first hit of the scan that is not older than
// the mask window, i.e. the oldest hit a later trigger can still use; hits
// before it are freed. (The document names "the first masked or matched
// hit"; the rule here also covers younger, unmatched hits so that they are
// not freed. When every scanned hit is older, the start pointer moves past
// all of them.) The start pointer is the one register both the scan and the
// automatic rejection move, which avoids the start-pointer miscount the
// document reports in a prototype.
// Automatic rejection (document): with no trigger waiting, the hit at the
// start pointer is discarded when it is older than the reject counter.
// Event (document): header (event ID, bunch ID = trigger tag), matched
// hits, a mask word if any mask flag is set, an error word when errors were
// seen, a trailer (event ID, word count including header and trailer).
// Header and trailer are optional. An error word is always written for an
// event that was lost in the trigger FIFO; for L1 overflow / rejected read-out
// hits it needs enable_errmark_ovr, for hit errors enable_errmark_rejected,
// for hardware errors enable_errmark (own choice of which bit gates what).
// Lost triggers (document): an entry with the lost flag makes one empty event
// (header, error word with the trigger FIFO overflow bit, trailer) for every
// event number from the last processed one up to the entry's number.
// L1 overflow: an event is flagged when the scan meets a full-marked hit
// that is not older than its mask window (own, simplified reading of the
// marked time window).
// Read-out FIFO full (document): the scan waits, or, when enabled, drops the
// matched hit and flags the event: enable_rofull_reject drops when the
// read-out FIFO is full, qualified by enable_l1full_reject with the L1
// buffer being more than 3/4 full; enable_trfull_reject also drops while the
// trigger FIFO is full.
// With enable_match = 0 every hit is copied straight to the read-out FIFO
// as it arrives, without events.
// One buffer word is examined per clock cycle. The state register is one-hot
// and checked continuously (state_error), as the document requires.
module trigger_matching
  import amt_pkg::*;
#(
  parameter int L1_DEPTH = 256,
  localparam int AW      = $clog2(L1_DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       cfg,
  input  logic        event_reset,
  // trigger FIFO
  input  logic        tf_empty,
  input  logic        tf_full,
  input  trig_word_t  tf_word,
  output logic        tf_pop,
  // level 1 buffer
  input  logic [AW:0] wr_ptr,
  output logic [AW-1:0] rd_addr,
  input  l1_word_t    rd_word,
  input  logic        l1_nearly_full,
  output logic [AW:0] start_ptr,
  // reject counter
  input  logic [11:0] reject_count,
  // read-out FIFO
  input  logic        ro_full,
  output logic        ro_push,
  output ro_word_t    ro_word,
  // errors and status
  input  logic [8:0]  hard_errors,
  output logic        state_error,
  output logic        running,
  output logic [AW:0] rd_ptr,
  output logic        rd_valid,       // rd_word is a stored hit
  // event pulses (monitoring)
  output logic        ev_matched,     // a hit was written as matched
  output logic        ev_masked,      // a mask flag was set
  output logic        ev_ro_reject,   // a matched hit was dropped
  output logic        ev_auto_reject, // an old hit was rejected
  output logic        ev_lost_event   // an empty event was made for a lost trigger
);

  typedef enum logic [8:0] {
    S_IDLE = 9'b000000001,
    S_LHDR = 9'b000000010,
    S_LERR = 9'b000000100,
    S_LTRL = 9'b000001000,
    S_HDR  = 9'b000010000,
    S_SRCH = 9'b000100000,
    S_MASK = 9'b001000000,
    S_ERR  = 9'b010000000,
    S_TRL  = 9'b100000000
  } state_t;

  state_t      state, state_n;
  logic [AW:0] rd_ptr_n, start_ptr_n;
  logic [11:0] tag, tag_n, evid, evid_n, last_evid, last_evid_n, target, target_n;
  logic [11:0] wc, wc_n;
  logic [23:0] mask, mask_n;
  logic        first, first_n;
  logic        f_l1, f_l1_n, f_ro, f_ro_n, f_hit, f_hit_n;

  logic signed [13:0] d, d_rej;
  logic        have_data, matched, masked, relevant, too_young, reject_hit;
  logic [11:0] coarse_out;
  logic [12:0] err_flags;
  logic        want_err;

  assign have_data = (state == S_IDLE ? start_ptr : rd_ptr) != wr_ptr;
  assign rd_addr   = (state == S_IDLE) ? start_ptr[AW-1:0] : rd_ptr[AW-1:0];

  always_comb begin
    d          = tdiff(rd_word.coarse, tag, cfg.count_roll_over);
    d_rej      = tdiff(rd_word.coarse, reject_count, cfg.count_roll_over);
    too_young  = d > $signed({2'b00, cfg.search_window});
    matched    = (d >= 0) && (d <= $signed({2'b00, cfg.match_window}));
    relevant   = d >= -$signed({2'b00, cfg.mask_window});
    masked     = cfg.enable_mask && (d < 0) && relevant;
    reject_hit = ro_full && ((cfg.enable_rofull_reject && (!cfg.enable_l1full_reject || l1_nearly_full))
                             || (cfg.enable_trfull_reject && tf_full));
    coarse_out = cfg.enable_relative ? 12'(d) : rd_word.coarse;
    err_flags  = {f_hit, f_ro, 1'b0, f_l1, hard_errors};
    want_err   = (cfg.enable_errmark_ovr && (f_l1 || f_ro))
              || (cfg.enable_errmark_rejected && f_hit)
              || (cfg.enable_errmark && (hard_errors != '0));
  end

  function automatic ro_word_t data_word(input l1_word_t e, input logic [11:0] c);
    if (e.pair) return '{typ: TYPE_COMBINED, data: {e.ch, e.width, c[5:0], e.fine}};
    else        return '{typ: TYPE_SINGLE,   data: {e.ch, e.trailing, e.err, c, e.fine}};
  endfunction

  always_comb begin
    state_n     = state;
    rd_ptr_n    = rd_ptr;
    start_ptr_n = start_ptr;
    tag_n       = tag;
    evid_n      = evid;
    last_evid_n = last_evid;
    target_n    = target;
    wc_n        = wc;
    mask_n      = mask;
    first_n     = first;
    f_l1_n      = f_l1;
    f_ro_n      = f_ro;
    f_hit_n     = f_hit;
    tf_pop      = 1'b0;
    ro_push     = 1'b0;
    ro_word     = '0;
    ev_matched  = 1'b0;
    ev_masked   = 1'b0;
    ev_ro_reject   = 1'b0;
    ev_auto_reject = 1'b0;
    ev_lost_event  = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (!cfg.enable_match) begin
          tf_pop = !tf_empty;
          if (have_data && !ro_full) begin
            ro_push     = 1'b1;
            ro_word     = data_word(rd_word, rd_word.coarse);
            start_ptr_n = start_ptr + 1'b1;
          end
        end else if (!tf_empty) begin
          tf_pop   = 1'b1;
          tag_n    = tf_word.tag;
          rd_ptr_n = start_ptr;
          wc_n     = '0;
          mask_n   = '0;
          first_n  = 1'b0;
          f_l1_n   = 1'b0;
          f_ro_n   = 1'b0;
          f_hit_n  = 1'b0;
          if (tf_word.lost) begin
            evid_n   = last_evid + 12'd1;
            target_n = tf_word.event_id;
            state_n  = S_LHDR;
          end else begin
            evid_n   = tf_word.event_id;
            state_n  = S_HDR;
          end
        end else if (cfg.enable_auto_reject && have_data && d_rej < 0) begin
          start_ptr_n    = start_ptr + 1'b1;
          ev_auto_reject = 1'b1;
        end
      end

      // ---- empty events for lost triggers
      S_LHDR: begin
        if (!cfg.enable_header) begin
          wc_n    = '0;
          state_n = S_LERR;
        end else if (!ro_full) begin
          ro_push = 1'b1;
          ro_word = '{typ: TYPE_HEADER, data: {evid, tag}};
          wc_n    = 12'd1;
          state_n = S_LERR;
        end
      end
      S_LERR: begin
        if (!ro_full) begin
          ro_push = 1'b1;
          ro_word = '{typ: TYPE_ERROR, data: {11'd0, 13'(1) << ERR_TF_OVF}};
          wc_n    = wc + 12'd1;
          state_n = S_LTRL;
        end
      end
      S_LTRL: begin
        if (!cfg.enable_trailer || !ro_full) begin
          ro_push       = cfg.enable_trailer;
          ro_word       = '{typ: TYPE_TRAILER, data: {evid, wc + 12'd1}};
          ev_lost_event = 1'b1;
          last_evid_n   = evid;
          if (evid == target) begin
            state_n = S_IDLE;
          end else begin
            evid_n  = evid + 12'd1;
            state_n = S_LHDR;
          end
        end
      end

      // ---- normal event
      S_HDR: begin
        if (!cfg.enable_header) begin
          state_n = S_SRCH;
        end else if (!ro_full) begin
          ro_push = 1'b1;
          ro_word = '{typ: TYPE_HEADER, data: {evid, tag}};
          wc_n    = 12'd1;
          state_n = S_SRCH;
        end
      end
      S_SRCH: begin
        if (!have_data || too_young) begin
          if (!first) start_ptr_n = rd_ptr;
          state_n = S_MASK;
        end else begin
          if (relevant && !first) begin
            start_ptr_n = rd_ptr;
            first_n     = 1'b1;
          end
          if (relevant && rd_word.full_mark && cfg.enable_l1ovr_detect) f_l1_n = 1'b1;
          if (matched) begin
            if (!ro_full) begin
              ro_push    = 1'b1;
              ro_word    = data_word(rd_word, coarse_out);
              wc_n       = wc + 12'd1;
              rd_ptr_n   = rd_ptr + 1'b1;
              ev_matched = 1'b1;
              if (rd_word.err) f_hit_n = 1'b1;
            end else if (reject_hit) begin
              f_ro_n       = 1'b1;
              rd_ptr_n     = rd_ptr + 1'b1;
              ev_ro_reject = 1'b1;
            end
          end else begin
            if (masked) begin
              mask_n[rd_word.ch] = 1'b1;
              ev_masked          = 1'b1;
            end
            rd_ptr_n = rd_ptr + 1'b1;
          end
        end
      end
      S_MASK: begin
        if (mask == '0) begin
          state_n = S_ERR;
        end else if (!ro_full) begin
          ro_push = 1'b1;
          ro_word = '{typ: TYPE_MASK, data: mask};
          wc_n    = wc + 12'd1;
          state_n = S_ERR;
        end
      end
      S_ERR: begin
        if (!want_err) begin
          state_n = S_TRL;
        end else if (!ro_full) begin
          ro_push = 1'b1;
          ro_word = '{typ: TYPE_ERROR, data: {11'd0, err_flags}};
          wc_n    = wc + 12'd1;
          state_n = S_TRL;
        end
      end
      S_TRL: begin
        if (!cfg.enable_trailer || !ro_full) begin
          ro_push     = cfg.enable_trailer;
          ro_word     = '{typ: TYPE_TRAILER, data: {evid, wc + 12'd1}};
          last_evid_n = evid;
          state_n     = S_IDLE;
        end
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      rd_ptr    <= '0;
      start_ptr <= '0;
      tag       <= '0;
      evid      <= '0;
      last_evid <= cfg.event_count_offset - 12'd1;
      target    <= '0;
      wc        <= '0;
      mask      <= '0;
      first     <= 1'b0;
      f_l1      <= 1'b0;
      f_ro      <= 1'b0;
      f_hit     <= 1'b0;
    end else begin
      state     <= state_n;
      rd_ptr    <= rd_ptr_n;
      start_ptr <= start_ptr_n;
      tag       <= tag_n;
      evid      <= evid_n;
      last_evid <= event_reset ? cfg.event_count_offset - 12'd1 : last_evid_n;
      target    <= target_n;
      wc        <= wc_n;
      mask      <= mask_n;
      first     <= first_n;
      f_l1      <= f_l1_n;
      f_ro      <= f_ro_n;
      f_hit     <= f_hit_n;
    end
  end

  assign state_error = (state == '0) || ((state & (state - 1'b1)) != '0);
  assign running     = (state != S_IDLE);
  assign rd_valid    = have_data;

endmodule
