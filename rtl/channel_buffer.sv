// channel_buffer: one TDC channel, from the hit input to a write request for
// the level 1 buffer.
//
// Capture. The rising (leading) and falling (trailing) edges of the hit
// input each clock a capture register that takes a snapshot of the 16 ring
// taps and of both coarse counter copies with their parity bits, and flips a
// toggle bit. This is the only logic clocked by the hit itself.
// Transfer. The toggles are synchronised into the 40 MHz domain with two
// flip-flops (against metastability, as in the document); a change of a
// toggle means a new edge whose snapshot is now stable and is pushed into a
// 4-entry edge FIFO ("two complete time measurements"). When a leading and a
// trailing edge become visible in the same cycle they are pushed in the order
// they happened, deduced from the type of the previous edge.
// Modes (control bits): leading only, trailing only, both as separate
// measurements, or pair mode. In pair mode the FIFO head is offered only as
// a leading edge followed by a trailing edge, and both leave together; a
// trailing edge without a leading edge, or a leading edge followed by another
// leading edge, is dropped.
// Rejection. An edge that finds the FIFO full is lost. With enable_rejected
// = 0 the next stored edge carries the error flag; with enable_rejected = 1 an
// entry with the error flag is inserted as soon as there is room. The
// document gives that entry the time at which room appeared; here it carries
// the snapshot of the rejected edge itself, which the capture register still
// holds (own choice, simpler and no less informative).
// Interface: req is high while a complete measurement (single edge or pair)
// is at the head; word holds it; grant (one cycle) removes it.
// Edges closer together than about three 40 MHz cycles on the same input
// type overwrite the snapshot before it is transferred (the ASD dead time of
// ~800 ns makes this harmless for drift tubes).
module channel_buffer
  import amt_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic            clk,            // 40 MHz system clock
  input  logic            rst,            // synchronous to clk, also clears capture toggles
  input  logic            hit,            // asynchronous hit input
  input  logic [TAPS-1:0] taps,
  input  logic [CW-1:0]   cnt_a,
  input  logic            par_a,
  input  logic [CW-1:0]   cnt_b,
  input  logic            par_b,
  input  logic            enable,         // channel enable
  input  logic            enable_leading,
  input  logic            enable_trailing,
  input  logic            enable_pair,
  input  logic            enable_rejected,
  output logic            req,
  output chan_word_t      word,
  input  logic            grant,
  output logic            rejected,       // pulse: an edge was lost here
  output logic [2:0]      occupancy       // edges held
);

  // ---------------------------------------------------------------- capture
  edge_raw_t lead_cap, trail_cap;
  logic      lead_tog, trail_tog;

  always_ff @(posedge hit or posedge rst) begin
    if (rst) begin
      lead_tog <= 1'b0;
      lead_cap <= '0;
    end else begin
      lead_tog <= ~lead_tog;
      lead_cap <= '{trailing: 1'b0, err: 1'b0, taps: taps,
                    ca: cnt_a, pa: par_a, cb: cnt_b, pb: par_b};
    end
  end

  always_ff @(negedge hit or posedge rst) begin
    if (rst) begin
      trail_tog <= 1'b0;
      trail_cap <= '0;
    end else begin
      trail_tog <= ~trail_tog;
      trail_cap <= '{trailing: 1'b1, err: 1'b0, taps: taps,
                     ca: cnt_a, pa: par_a, cb: cnt_b, pb: par_b};
    end
  end

  // --------------------------------------------------------- synchronisers
  logic [2:0] lsync, tsync;
  always_ff @(posedge clk) begin
    if (rst) begin
      lsync <= {3{lead_tog}};     // no edge is seen across a reset
      tsync <= {3{trail_tog}};
    end else begin
      lsync <= {lsync[1:0], lead_tog};
      tsync <= {tsync[1:0], trail_tog};
    end
  end

  logic new_l, new_t, acc_l, acc_t;
  assign new_l = lsync[2] ^ lsync[1];
  assign new_t = tsync[2] ^ tsync[1];
  assign acc_l = new_l & enable & (enable_leading  | enable_pair);
  assign acc_t = new_t & enable & (enable_trailing | enable_pair);

  // ------------------------------------------------------------ edge FIFO
  edge_raw_t          q   [DEPTH];
  logic [2:0]         cnt;
  logic               last_lead;      // the most recent edge seen was leading
  logic               err_pend;       // flag the next stored edge
  logic               rej_pend;       // insert a rejected-hit entry
  edge_raw_t          rej_cap;

  edge_raw_t          q_n [DEPTH];
  logic [2:0]         cnt_n;
  logic               last_lead_n, err_pend_n, rej_pend_n, rejected_n;
  edge_raw_t          rej_cap_n;
  logic [1:0]         npop;
  edge_raw_t          cand [2];
  logic [1:0]         cand_v;

  // Head handling: what is offered, and what is silently dropped.
  logic head_pair_ok, drop_head;
  always_comb begin
    head_pair_ok = (cnt >= 3'd2) && !q[0].trailing && q[1].trailing;
    drop_head    = 1'b0;
    if (enable_pair && cnt != 0) begin
      if (q[0].trailing)                            drop_head = 1'b1;
      else if (cnt >= 3'd2 && !q[1].trailing)       drop_head = 1'b1;
    end
  end

  assign req = enable_pair ? head_pair_ok : (cnt != 0);

  always_comb begin
    word       = '0;
    word.pair  = enable_pair;
    word.lead  = q[0];
    word.trail = q[1];
    if (enable_pair) word.lead.err = q[0].err | q[1].err;
  end

  always_comb begin
    // pops
    npop = 2'd0;
    if (grant && req)  npop = enable_pair ? 2'd2 : 2'd1;
    else if (drop_head) npop = 2'd1;
    for (int i = 0; i < DEPTH; i++) q_n[i] = q[i];
    for (int i = 0; i < DEPTH; i++) begin
      if (i + int'(npop) < DEPTH) q_n[i] = q[i + int'(npop)];
    end
    cnt_n = cnt - 3'(npop);

    // candidate pushes in time order
    cand[0] = lead_cap;
    cand[1] = trail_cap;
    cand_v  = {acc_t, acc_l};
    if ((acc_l && acc_t && last_lead) || (acc_t && !acc_l)) begin
      cand[0] = trail_cap;
      cand[1] = lead_cap;
    end
    last_lead_n = last_lead;
    if (new_l && new_t) last_lead_n = !last_lead;
    else if (new_l)     last_lead_n = 1'b1;
    else if (new_t)     last_lead_n = 1'b0;

    err_pend_n = err_pend;
    rej_pend_n = rej_pend;
    rej_cap_n  = rej_cap;
    rejected_n = 1'b0;

    if (cand_v == 2'b00) begin
      if (rej_pend && enable_rejected && int'(cnt_n) < DEPTH) begin
        q_n[int'(cnt_n)]     = rej_cap;
        q_n[int'(cnt_n)].err = 1'b1;
        cnt_n          = cnt_n + 3'd1;
        rej_pend_n     = 1'b0;
        err_pend_n     = 1'b0;
      end
    end else begin
      for (int c = 0; c < 2; c++) begin
        if ((c == 0 && cand_v != 2'b00) || (c == 1 && cand_v == 2'b11)) begin
          if (int'(cnt_n) < DEPTH) begin
            q_n[int'(cnt_n)]     = cand[c];
            q_n[int'(cnt_n)].err = err_pend && !enable_rejected;
            if (!enable_rejected) err_pend_n = 1'b0;
            cnt_n          = cnt_n + 3'd1;
          end else begin
            rejected_n = 1'b1;
            err_pend_n = 1'b1;
            rej_pend_n = 1'b1;
            rej_cap_n  = cand[c];
          end
        end
      end
      if (!enable_rejected) rej_pend_n = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
      cnt       <= '0;
      last_lead <= 1'b0;
      err_pend  <= 1'b0;
      rej_pend  <= 1'b0;
      rej_cap   <= '0;
      rejected  <= 1'b0;
    end else begin
      for (int i = 0; i < DEPTH; i++) q[i] <= q_n[i];
      cnt       <= cnt_n;
      last_lead <= last_lead_n;
      err_pend  <= err_pend_n;
      rej_pend  <= rej_pend_n;
      rej_cap   <= rej_cap_n;
      rejected  <= rejected_n;
    end
  end

  assign occupancy = cnt;

endmodule
