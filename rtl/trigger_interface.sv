// trigger_interface: the trigger time-tag, reject and event counters, and the
// loading of the trigger FIFO including lost-trigger bookkeeping.
//
// Counters (document): the trigger counter counts bunch crossings and is
// loaded with bunch_count_offset at bunch count reset; its value at a trigger
// is the trigger time tag. Setting the offset to the trigger latency below
// the coarse counter makes the tag equal the bunch count of the triggered
// crossing. The reject counter is a second such counter, loaded with
// reject_count_offset, that the trigger matching uses to discard hits that
// are too old. Both roll over after count_roll_over like the coarse counter.
// The event counter is loaded with event_count_offset at event count reset
// and counts every trigger.
// Lost triggers (document): a trigger that finds the trigger FIFO full is
// not stored; the fact is remembered, and as soon as the FIFO has room an
// entry with the lost flag and the event number of the latest lost trigger
// is written before any new trigger. A trigger that arrives while that entry
// is still waiting is counted as lost too and starts a new lost run (own
// choice: one FIFO write per cycle, and every FIFO entry means exactly one
// thing: a trigger to match, or "events up to this number were lost").
// Timing: push and push_word are combinational from trigger and fifo_full,
// so the FIFO is written at the same clock edge that counts the trigger.
module trigger_interface
  import amt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,             // global reset
  input  logic        trigger,         // one-cycle pulse
  input  logic        bunch_reset,     // bunch count reset pulse
  input  logic        event_reset,     // event count reset pulse
  input  logic [11:0] bunch_count_offset,
  input  logic [11:0] reject_count_offset,
  input  logic [11:0] event_count_offset,
  input  logic [11:0] count_roll_over,
  input  logic        fifo_full,
  output logic        push,
  output trig_word_t  push_word,
  output logic [11:0] trig_count,
  output logic [11:0] reject_count,
  output logic [11:0] event_count,
  output logic        lost_pending,
  output logic        overflow         // pulse: a trigger was lost
);

  logic [11:0] lost_id, lost_tag;

  function automatic logic [11:0] wrap_inc(input logic [11:0] v, input logic [11:0] roll);
    return (v == roll) ? 12'd0 : v + 12'd1;
  endfunction

  always_comb begin
    push      = 1'b0;
    push_word = '0;
    if (!fifo_full) begin
      if (lost_pending) begin
        push      = 1'b1;
        push_word = '{lost: 1'b1, event_id: lost_id, tag: lost_tag};
      end else if (trigger) begin
        push      = 1'b1;
        push_word = '{lost: 1'b0, event_id: event_count, tag: trig_count};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || bunch_reset) begin
      trig_count   <= bunch_count_offset;
      reject_count <= reject_count_offset;
    end else begin
      trig_count   <= wrap_inc(trig_count, count_roll_over);
      reject_count <= wrap_inc(reject_count, count_roll_over);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      event_count  <= event_count_offset;
      lost_pending <= 1'b0;
      lost_id      <= '0;
      lost_tag     <= '0;
      overflow     <= 1'b0;
    end else begin
      overflow <= trigger && (fifo_full || lost_pending);
      if (event_reset)  event_count <= event_count_offset;
      else if (trigger) event_count <= event_count + 12'd1;
      if (trigger && (fifo_full || lost_pending)) begin
        lost_pending <= 1'b1;
        lost_id      <= event_count;
        lost_tag     <= trig_count;
      end else if (push) begin
        lost_pending <= 1'b0;
      end
    end
  end

endmodule
