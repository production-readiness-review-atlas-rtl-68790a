// tb_trigger_interface: self-checking test of the trigger interface.
// Checks that the trigger time tag and the reject counter run with the
// bunch clock from their offsets, wrap after count_roll_over and reload on a
// bunch count reset; that the event number starts at its offset, counts
// triggers and reloads on an event count reset; that each trigger pushes
// {event number, tag} in the same cycle; and that a trigger arriving while
// the trigger FIFO is full is lost: overflow pulses, and the next entry
// pushed is marked lost and carries the number and tag of the last lost
// trigger; a trigger arriving while that marker still waits is lost too.
module tb_trigger_interface;
  import amt_pkg::*;
  logic clk = 0, rst = 1, trigger = 0, bunch_reset = 0, event_reset = 0, fifo_full = 0;
  logic [11:0] bco = 12'd3996, rco = 12'd3956, eco = 12'd7, roll = 12'd4095;
  logic push, lost_pending, overflow;
  trig_word_t push_word;
  logic [11:0] trig_count, reject_count, event_count;
  int checks = 0, failures = 0;

  trigger_interface dut (.clk, .rst, .trigger, .bunch_reset, .event_reset,
    .bunch_count_offset(bco), .reject_count_offset(rco), .event_count_offset(eco),
    .count_roll_over(roll), .fifo_full, .push, .push_word, .trig_count, .reject_count,
    .event_count, .lost_pending, .overflow);

  always #12.5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #3000000;
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bc, ev;      // model: bunches since the last bunch reset, event number
  logic [11:0] exp_tag, lost_tag, lost_id;
  logic pend;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    bc = 0; ev = int'(eco); pend = 0;
    for (int it = 0; it < 9000; it++) begin
      bunch_reset = (it % 3000 == 2999);
      event_reset = ($urandom_range(0, 999) == 0);
      trigger     = ($urandom_range(0, 9) == 0);
      fifo_full   = ((it / 200) % 4 == 3) && ($urandom_range(0, 3) != 0);
      exp_tag = 12'((int'(bco) + bc) % (int'(roll) + 1));
      #1;
      check(trig_count == exp_tag, $sformatf("tag %0d exp %0d", trig_count, exp_tag));
      check(reject_count == 12'((int'(rco) + bc) % (int'(roll) + 1)), "reject counter");
      check(event_count == 12'(ev), "event number");
      check(lost_pending == pend, "lost pending");
      if (!fifo_full && pend)
        check(push && push_word == '{lost: 1'b1, event_id: lost_id, tag: lost_tag}, "lost marker pushed");
      else if (!fifo_full && trigger)
        check(push && push_word == '{lost: 1'b0, event_id: 12'(ev), tag: exp_tag}, "trigger pushed");
      else
        check(!push, "nothing pushed");
      // new offsets and roll-over, taken at the bunch count reset below
      if (it == 5999) begin roll = 12'd3563; bco = 12'd100; rco = 12'd60; end
      @(negedge clk);
      check(overflow == (trigger && (fifo_full || pend)), "overflow pulse");
      if (trigger && (fifo_full || pend)) begin
        pend = 1; lost_id = 12'(ev); lost_tag = exp_tag;
      end else if (!fifo_full) pend = 0;
      if (event_reset) ev = int'(eco);
      else if (trigger) ev = (ev + 1) % 4096;
      bc = bunch_reset ? 0 : bc + 1;
    end
    trigger = 0; bunch_reset = 0; event_reset = 0; fifo_full = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
