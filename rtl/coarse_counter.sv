// coarse_counter: the 13-bit coarse time counter and its half-cycle copy.
//
// The counter runs on the ring-oscillator clock (twice the bunch clock), so
// its upper 12 bits are the bunch count and its LSB is the top bit of the
// fine time. A hit can arrive while the counter is changing, so a second
// value is kept that changes on the falling edge instead: cnt_b is loaded
// with the next value of cnt_a half a ring period before cnt_a takes it.
// Between a rising and the following falling edge cnt_a == cnt_b; in the
// second half of the period cnt_b == cnt_a + 1. The hit encoder picks the
// copy that was stable at the hit from the vernier phase.
// On reset and on bunch count reset the counter is loaded with the
// programmable coarse time offset, LSB 0. It rolls over to zero after
// {count_roll_over, 1}, so the bunch count follows the LHC orbit. Both are
// from the document; loading from clk40-domain level signals (held for one
// clk40 period, i.e. two ring edges) is this design's choice.
// Each copy carries an even-parity bit that the channel buffers store with
// it, so a corrupted count can be detected after capture.
module coarse_counter
  import amt_pkg::*;
#(
  parameter int CW_P = CW
) (
  input  logic            clk_ring,       // 80 MHz ring clock
  input  logic            load,           // reset or bunch count reset (level)
  input  logic [11:0]     coarse_time_offset,
  input  logic [11:0]     count_roll_over,
  output logic [CW_P-1:0] cnt_a,          // changes on the rising edge
  output logic            par_a,
  output logic [CW_P-1:0] cnt_b,          // changes on the falling edge
  output logic            par_b
);

  always_ff @(posedge clk_ring) begin
    if (load) cnt_a <= {coarse_time_offset, 1'b0};
    else      cnt_a <= coarse_next(cnt_a, count_roll_over);
  end

  always_ff @(negedge clk_ring) begin
    if (load) cnt_b <= {coarse_time_offset, 1'b0};
    else      cnt_b <= coarse_next(cnt_a, count_roll_over);
  end

  assign par_a = ^cnt_a;
  assign par_b = ^cnt_b;

endmodule
