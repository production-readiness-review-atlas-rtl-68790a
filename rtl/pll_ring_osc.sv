// pll_ring_osc: behavioural model (not synthesizable) of the PLL-stabilised
// asymmetric ring oscillator and the internal clock divider.
//
// The real part is a hand-laid-out analog macro: a phase-frequency detector,
// charge pump, loop filter with an external capacitor, and a 16-stage
// asymmetric ring oscillator whose 16 outputs are equally spaced over one
// period. This model starts already locked. On every rising edge of the
// reference clock it launches `mult` ring periods (mult = 1, 2, 4, 8 from
// pll_multi, as the divider selects 1:1, 1:2, 1:4, 1:8; 1:2 is the normal
// setting, giving 80 MHz from 40 MHz). Tap k is the ring clock delayed by
// k/16 of its period, so a snapshot of the taps holds a run of eight ones
// whose end marks the time since the last ring rising edge.
// clk40 is the internal system clock, made from the ring clock by a single
// divide-by-two stage, so its rising edges coincide with every second ring
// rising edge and with the reference (the one-flip-flop divider of the
// second chip version, which cannot slip by half a cycle).
// disable_ringosc stops the ring (all taps low), as the control voltage
// split does in the chip. Lock time, jitter and supply dependence are not
// modelled. The model sets its own time unit of 1 ps and works in whole
// picoseconds (REF_PERIOD_PS), so the tap spacing of 781.25 ps is rounded to
// 781 ps; the error stays below 4 ps across the ring.
// For synthesis this model means nothing: the delays are dropped and the
// ring clock and taps become constants, so logic clocked by them is removed
// from a synthesised top. clk40 is a plain copy of the reference, which is
// exactly its phase in the chip, so the 40 MHz logic stays visible.
// Lint notes: the clock generators use blocking assignments and run-time
// delay values on purpose (this is a stimulus-like model, not logic).
module pll_ring_osc #(
  parameter int TAPS          = 16,
  parameter int REF_PERIOD_PS = 25000     // 40 MHz bunch-crossing clock
) (
  input  logic            ref_clk,         // external 40 MHz clock
  input  logic [1:0]      pll_multi,       // 0..3: ring = ref x 1, 2, 4, 8
  input  logic            disable_ringosc,
  output logic            clk_ring,        // ring oscillator clock (80 MHz)
  output logic            clk40,           // internal system clock
  output logic [TAPS-1:0] taps             // equally spaced ring phases
);

  timeunit 1ps;
  timeprecision 1ps;

  int ring_ps;
  always_comb ring_ps = REF_PERIOD_PS >> pll_multi;

  initial begin
    clk_ring = 1'b0;
  end

  // Ring clock: `mult` periods per reference period, phase aligned to it.
  always @(posedge ref_clk) begin
    for (int i = 0; i < 8; i++) begin          // at most 8 periods (1:8)
      if (i < (1 << pll_multi)) begin
        if (!disable_ringosc) clk_ring = 1'b1;
        #(ring_ps / 2);
        clk_ring = 1'b0;
        if (i != (1 << pll_multi) - 1) #(ring_ps / 2);
      end
    end
  end

  // Internal 40 MHz clock: the reference phase, as the divider output is.
  assign clk40 = ref_clk;

  // Tap k follows tap k-1 by 1/16 of a period, like the stages of the ring;
  // tap 0 is the ring clock itself.
  assign taps[0] = clk_ring;
  for (genvar k = 1; k < TAPS; k++) begin : g_tap
    initial taps[k] = 1'b0;
    always @(taps[k-1]) taps[k] <= #(ring_ps / TAPS) taps[k-1];
  end

endmodule
