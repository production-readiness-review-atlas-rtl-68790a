// tb_pll_ring_osc: checks the PLL / ring-oscillator model. With the 1:2
// setting the ring clock must have a 12.5 ns period with rising edges on the
// reference's rising edges, clk40 must follow the reference, and at any
// instant tap k must equal the ring clock k x 0.78125 ns earlier (checked at
// random instants against that formula). The 1:4 setting must give 6.25 ns.
module tb_pll_ring_osc;
  logic        ref_clk = 0;
  logic [1:0]  pll_multi = 2'd1;
  logic        clk_ring, clk40;
  logic [15:0] taps;
  int checks = 0, failures = 0;
  realtime last_rise = 0, period = 0, t0;

  pll_ring_osc #(.TAPS(16), .REF_PERIOD_PS(25000)) dut (
    .ref_clk, .pll_multi, .disable_ringosc(1'b0), .clk_ring, .clk40, .taps);

  always #12.5 ref_clk = ~ref_clk;
  always @(posedge clk_ring) begin
    period    = $realtime - last_rise;
    last_rise = $realtime;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // expected tap value at phase x (ns) after the last ring rising edge
  function automatic logic exp_tap(input real x, input int k, input real per);
    real p;
    p = x - k * per / 16.0;
    while (p < 0) p += per;
    while (p >= per) p -= per;
    return p < per / 2.0;
  endfunction

  initial begin
    repeat (8) @(posedge ref_clk);
    for (int n = 0; n < 4; n++) begin
      @(posedge ref_clk); #0.001;
      check(clk_ring == 1'b1, "ring rises with reference");
      check(clk40 == 1'b1, "clk40 rises with reference");
      #12.5;
      check(clk_ring == 1'b1, "second ring rise in reference period");
      check(clk40 == 1'b0, "clk40 low in second half");
      check(period > 12.49 && period < 12.51, "ring period 12.5 ns");
    end
    for (int n = 0; n < 200; n++) begin
      real x;
      @(posedge clk_ring);
      t0 = $realtime;
      x  = real'($urandom_range(0, 11999)) / 1000.0;
      #(x);
      for (int k = 0; k < 16; k++) begin
        real xx;
        xx = $realtime - t0;
        // stay clear of the 1 ps rounding at tap edges
        if ((xx - k * 0.78125) % 6.25 > 0.01 && (xx - k * 0.78125) % 6.25 < 6.24 || (xx - k * 0.78125) < -0.01)
          check(taps[k] == exp_tap(xx, k, 12.5), $sformatf("tap %0d at phase %0.3f", k, xx));
      end
    end
    pll_multi = 2'd2;
    repeat (4) @(posedge ref_clk);
    @(posedge clk_ring); @(posedge clk_ring);
    check(period > 6.24 && period < 6.26, "ring period 6.25 ns with 1:4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
