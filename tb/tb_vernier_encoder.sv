// tb_vernier_encoder: checks the vernier encoder on every clean tap snapshot
// (a run of eight ones ending at tap m, as the ring produces m/16 period after
// its rising edge), on snapshots with a one-tap glitch away from the edge,
// and on stopped-ring snapshots (all zero / all one), which must be invalid.
module tb_vernier_encoder;
  logic [15:0] taps;
  logic [3:0]  vernier;
  logic        valid;
  int checks = 0, failures = 0;

  vernier_encoder #(.TAPS(16)) dut (.taps, .vernier, .valid);

  function automatic logic [15:0] thermo(input int m);
    logic [15:0] t = '0;
    for (int j = 0; j < 8; j++) t[(m - j + 16) % 16] = 1'b1;
    return t;
  endfunction

  task automatic expect_eq(input logic [3:0] v, input logic ok, input string what);
    #1;
    checks++;
    if (vernier !== v || valid !== ok) begin
      failures++;
      $display("FAIL %s: taps=%h vernier=%0d valid=%0d expected %0d/%0d", what, taps, vernier, valid, v, ok);
    end
  endtask

  initial begin
    for (int m = 0; m < 16; m++) begin
      taps = thermo(m);
      expect_eq(4'(m), 1'b1, "clean edge");
    end
    // a single flipped tap in the middle of the run of ones or of zeros
    for (int m = 0; m < 16; m++) begin
      taps = thermo(m);
      taps[(m + 12) % 16] = ~taps[(m + 12) % 16];   // inside the zeros, far from edge
      expect_eq(4'(m), 1'b1, "glitch in zeros");
    end
    taps = 16'h0000; expect_eq(4'd0, 1'b0, "all zero");
    taps = 16'hFFFF; expect_eq(4'd0, 1'b0, "all one");
    // isolated 1-0 transition without a 4-bit pattern is not an edge
    taps = 16'b0101_0101_0101_0101; expect_eq(4'd0, 1'b0, "alternating");
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
