// vernier_encoder: turns a snapshot of the 16 ring-oscillator taps into the
// 4-bit vernier time.
//
// Tap k is the ring clock delayed by k/16 period. At a time m/16 period after
// the ring's rising edge, taps m-7 .. m (modulo 16) are high and the rest low,
// so the rising edge sits between tap m (high) and tap m+1 (low). As in the
// chip, the edge is found with a four-bit window rather than two bits: bit m
// of edge is set only where taps m-1, m are high and m+1, m+2 are low, which
// ignores a single-tap glitch. The one-hot edge vector is then encoded to its
// index. Purely combinational; valid = 0 when no edge was found (stopped
// ring or corrupted snapshot), in which case vernier is 0.
module vernier_encoder #(
  parameter int TAPS = 16
) (
  input  logic [TAPS-1:0]         taps,
  output logic [$clog2(TAPS)-1:0] vernier,
  output logic                    valid
);

  logic [TAPS-1:0] edge_vec;

  always_comb begin
    for (int m = 0; m < TAPS; m++) begin
      edge_vec[m] =  taps[(m + TAPS - 1) % TAPS] &  taps[m]
                  & ~taps[(m + 1) % TAPS]        & ~taps[(m + 2) % TAPS];
    end
  end

  // One-hot to binary: bit b of the index is the OR of the edge bits whose
  // position has bit b set.
  always_comb begin
    vernier = '0;
    for (int m = 0; m < TAPS; m++) begin
      for (int b = 0; b < $clog2(TAPS); b++) begin
        if (((m >> b) & 1) == 1) vernier[b] = vernier[b] | edge_vec[m];
      end
    end
  end

  assign valid = |edge_vec;

endmodule
