// trigger_fifo: the 8-word trigger FIFO between the trigger interface and the
// trigger matching.
//
// Each entry holds a trigger time tag, its 12-bit event number and the lost
// flag (trig_word_t), stored with an even-parity bit. The FIFO is
// first-word-fall-through: rd_word shows the oldest entry whenever empty is
// low, and pop removes it at the clock edge. A write to a full FIFO is
// ignored (the trigger interface never does it). parity_error flags a
// mismatch on the entry at the head. Depth is the document's; the status
// outputs feed the control/status registers (nearly_full = at most one free
// word, own choice of threshold).
module trigger_fifo
  import amt_pkg::*;
#(
  parameter int DEPTH = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       push,
  input  trig_word_t wr_word,
  input  logic       pop,
  output trig_word_t rd_word,
  output logic       empty,
  output logic       full,
  output logic       nearly_full,
  output logic [AW:0] occupancy,
  output logic       parity_error
);

  localparam int W = $bits(trig_word_t);

  logic [W:0]  mem [DEPTH];
  logic [AW:0] wp, rp;
  logic        do_push, do_pop;

  assign occupancy   = wp - rp;
  assign empty       = (occupancy == '0);
  assign full        = (occupancy == (AW+1)'(DEPTH));
  assign nearly_full = (occupancy >= (AW+1)'(DEPTH - 1));
  assign do_push     = push && !full;
  assign do_pop      = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= {^wr_word, wr_word};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  logic [W:0] head;
  assign head         = mem[rp[AW-1:0]];
  assign rd_word      = trig_word_t'(head[W-1:0]);
  assign parity_error = !empty && (^head);

endmodule
