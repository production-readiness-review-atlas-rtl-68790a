// l1_buffer: the level 1 buffer, a 256-word circular store of hit
// measurements that the trigger matching reads at random addresses.
//
// Writes go to the write pointer, one per cycle. Space is freed when the
// trigger matching advances its start pointer; occupancy is write pointer
// minus start pointer (9-bit pointers, 8-bit addresses).
// Overflow handling follows the document: when only one free word is left
// and a hit arrives, it is written with the full mark set and the buffer is
// then treated as full; later hits are dropped (lost pulse). Once the
// occupancy has fallen by four (DEPTH - 4) the next hit is written, again
// with the full mark, and normal operation resumes. The two marked hits
// bracket the time in which hits were lost, which the trigger matching uses
// to flag affected events.
// Each word is stored with an even-parity bit; rd_parity_error flags a
// mismatch on the word being read. The read is combinational from the
// address (the memory is an array of registers here, a dual-port macro in
// the chip).
module l1_buffer
  import amt_pkg::*;
#(
  parameter int DEPTH = 256,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_valid,
  input  l1_word_t    wr_word,
  input  logic [AW:0] start_ptr,       // from the trigger matching
  input  logic [AW-1:0] rd_addr,
  output l1_word_t    rd_word,
  output logic        rd_parity_error,
  output logic [AW:0] wr_ptr,
  output logic [AW:0] occupancy,
  output logic        empty,
  output logic        nearly_full,     // more than 3/4 full
  output logic        overflow,        // in the full state, hits being dropped
  output logic        over_recover,    // pulse: left the full state
  output logic        lost             // pulse: a hit was dropped
);

  localparam int W = $bits(l1_word_t);

  logic [W:0] mem [DEPTH];             // {parity, word}
  logic       full_st;
  l1_word_t   w;
  logic       do_write, set_mark;

  assign occupancy   = wr_ptr - start_ptr;
  assign empty       = (occupancy == '0);
  assign nearly_full = (occupancy > (AW+1)'(DEPTH * 3 / 4));
  assign overflow    = full_st;

  always_comb begin
    do_write = 1'b0;
    set_mark = 1'b0;
    if (wr_valid) begin
      if (!full_st) begin
        do_write = (occupancy < (AW+1)'(DEPTH));
        set_mark = (occupancy == (AW+1)'(DEPTH - 1));
      end else if (occupancy <= (AW+1)'(DEPTH - 4)) begin
        do_write = 1'b1;
        set_mark = 1'b1;
      end
    end
    w           = wr_word;
    w.full_mark = set_mark;
  end

  always_ff @(posedge clk) begin
    if (do_write) mem[wr_ptr[AW-1:0]] <= {^w, w};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr       <= '0;
      full_st      <= 1'b0;
      over_recover <= 1'b0;
      lost         <= 1'b0;
    end else begin
      over_recover <= 1'b0;
      lost         <= wr_valid && !do_write;
      if (do_write) wr_ptr <= wr_ptr + 1'b1;
      if (do_write && set_mark) begin
        full_st      <= !full_st;
        over_recover <= full_st;
      end
    end
  end

  logic [W:0] rd_raw;
  assign rd_raw          = mem[rd_addr];
  assign rd_word         = l1_word_t'(rd_raw[W-1:0]);
  assign rd_parity_error = ^rd_raw;

endmodule
