// tb_readout_fifo: self-checking test of the read-out FIFO.
// Random pushes and pops against a queue model: order and contents of the
// words, empty / full / nearly_full / occupancy flags, pushes into a full
// FIFO ignored, pops from an empty FIFO ignored, and a parity error when a
// stored bit is flipped.
module tb_readout_fifo;
  import amt_pkg::*;
  localparam int D = 64;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  ro_word_t wr_word, rd_word;
  logic empty, full, nearly_full, parity_error;
  logic [$clog2(D):0] occupancy;
  ro_word_t model [$];
  int checks = 0, failures = 0;
  int bias;
  logic was_full, was_empty;

  readout_fifo #(.DEPTH(D)) dut (.clk, .rst, .push, .wr_word, .pop, .rd_word, .empty, .full,
                    .nearly_full, .occupancy, .parity_error);

  always #12.5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #4000000;
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 6000; it++) begin
      bias = (it / 600) % 2;     // alternate filling and draining phases
      @(negedge clk);
      check(int'(occupancy) == model.size(), "occupancy");
      check(empty == (model.size() == 0) && full == (model.size() == D)
            && nearly_full == (model.size() >= D - 1), "flags");
      check(!parity_error, "no parity error");
      if (model.size() > 0) check(rd_word == model[0], "head word");
      push = ($urandom_range(0, 3) < (bias ? 3 : 1));
      pop  = ($urandom_range(0, 3) < (bias ? 1 : 3));
      wr_word = ro_word_t'($urandom);
      was_full = (model.size() == D); was_empty = (model.size() == 0);
      @(posedge clk);
      if (pop && !was_empty) void'(model.pop_front());
      if (push && !was_full) model.push_back(wr_word);
    end
    @(negedge clk); push = 0; pop = 1;
    while (!empty) @(negedge clk);
    pop = 0;
    wr_word = ro_word_t'($urandom);
    push = 1; @(negedge clk); push = 0;
    check(!empty && !parity_error && rd_word == wr_word, "word present, parity good");
    dut.mem[dut.rp[$clog2(D)-1:0]][4] = ~dut.mem[dut.rp[$clog2(D)-1:0]][4];
    #1;
    check(parity_error, "flipped bit gives parity error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
