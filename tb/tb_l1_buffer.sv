// tb_l1_buffer: self-checking test of the level 1 buffer.
// Writes random hit words while a model trigger matching moves the start
// pointer forward (freeing space) at a rate that alternates between faster
// and slower than the write rate, so the buffer repeatedly fills. Checks
// against a model: write pointer, occupancy, empty and nearly_full flags,
// stored contents at random read addresses, the full mark on the word that
// fills the last slot, dropped hits (lost pulse) while full, the second full
// mark on the first word written once four slots are free again, the
// over_recover pulse, and a parity error after a stored bit is flipped.
module tb_l1_buffer;
  import amt_pkg::*;
  localparam int D = 256;
  localparam int AW = $clog2(D);
  logic clk = 0, rst = 1, wr_valid = 0;
  l1_word_t wr_word, rd_word;
  logic [AW:0] start_ptr = 0, wr_ptr, occupancy;
  logic [AW-1:0] rd_addr = 0;
  logic rd_parity_error, empty, nearly_full, overflow, over_recover, lost;
  l1_word_t model [D];
  int mwp, msp, nfull = 0, nrec = 0, nlost = 0;
  logic mfull;
  int checks = 0, failures = 0;

  l1_buffer #(.DEPTH(D)) dut (.clk, .rst, .wr_valid, .wr_word, .start_ptr, .rd_addr, .rd_word,
    .rd_parity_error, .wr_ptr, .occupancy, .empty, .nearly_full, .overflow, .over_recover, .lost);

  always #12.5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000;
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int occ, a;
    logic wr, mark, exp_lost, exp_rec;
    mwp = 0; msp = 0; mfull = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 20000; it++) begin
      occ = mwp - msp;
      check(int'(wr_ptr) == mwp % (2 * D) && int'(occupancy) == occ, $sformatf("pointer %0d occupancy %0d exp %0d %0d", wr_ptr, occupancy, mwp % (2*D), occ));
      check(empty == (occ == 0) && nearly_full == (occ > D * 3 / 4) && overflow == mfull, "flags");
      if (occ > 0) begin
        a = msp + $urandom_range(0, occ - 1);
        rd_addr = AW'(a);
        #1;
        check(rd_word == model[a % D] && !rd_parity_error, "stored word");
      end
      wr_valid = ($urandom_range(0, 1) == 0);
      wr_word  = l1_word_t'($urandom);
      wr_word.full_mark = 1'b0;
      // model of one write
      wr = 0; mark = 0;
      if (wr_valid) begin
        if (!mfull) begin wr = (occ < D); mark = (occ == D - 1); end
        else if (occ <= D - 4) begin wr = 1; mark = 1; end
      end
      exp_lost = wr_valid && !wr;
      exp_rec  = wr && mark && mfull;
      if (wr) begin
        model[mwp % D] = wr_word;
        model[mwp % D].full_mark = mark;
        mwp++;
        if (mark) begin mfull = !mfull; if (mfull) nfull++; else nrec++; end
      end
      // start pointer moves on: fast then slow phases
      if (occ > 0 && $urandom_range(0, 99) < (((it / 1500) % 2) ? 20 : 70))
        msp = msp + 1;
      @(negedge clk);
      start_ptr = (AW+1)'(msp);
      #1;
      check(lost == exp_lost, "lost pulse");
      check(over_recover == exp_rec, "over_recover pulse");
      if (exp_lost) nlost++;
    end
    check(nfull > 3 && nrec > 3 && nlost > 100, $sformatf("buffer filled %0d times, recovered %0d, lost %0d", nfull, nrec, nlost));
    // parity
    wr_valid = 0;
    rd_addr = AW'(mwp - 1);
    #1;
    check(!rd_parity_error, "parity good before upset");
    dut.mem[rd_addr][3] = ~dut.mem[rd_addr][3];
    #1;
    check(rd_parity_error, "parity error after upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
