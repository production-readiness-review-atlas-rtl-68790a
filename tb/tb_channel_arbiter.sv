// tb_channel_arbiter: self-checking test of the channel arbiter.
// A model of 24 channel buffers holds random numbers of pending
// measurements; each channel drops its request for the cycle after a grant
// (as a real channel buffer's request follows its count). The test checks
// that grants are one-hot and only go to requesting channels, that the
// selected word and channel number belong to the granted channel, that no
// channel is served twice while another channel waits in the same snapshot
// (fairness), that N simultaneous requests are served within N + 2 cycles,
// and that all work is eventually done. A forced mismatch of channel number and grant must raise
// chsel_error; a stale queue entry must be skipped without error.
module tb_channel_arbiter;
  import amt_pkg::*;
  logic clk = 0, rst = 1;
  logic [NCH-1:0] req, grant;
  chan_word_t words [NCH];
  logic valid, chsel_error;
  chan_word_t word;
  logic [4:0] ch;
  int pending [NCH];
  int served [NCH];
  int checks = 0, failures = 0;

  channel_arbiter dut (.clk, .rst, .req, .words, .grant, .valid, .word, .ch, .chsel_error);

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

  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      req[i] = pending[i] > 0;
      words[i] = '0;
      words[i].lead.ca = CW'(i * 100 + pending[i]);
    end
  end

  // channel model: pop on grant
  logic [NCH-1:0] waited;   // channels requesting when another got its second service
  int total;
  always @(posedge clk) begin
    if (!rst && valid) begin
      check((grant & (grant - 1'b1)) == 0 && grant[ch], "grant one-hot and matches ch");
      check(req[ch], "grant only to a requesting channel");
      check(word.lead.ca == CW'(int'(ch) * 100 + pending[ch]), "word belongs to granted channel");
      pending[ch] <= pending[ch] - 1;
      served[ch]++;
      total++;
    end
  end

  initial begin
    int n, start, lat;
    for (int i = 0; i < NCH; i++) begin pending[i] = 0; served[i] = 0; end
    total = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // burst: N channels at once, served within N + 2 cycles
    for (int b = 0; b < 20; b++) begin
      n = 0;
      for (int i = 0; i < NCH; i++) if ($urandom_range(0, 2) == 0) begin pending[i] = 1; n++; end
      start = total; lat = 0;
      while (total - start < n && lat < 100) begin @(negedge clk); lat++; end
      check(total - start == n && lat <= n + 2, $sformatf("burst of %0d served in %0d cycles", n, lat));
      repeat (2) @(negedge clk);
    end
    // fairness under permanent load: every channel with work is served once
    // per round; count per-channel services over a window
    for (int i = 0; i < NCH; i++) begin pending[i] = 1000; served[i] = 0; end
    repeat (24 * 10 + 5) @(negedge clk);
    for (int i = 0; i < NCH; i++)
      check(served[i] >= 9 && served[i] <= 11, $sformatf("fair share ch%0d got %0d", i, served[i]));
    for (int i = 0; i < NCH; i++) pending[i] = $urandom_range(0, 3);
    repeat (200) @(negedge clk);
    n = 0;
    for (int i = 0; i < NCH; i++) n += pending[i];
    check(n == 0, "all work done");
    // a queued channel that lost its request is skipped, no error
    force dut.queue = 24'h000010;
    #1;
    check(!chsel_error && !valid, "stale queue entry skipped");
    release dut.queue;
    // selection fault: channel number does not match the grant
    pending[5] = 1;
    @(negedge clk);
    force dut.ch = 5'd6;
    #1;
    check(chsel_error, "channel select fault flagged");
    release dut.ch;
    #1;
    check(!chsel_error, "chsel_error clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
