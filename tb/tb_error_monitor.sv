// tb_error_monitor: self-checking test of the error flag register.
// Random error pulses with random enable masks against a model: a flag is
// set only by an enabled source, stays set (sticky) after the source goes
// away, any_error is the OR of the flags, and error_reset clears them all.
module tb_error_monitor;
  logic clk = 0, rst = 1, error_reset = 0;
  logic [8:0] enable_error, sources, flags, model;
  logic any_error;
  int checks = 0, failures = 0;

  error_monitor dut (.clk, .rst, .error_reset, .enable_error, .sources, .flags, .any_error);

  always #12.5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sources = 0; enable_error = '1; model = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      check(flags == model && any_error == (model != 0), "flags match model");
      enable_error = 9'($urandom);
      sources      = ($urandom_range(0, 7) == 0) ? 9'(1 << $urandom_range(0, 8)) : 9'd0;
      error_reset  = ($urandom_range(0, 40) == 0);
      @(posedge clk);
      model = error_reset ? 9'd0 : (model | (sources & enable_error));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
