// tb_control_decoder: self-checking test of the encoded control decoder.
// Sends random sequences of the four serial commands (start bit 1 followed
// by two bits: 00 trigger, 10 bunch count reset, 01 global reset, 11 event
// count reset), with random idle gaps, and checks that exactly the intended
// one-cycle output pulse appears two cycles after the last bit. Then checks
// the direct inputs with disable_encode = 1, where the encoded line must be
// ignored.
module tb_control_decoder;
  logic clk = 0, rst = 1, encoded = 0, disable_encode = 0;
  logic d_trig = 0, d_bcr = 0, d_evr = 0, d_gr = 0;
  logic trigger, bunch_reset, event_reset, global_reset;
  int checks = 0, failures = 0;

  control_decoder dut (.clk, .rst, .encoded, .disable_encode,
    .direct_trigger(d_trig), .direct_bunch_reset(d_bcr), .direct_event_reset(d_evr),
    .direct_global_reset(d_gr), .trigger, .bunch_reset, .event_reset, .global_reset);

  always #12.5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] outs;
  assign outs = {global_reset, event_reset, bunch_reset, trigger};
  int npulses = 0;
  always @(posedge clk) if (!rst && outs != 0) #1 npulses++;

  initial begin
    int cmd, n0;
    logic [3:0] exp;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 400; it++) begin
      cmd = $urandom_range(0, 3);
      n0 = npulses;
      @(negedge clk); encoded = 1;
      @(negedge clk); encoded = cmd[1];
      @(negedge clk); encoded = cmd[0];
      @(negedge clk); encoded = 0;
      // {b1,b2}: 00 trigger, 10 bcr, 01 global reset, 11 ecr
      case (cmd)
        0: exp = 4'b0001;
        2: exp = 4'b0010;
        1: exp = 4'b1000;
        default: exp = 4'b0100;
      endcase
      check(outs == exp, $sformatf("command %0d decoded (got %b)", cmd, outs));
      repeat ($urandom_range(1, 3)) @(negedge clk);
      check(npulses == n0 + 1, "exactly one pulse");
    end
    // direct inputs
    disable_encode = 1;
    for (int it = 0; it < 100; it++) begin
      @(negedge clk);
      {d_gr, d_evr, d_bcr, d_trig} = 4'($urandom);
      encoded = $urandom_range(0, 1);
      exp = {d_gr, d_evr, d_bcr, d_trig};
      @(negedge clk);
      check(outs == exp, "direct inputs registered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
