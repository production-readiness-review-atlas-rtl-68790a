// tb_jtag_tap: self-checking test of the JTAG port.
// Drives TCK/TMS/TDI bit by bit like a boundary-scan controller and reads
// TDO just before each rising TCK edge. Checks: IDCODE selected after reset
// and read out LSB first; CONTROL captures the 192 control bits, shifts new
// bits in and, on Update-DR, presents them with a one-cycle load pulse in the
// system clock domain; STATUS and SAMPLE capture their inputs; GPO is written
// and read back; BYPASS delays TDI by one TCK; the ASD chain is passed
// through with one extra register (an ASD model of 15 bits gives a 16-bit
// chain); an instruction with bad parity raises jtag_error and selects
// BYPASS; five TMS-high clocks return the controller to Test-Logic-Reset.
module tb_jtag_tap;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo;
  logic clk = 0, rst = 1;
  logic [191:0] ctrl_rdata, ctrl_wdata;
  logic ctrl_load;
  logic [71:0] status_in;
  logic [27:0] bsr_in;
  logic asd_tdi, asd_shift, asd_update, asd_tdo, jtag_error;
  logic [11:0] gpo;
  logic [3:0] instruction;
  logic [14:0] asd_sr = 0;
  int checks = 0, failures = 0, nload = 0;

  jtag_tap dut (.tck, .tms, .tdi, .trst_n, .tdo, .clk, .rst, .ctrl_rdata, .ctrl_wdata,
    .ctrl_load, .status_in, .bsr_in, .asd_tdi, .asd_shift, .asd_update, .asd_tdo,
    .gpo, .jtag_error, .instruction);

  always #12.5 clk = ~clk;
  always @(posedge clk) if (ctrl_load) nload++;

  // ASD chip model: 15-bit shift register clocked by TCK while shifting
  always @(posedge tck) if (asd_shift) asd_sr <= {asd_tdi, asd_sr[14:1]};
  assign asd_tdo = asd_sr[0];

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

  task automatic clock(input logic m, input logic d);
    tms = m; tdi = d;
    #20 tck = 1;
    #20 tck = 0;
  endtask

  task automatic shift_ir(input logic [3:0] code, input logic bad_parity);
    logic [4:0] v;
    v = {(^code) ^ bad_parity, code};
    clock(1, 0); clock(1, 0); clock(0, 0); clock(0, 0);
    for (int i = 0; i < 5; i++) clock(i == 4, v[i]);
    clock(1, 0); clock(0, 0);
  endtask

  task automatic shift_dr(input int n, input logic [255:0] din, output logic [255:0] dout);
    dout = '0;
    clock(1, 0); clock(0, 0); clock(0, 0);
    for (int i = 0; i < n; i++) begin
      #1 dout[i] = tdo;
      clock(i == n - 1, din[i]);
    end
    clock(1, 0); clock(0, 0);
  endtask

  initial begin
    logic [255:0] o, x;
    ctrl_rdata = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    status_in  = {$urandom, $urandom, $urandom};
    bsr_in     = 28'($urandom);
    #10 trst_n = 0;
    #40 trst_n = 1; rst = 0;
    clock(0, 0);                               // to Run-Test/Idle
    // IDCODE after reset
    shift_dr(32, '0, o);
    check(o[31:0] == 32'h0A3D_2001, $sformatf("IDCODE %h", o[31:0]));
    // CONTROL read and write
    shift_ir(4'b1000, 0);
    check(instruction == 4'b1000 && !jtag_error, "CONTROL selected");
    x = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    shift_dr(192, x, o);
    check(o[191:0] == ctrl_rdata, "CONTROL captured");
    repeat (6) @(negedge clk);
    check(ctrl_wdata == x[191:0] && nload == 1, $sformatf("CONTROL written, %0d load pulses", nload));
    // STATUS and SAMPLE
    shift_ir(4'b1010, 0);
    shift_dr(72, '0, o);
    check(o[71:0] == status_in, "STATUS captured");
    shift_ir(4'b0010, 0);
    shift_dr(28, '0, o);
    check(o[27:0] == bsr_in, "SAMPLE captured");
    // GPO write then read back
    shift_ir(4'b1101, 0);
    shift_dr(12, 256'hA5C, o);
    check(gpo == 12'hA5C, "GPO written");
    shift_dr(12, 256'h000, o);
    check(o[11:0] == 12'hA5C, "GPO read back");
    // BYPASS: one bit of delay
    shift_ir(4'b1111, 0);
    x = 256'($urandom);
    shift_dr(20, x, o);
    check(o[19:1] == x[18:0], "BYPASS one-bit delay");
    // ASD chain: 15 ASD bits + 1 register here
    shift_ir(4'b1001, 0);
    x = {$urandom, $urandom};
    shift_dr(48, x, o);
    check(o[47:16] == x[31:0], "ASD chain 16 bits long");
    // parity error
    shift_ir(4'b1000, 1);
    check(jtag_error && instruction == 4'b1111, "bad parity: error, BYPASS");
    x = 256'($urandom);
    shift_dr(10, x, o);
    check(o[9:1] == x[8:0], "bad parity: behaves as BYPASS");
    shift_ir(4'b0001, 0);
    check(!jtag_error, "error cleared by a good instruction");
    // TMS reset
    shift_ir(4'b1010, 0);
    for (int i = 0; i < 5; i++) clock(1, 0);
    clock(0, 0);
    shift_dr(32, '0, o);
    check(o[31:0] == 32'h0A3D_2001, "TMS reset selects IDCODE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
