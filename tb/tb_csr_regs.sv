// tb_csr_regs: self-checking test of the control and status registers.
// Checks the reset values through the decoded configuration (pll_multi,
// windows, offsets, roll-over, mode bits, all channels enabled), random
// writes and read-back of the 16 control registers on the 12-bit bus,
// read-out of the 6 status registers, the position of several decoded fields
// (enable_match in CSR10, channel enables with channel 0 at CSR13 bit 0),
// loading all registers at once from JTAG, and that the parity check stays
// quiet after every legal write but fires when a stored bit is upset.
module tb_csr_regs;
  import amt_pkg::*;
  logic clk = 0, rst = 1, we = 0, jtag_load = 0;
  logic [4:0] addr = 0;
  logic [11:0] wdata = 0, rdata;
  logic [191:0] jtag_wdata = 0, ctrl_flat;
  logic [11:0] status [6];
  ctrl_t cfg;
  logic parity_error;
  logic [11:0] model [16];
  int checks = 0, failures = 0;

  csr_regs dut (.clk, .rst, .addr, .wdata, .we, .rdata, .jtag_load, .jtag_wdata,
                .ctrl_flat, .status, .cfg, .parity_error);

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

  task automatic wr(input int a, input logic [11:0] v);
    @(negedge clk); addr = 5'(a); wdata = v; we = 1;
    @(negedge clk); we = 0;
    if (a < 16) model[a] = v;
  endtask

  task automatic rd_check(input int a, input logic [11:0] v, input string what);
    @(negedge clk); addr = 5'(a); #1;
    check(rdata == v, $sformatf("%s: reg %0d = %h, expected %h", what, a, rdata, v));
  endtask

  initial begin
    for (int i = 0; i < 6; i++) status[i] = 12'(i * 273 + 5);
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(cfg.pll_multi == 2'd1 && cfg.mask_window == 12'd32 && cfg.search_window == 12'd40
          && cfg.match_window == 12'd32, "reset: windows and pll");
    check(cfg.bunch_count_offset == 12'd3996 && cfg.reject_count_offset == 12'd3956
          && cfg.count_roll_over == 12'd4095, "reset: offsets and roll-over");
    check(cfg.enable_match && cfg.enable_mask && cfg.enable_header && cfg.enable_trailer
          && cfg.enable_pair && cfg.enable_serial && cfg.enable_auto_reject, "reset: mode bits");
    check(cfg.enable_channel == 24'hFFFFFF && cfg.enable_error == 9'h1FF, "reset: enables");
    check(!parity_error, "reset: parity good");
    for (int i = 0; i < 16; i++) model[i] = dut.r[i];
    // random bus writes and read back
    for (int it = 0; it < 400; it++) begin
      int a;
      a = $urandom_range(0, 15);
      wr(a, 12'($urandom));
      check(!parity_error, "parity good after write");
      a = $urandom_range(0, 15);
      rd_check(a, model[a], "read back");
    end
    for (int i = 0; i < 6; i++) rd_check(16 + i, status[i], "status");
    rd_check(30, 12'h000, "unused address");
    // field positions
    wr(10, 12'b0010_0000_0000);
    check(cfg.enable_match && !cfg.enable_mask && !cfg.enable_auto_reject, "CSR10 enable_match bit");
    wr(13, 12'h001); wr(14, 12'h800);
    check(cfg.enable_channel == 24'h800001, "channel enables: ch0 = CSR13 bit 0, ch23 = CSR14 bit 11");
    wr(15, 12'hABC);
    check(cfg.general_out == 12'hABC, "CSR15 general out");
    wr(3, 12'd77);
    check(cfg.match_window == 12'd77, "CSR3 match window");
    // JTAG load of all registers
    @(negedge clk);
    jtag_wdata = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    jtag_load = 1;
    @(negedge clk); jtag_load = 0;
    check(ctrl_flat == jtag_wdata && !parity_error, "JTAG load");
    for (int i = 0; i < 16; i++) model[i] = jtag_wdata[(15 - i) * 12 +: 12];
    rd_check(5, model[5], "read after JTAG load");
    // upset
    dut.r[7][4] = ~dut.r[7][4];
    #1;
    check(parity_error, "upset detected by parity");
    wr(7, 12'h123);
    check(!parity_error, "parity good after rewrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
