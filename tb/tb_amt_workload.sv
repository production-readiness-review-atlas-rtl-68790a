// tb_amt_workload: the chip at full size under the running conditions it is
// built for, with the occupancies measured.
// Two runs with Poisson-like random hits on all 24 channels, each channel
// dead for 800 ns after a hit (as the front-end discriminator is), and
// random triggers at 100 kHz on average with at least 125 ns between them,
// read out serially at 40 Mbit/s in pair mode with the reset-value settings:
//   run 1: 100 kHz hits per channel. Expected mean L1 occupancy about
//          24 x (2.5 us + 0.8 us) / 10 us = 7.9 words; checked to lie in
//          4..14, with no L1 overflow, no lost trigger, the trigger FIFO never
//          above 4 entries, and every trigger giving one complete event.
//   run 2: 400 kHz hits per channel. The serial link is then near its limit
//          (about 32 of 40 Mbit/s); checked: every trigger still gives exactly
//          one event (possibly an empty one marking lost triggers), the
//          frames are well formed, and the mean L1 occupancy has grown
//          (about 24 x 3.3 us / 2.5 us = 32 words expected).
// Measured values are printed. Runs take 200 us of simulated time each.
module tb_amt_workload;
  import amt_pkg::*;
  logic ref_clk = 0, reset_n = 0;
  logic [23:0] hit = '0;
  logic encoded_control = 0;
  logic [4:0] csr_addr = 0;
  logic [11:0] csr_wdata = 0, csr_rdata;
  logic csr_we = 0;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo;
  logic asd_tdi, asd_shift, asd_update;
  logic [11:0] jtag_gpo, general_out;
  logic serial_data, serial_strobe, par_valid, error;
  logic [31:0] par_data;

  amt_top dut (.ref_clk, .reset_n, .hit, .encoded_control, .trigger_in(1'b0),
    .bunch_reset_in(1'b0), .event_reset_in(1'b0), .global_reset_in(1'b0),
    .csr_addr, .csr_wdata, .csr_we, .csr_rdata,
    .tck, .tms, .tdi, .trst_n, .tdo, .asd_tdi, .asd_shift, .asd_update, .asd_tdo(1'b0),
    .jtag_gpo, .serial_data, .serial_strobe, .par_data, .par_valid, .par_get(1'b0),
    .general_out, .general_in(4'h0), .error);

  always #12.5 ref_clk = ~ref_clk;

  int checks = 0, failures = 0;
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

  // occupancy statistics
  longint occ_sum = 0, occ_n = 0;
  int occ_max = 0, tf_max = 0, l1_full_unmarked = 0;
  logic measuring = 0;
  always @(posedge dut.clk) if (measuring) begin
    occ_sum += longint'(dut.l1_occ);
    occ_n++;
    if (int'(dut.l1_occ) > occ_max) occ_max = int'(dut.l1_occ);
    if (int'(dut.tf_occ) > tf_max)  tf_max  = int'(dut.tf_occ);
  end
  int n_tf_lost = 0, n_l1_lost = 0;
  logic counting = 0;
  always @(posedge dut.clk) if (counting) begin
    n_tf_lost += int'(dut.trig_overflow);
    n_l1_lost += int'(dut.l1_lost);
  end

  // serial receiver (leading strobe): count headers and trailers
  logic [35:0] rx_sh;
  int rx_n = 0, n_headers = 0, n_trailers = 0, n_frames = 0, n_bad = 0;
  always @(posedge serial_strobe) begin
    if (rx_n == 0) begin
      if (serial_data) rx_n = 1;
    end else begin
      rx_sh = {rx_sh[34:0], serial_data};
      rx_n++;
      if (rx_n == 36) begin
        n_frames++;
        if (^rx_sh[34:2] != 1'b0 || rx_sh[1:0] != 2'b00) n_bad++;
        if (rx_sh[34:31] == TYPE_HEADER)  n_headers++;
        if (rx_sh[34:31] == TYPE_TRAILER) n_trailers++;
        rx_n = 0;
      end
    end
  end

  task automatic command(input logic b1, input logic b2);
    @(negedge ref_clk); encoded_control = 1;
    @(negedge ref_clk); encoded_control = b1;
    @(negedge ref_clk); encoded_control = b2;
    @(negedge ref_clk); encoded_control = 0;
  endtask

  // one run: hits with probability 1/hit_period per channel and bunch
  int n_trig = 0;
  task automatic run(input int hit_period, input int bunches);
    int dead [24];
    int gap;
    for (int c = 0; c < 24; c++) dead[c] = 0;
    gap = 0;
    for (int b = 0; b < bunches; b++) begin
      @(negedge ref_clk);
      for (int c = 0; c < 24; c++) begin
        if (dead[c] > 0) dead[c]--;
        else if ($urandom_range(0, hit_period - 1) == 0) begin
          automatic int cc = c;
          dead[c] = 32;                                // 800 ns
          fork begin
            #($urandom_range(0, 2400) / 100.0);
            hit[cc] = 1'b1;
            #(15.0 + $urandom_range(0, 2500) / 100.0);
            hit[cc] = 1'b0;
          end join_none
        end
      end
      gap++;
      // triggers: mean 400 bunches apart (100 kHz), at least 5 (125 ns)
      if (gap >= 5 && $urandom_range(0, 394) == 0) begin
        gap = 0;
        n_trig++;
        fork command(0, 0); join_none
      end
    end
  endtask

  task automatic drain();
    repeat (200) @(negedge ref_clk);
    while (dut.match_running || !dut.tf_empty || !dut.ro_empty || dut.ser_busy) @(negedge ref_clk);
    repeat (400) @(negedge ref_clk);
  endtask

  initial begin
    real mean;
    #1 trst_n = 0;
    repeat (10) @(negedge ref_clk);
    reset_n = 1;
    trst_n = 1;
    repeat (10) @(negedge ref_clk);
    command(1, 0);                                    // bunch count reset
    counting = 1;
    repeat (200) @(negedge ref_clk);
    // ---- run 1: 100 kHz
    measuring = 1;
    run(400, 8000);
    measuring = 0;
    drain();
    mean = real'(occ_sum) / real'(occ_n);
    $display("100 kHz: triggers %0d events %0d frames %0d, L1 mean %0.2f max %0d, trigger FIFO max %0d",
             n_trig, n_headers, n_frames, mean, occ_max, tf_max);
    check(mean > 4.0 && mean < 14.0, $sformatf("L1 mean occupancy %0.2f near 7.9", mean));
    check(n_l1_lost == 0 && n_tf_lost == 0, "no hit or trigger lost at 100 kHz");
    check(tf_max <= 4, $sformatf("trigger FIFO occupancy %0d stays low", tf_max));
    check(n_headers == n_trig && n_trailers == n_trig, "one event per trigger");
    check(n_bad == 0, "serial frames well formed");
    // ---- run 2: 400 kHz
    occ_sum = 0; occ_n = 0; occ_max = 0; tf_max = 0;
    measuring = 1;
    run(100, 8000);
    measuring = 0;
    drain();
    mean = real'(occ_sum) / real'(occ_n);
    $display("400 kHz: triggers %0d events %0d frames %0d, L1 mean %0.2f max %0d, trigger FIFO max %0d, lost triggers %0d, L1 losses %0d",
             n_trig, n_headers, n_frames, mean, occ_max, tf_max, n_tf_lost, n_l1_lost);
    check(n_headers == n_trig && n_trailers == n_trig, "one event per trigger at 400 kHz");
    check(n_bad == 0, "serial frames well formed at 400 kHz");
    check(mean > 20.0, $sformatf("L1 mean occupancy %0.2f grows with the hit rate", mean));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
