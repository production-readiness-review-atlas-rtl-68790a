// amt_top: the 24-channel AMT time-to-digital converter.
//
// Data path: each hit input has a channel buffer that, on every leading and
// trailing edge, captures the 16 ring-oscillator taps and the two coarse
// counter copies. Complete measurements (an edge, or a leading/trailing pair)
// request the level 1 buffer; the channel arbiter serves one per 40 MHz
// cycle, the hit encoder turns the snapshot into a 17-bit time (and 8-bit
// width in pair mode) and writes it, with the channel number, into the
// 256-word L1 buffer. Triggers (from the encoded control line or direct
// inputs) become time tags and event numbers in the 8-word trigger FIFO. The
// trigger matching takes one trigger at a time, scans the L1 buffer for hits
// in its matching and mask windows and writes header, hits, mask and error
// words and trailer into the 64-word read-out FIFO; the read-out interface
// sends them as 32-bit packets, serially or in parallel.
// Control: 16 control and 6 status registers on a 12-bit bus or through
// JTAG; nine hardware error conditions are collected in the error monitor.
// Clocks: ref_clk is the 40 MHz bunch clock. The PLL model makes the 80 MHz
// ring clock (coarse counter, serializer), the 16 taps and the internal
// 40 MHz clock that runs everything else. tck is the JTAG clock.
// Resets: reset_n (pin) resets everything including the control registers;
// the global reset command and the global_reset control bit reset everything
// but the control registers. All resets act synchronously after a
// two-flip-flop synchroniser (own choice).
// The one exception is the capture register of each channel, clocked by the
// hit itself, which chip_rst clears asynchronously; lint therefore sees
// chip_rst (and the taps, which the capture registers sample) used both
// synchronously and asynchronously, which is intended.
// Control bits that the register map names without giving their effect
// (test_mode, test_invert, enable_direct, clkout_mode, error_test,
// enable_l1occup_readout, inclk_boost, errmark_rejected, mreset_code,
// resetcb_sepa, mreset_evrst, setcount_bcrst) are stored and read back but
// have no effect here; several status and event signals are likewise
// only counted or left for observation.
// LVDS pairs of the chip are single-ended signals here.
module amt_top
  import amt_pkg::*;
#(
  parameter int L1_DEPTH = 256,
  parameter int TF_DEPTH = 8,
  parameter int RO_DEPTH = 64
) (
  input  logic              ref_clk,
  input  logic              reset_n,
  input  logic [NCH-1:0]    hit,
  // trigger and resets
  input  logic              encoded_control,
  input  logic              trigger_in,
  input  logic              bunch_reset_in,
  input  logic              event_reset_in,
  input  logic              global_reset_in,
  // 12-bit control bus
  input  logic [4:0]        csr_addr,
  input  logic [11:0]       csr_wdata,
  input  logic              csr_we,
  output logic [11:0]       csr_rdata,
  // JTAG
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  input  logic              trst_n,
  output logic              tdo,
  output logic              asd_tdi,
  output logic              asd_shift,
  output logic              asd_update,
  input  logic              asd_tdo,
  output logic [11:0]       jtag_gpo,
  // read-out
  output logic              serial_data,
  output logic              serial_strobe,
  output logic [31:0]       par_data,
  output logic              par_valid,
  input  logic              par_get,
  // general purpose and error
  output logic [11:0]       general_out,
  input  logic [3:0]        general_in,
  output logic              error
);

  localparam int L1AW = $clog2(L1_DEPTH);
  localparam int TFAW = $clog2(TF_DEPTH);
  localparam int ROAW = $clog2(RO_DEPTH);

  ctrl_t cfg;

  // ------------------------------------------------------------- clocks
  logic            clk, clk_ring;
  logic [TAPS-1:0] taps;

  pll_ring_osc #(.TAPS(TAPS)) u_pll (
    .ref_clk, .pll_multi(cfg.pll_multi), .disable_ringosc(cfg.disable_ringosc),
    .clk_ring, .clk40(clk), .taps
  );

  // ------------------------------------------------------------- resets
  logic [1:0] rst_sync;
  logic       rst_pin, chip_rst;
  logic       cmd_trigger, cmd_bcr, cmd_ecr, cmd_greset;

  always_ff @(posedge clk) rst_sync <= {rst_sync[0], !reset_n};
  assign rst_pin = rst_sync[1];

  always_ff @(posedge clk) chip_rst <= rst_pin || cmd_greset || cfg.global_reset;

  control_decoder u_dec (
    .clk, .rst(rst_pin), .encoded(encoded_control), .disable_encode(cfg.disable_encode),
    .direct_trigger(trigger_in), .direct_bunch_reset(bunch_reset_in),
    .direct_event_reset(event_reset_in), .direct_global_reset(global_reset_in),
    .trigger(cmd_trigger), .bunch_reset(cmd_bcr), .event_reset(cmd_ecr),
    .global_reset(cmd_greset)
  );

  // ------------------------------------------------------ coarse counter
  logic [CW-1:0] cnt_a, cnt_b;
  logic          par_a, par_b;

  coarse_counter u_cc (
    .clk_ring, .load(chip_rst || cmd_bcr),
    .coarse_time_offset(cfg.coarse_time_offset), .count_roll_over(cfg.count_roll_over),
    .cnt_a, .par_a, .cnt_b, .par_b
  );

  // ------------------------------------------------------ channel buffers
  logic [NCH-1:0] ch_req, ch_grant, ch_rejected;
  chan_word_t     ch_word [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [2:0] occ;
    channel_buffer #(.DEPTH(4)) u_cb (
      .clk, .rst(chip_rst), .hit(hit[c]), .taps, .cnt_a, .par_a, .cnt_b, .par_b,
      .enable(cfg.enable_channel[c]), .enable_leading(cfg.enable_leading),
      .enable_trailing(cfg.enable_trailing), .enable_pair(cfg.enable_pair),
      .enable_rejected(cfg.enable_rejected),
      .req(ch_req[c]), .word(ch_word[c]), .grant(ch_grant[c]),
      .rejected(ch_rejected[c]), .occupancy(occ)
    );
  end

  // ------------------------------------------- arbitration and encoding
  logic       arb_valid, chsel_error;
  chan_word_t arb_word;
  logic [4:0] arb_ch;

  channel_arbiter #(.NCH_P(NCH)) u_arb (
    .clk, .rst(chip_rst), .req(ch_req), .words(ch_word), .grant(ch_grant),
    .valid(arb_valid), .word(arb_word), .ch(arb_ch), .chsel_error
  );

  logic     enc_valid, coarse_error;
  l1_word_t enc_word;

  hit_encoder u_enc (
    .clk, .rst(chip_rst), .in_valid(arb_valid), .in_word(arb_word), .in_ch(arb_ch),
    .chsel_error, .count_roll_over(cfg.count_roll_over), .width_select(cfg.width_select),
    .out_valid(enc_valid), .out_word(enc_word), .coarse_error
  );

  // ----------------------------------------------------- level 1 buffer
  logic [L1AW:0]   l1_wr_ptr, l1_start_ptr, l1_occ, l1_rd_ptr;
  logic [L1AW-1:0] l1_rd_addr;
  l1_word_t        l1_rd_word;
  logic            l1_par_err, l1_empty, l1_nearly_full, l1_overflow, l1_recover, l1_lost;

  l1_buffer #(.DEPTH(L1_DEPTH)) u_l1 (
    .clk, .rst(chip_rst), .wr_valid(enc_valid), .wr_word(enc_word),
    .start_ptr(l1_start_ptr), .rd_addr(l1_rd_addr), .rd_word(l1_rd_word),
    .rd_parity_error(l1_par_err), .wr_ptr(l1_wr_ptr), .occupancy(l1_occ),
    .empty(l1_empty), .nearly_full(l1_nearly_full), .overflow(l1_overflow),
    .over_recover(l1_recover), .lost(l1_lost)
  );

  // --------------------------------------------- trigger interface, FIFO
  logic        tf_push, tf_pop, tf_empty, tf_full, tf_nearly_full, tf_par_err;
  trig_word_t  tf_wr_word, tf_rd_word;
  logic [TFAW:0] tf_occ;
  logic [11:0] trig_count, reject_count, event_count;
  logic        trig_lost_pending, trig_overflow;

  trigger_interface u_ti (
    .clk, .rst(chip_rst), .trigger(cmd_trigger), .bunch_reset(cmd_bcr),
    .event_reset(cmd_ecr), .bunch_count_offset(cfg.bunch_count_offset),
    .reject_count_offset(cfg.reject_count_offset), .event_count_offset(cfg.event_count_offset),
    .count_roll_over(cfg.count_roll_over), .fifo_full(tf_full),
    .push(tf_push), .push_word(tf_wr_word), .trig_count, .reject_count, .event_count,
    .lost_pending(trig_lost_pending), .overflow(trig_overflow)
  );

  trigger_fifo #(.DEPTH(TF_DEPTH)) u_tf (
    .clk, .rst(chip_rst), .push(tf_push), .wr_word(tf_wr_word), .pop(tf_pop),
    .rd_word(tf_rd_word), .empty(tf_empty), .full(tf_full), .nearly_full(tf_nearly_full),
    .occupancy(tf_occ), .parity_error(tf_par_err)
  );

  // ------------------------------------------------------ trigger matching
  logic        ro_full, ro_push, ro_empty, ro_nearly_full, ro_pop, ro_par_err;
  ro_word_t    ro_wr_word, ro_rd_word;
  logic [ROAW:0] ro_occ;
  logic [8:0]  err_flags;
  logic        match_state_err, match_running, l1_rd_valid;
  logic        ev_matched, ev_masked, ev_ro_reject, ev_auto_reject, ev_lost_event;

  trigger_matching #(.L1_DEPTH(L1_DEPTH)) u_tm (
    .clk, .rst(chip_rst), .cfg, .event_reset(cmd_ecr),
    .tf_empty, .tf_full, .tf_word(tf_rd_word), .tf_pop,
    .wr_ptr(l1_wr_ptr), .rd_addr(l1_rd_addr), .rd_word(l1_rd_word),
    .l1_nearly_full, .start_ptr(l1_start_ptr), .reject_count,
    .ro_full, .ro_push, .ro_word(ro_wr_word),
    .hard_errors(err_flags), .state_error(match_state_err), .running(match_running),
    .rd_ptr(l1_rd_ptr), .rd_valid(l1_rd_valid),
    .ev_matched, .ev_masked, .ev_ro_reject, .ev_auto_reject, .ev_lost_event
  );

  readout_fifo #(.DEPTH(RO_DEPTH)) u_ro (
    .clk, .rst(chip_rst), .push(ro_push), .wr_word(ro_wr_word), .pop(ro_pop),
    .rd_word(ro_rd_word), .empty(ro_empty), .full(ro_full), .nearly_full(ro_nearly_full),
    .occupancy(ro_occ), .parity_error(ro_par_err)
  );

  // ------------------------------------------------------------ read-out
  logic ro_state_err, ser_busy;

  readout_interface u_out (
    .clk, .clk_ring, .rst(chip_rst), .enable_serial(cfg.enable_serial),
    .readout_speed(cfg.readout_speed), .strobe_select(cfg.strobe_select),
    .tdc_id(cfg.tdc_id), .ro_empty, .ro_word(ro_rd_word), .ro_pop,
    .serial_data, .serial_strobe, .par_data, .par_valid, .par_get,
    .state_error(ro_state_err), .busy(ser_busy)
  );

  // ------------------------------------------------ registers and errors
  logic [11:0]  status [6];
  logic [191:0] ctrl_flat, jtag_ctrl_wdata;
  logic         jtag_ctrl_load, ctrl_par_err, jtag_error;
  logic [3:0]   jtag_instr;
  logic         l1_recovered;

  always_ff @(posedge clk) begin
    if (chip_rst)        l1_recovered <= 1'b0;
    else if (l1_recover) l1_recovered <= 1'b1;
  end

  assign status[0] = {ro_empty, ro_full, ctrl_par_err, err_flags};
  assign status[1] = {l1_empty, l1_nearly_full, l1_recovered, l1_overflow, l1_wr_ptr[L1AW-1 -: 8]};
  assign status[2] = {tf_empty, tf_nearly_full, tf_full, match_running, l1_rd_ptr[L1AW-1 -: 8]};
  assign status[3] = {cnt_a[0], 3'(tf_occ), l1_start_ptr[L1AW-1 -: 8]};
  assign status[4] = cnt_a[12:1];
  assign status[5] = {general_in, 2'b00, 6'(ro_occ)};

  csr_regs u_csr (
    .clk, .rst(rst_pin), .addr(csr_addr), .wdata(csr_wdata), .we(csr_we), .rdata(csr_rdata),
    .jtag_load(jtag_ctrl_load), .jtag_wdata(jtag_ctrl_wdata), .ctrl_flat,
    .status, .cfg, .parity_error(ctrl_par_err)
  );

  logic [8:0] err_src;
  assign err_src = {jtag_error, ctrl_par_err, ro_state_err, ro_par_err, match_state_err,
                    tf_par_err, l1_par_err && l1_rd_valid, chsel_error, coarse_error};

  error_monitor u_err (
    .clk, .rst(chip_rst),
    .error_reset(cfg.error_reset || (cfg.enable_errrst_bcrevr && (cmd_bcr || cmd_ecr))),
    .enable_error(cfg.enable_error), .sources(err_src), .flags(err_flags), .any_error(error)
  );

  jtag_tap u_jtag (
    .tck, .tms, .tdi, .trst_n, .tdo, .clk, .rst(rst_pin),
    .ctrl_rdata(ctrl_flat), .ctrl_wdata(jtag_ctrl_wdata), .ctrl_load(jtag_ctrl_load),
    .status_in({status[0], status[1], status[2], status[3], status[4], status[5]}),
    .bsr_in({hit, encoded_control, trigger_in, bunch_reset_in, event_reset_in}),
    .asd_tdi, .asd_shift, .asd_update, .asd_tdo, .gpo(jtag_gpo), .jtag_error,
    .instruction(jtag_instr)
  );

  assign general_out = cfg.general_out;

endmodule
