// tb_amt_top: end-to-end test of the whole TDC at its full size (24
// channels, 256-word L1 buffer, 8-word trigger FIFO, 64-word read-out FIFO;
// no parameter is overridden).
// The bench drives the chip only through its pins: hit pulses on random
// channels, commands on the encoded control line (bunch count reset, event
// count reset, triggers, global reset), control register writes on the
// 12-bit bus, JTAG, and a reader on the parallel port or a receiver on the
// serial lines. For reference it notes, at each hit edge, the time since the
// last rising edge of the ring clock and the coarse count then running, which
// gives the 17-bit time the chip should report.
// Every event read out is parsed: header, data words, mask and error words,
// trailer with the right word count and event number; each data word must
// match a hit edge generated on that channel within one time bin, and single
// hits must lie inside the match window of their trigger.
// Phases: pair mode with parallel read-out; read-out stalled so the
// read-out FIFO fills and the trigger FIFO overflows (lost triggers); the same
// with rejection of hits on a full read-out FIFO; auto-rejection off and a
// hit flood so the L1 buffer overflows and recovers; leading-edge mode;
// serial read-out decoded from data and strobe; event count reset and global
// reset by encoded commands; IDCODE over JTAG; an upset in the L1 buffer
// raising the error pin, cleared by the error reset bit.
// Each mechanism is counted and the test fails if one never happened.
module tb_amt_top;
  import amt_pkg::*;
  logic ref_clk = 0, reset_n = 0;
  logic [23:0] hit = '0;
  logic encoded_control = 0, trigger_in = 0, bunch_reset_in = 0, event_reset_in = 0, global_reset_in = 0;
  logic [4:0] csr_addr = 0;
  logic [11:0] csr_wdata = 0, csr_rdata;
  logic csr_we = 0;
  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tdo;
  logic asd_tdi, asd_shift, asd_update;
  logic [11:0] jtag_gpo, general_out;
  logic serial_data, serial_strobe, par_valid, par_get = 0, error;
  logic [31:0] par_data;

  amt_top dut (.ref_clk, .reset_n, .hit, .encoded_control, .trigger_in, .bunch_reset_in,
    .event_reset_in, .global_reset_in, .csr_addr, .csr_wdata, .csr_we, .csr_rdata,
    .tck, .tms, .tdi, .trst_n, .tdo, .asd_tdi, .asd_shift, .asd_update, .asd_tdo(1'b0),
    .jtag_gpo, .serial_data, .serial_strobe, .par_data, .par_valid, .par_get,
    .general_out, .general_in(4'h5), .error);

  always #12.5 ref_clk = ~ref_clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000;   // 1 ms
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ mechanism counters
  int n_events = 0, n_hits_ok = 0, n_pair = 0, n_single = 0, n_mask = 0, n_err_words = 0;
  int n_stall = 0, n_tf_lost = 0, n_lost_events = 0, n_ro_reject = 0, n_auto = 0;
  int n_l1_lost = 0, n_l1_recover = 0, n_ch_reject = 0, n_frames = 0, n_mode_switch = 0;
  int n_enc_trig = 0, n_enc_bcr = 0, n_enc_ecr = 0, n_enc_gr = 0, n_error_pin = 0;
  always @(posedge dut.clk) begin
    n_stall       += int'(dut.ro_full && dut.match_running && !dut.ro_push);
    n_tf_lost     += int'(dut.trig_overflow);
    n_lost_events += int'(dut.ev_lost_event);
    n_ro_reject   += int'(dut.ev_ro_reject);
    n_auto        += int'(dut.ev_auto_reject);
    n_l1_lost     += int'(dut.l1_lost);
    n_l1_recover  += int'(dut.l1_recover);
    n_ch_reject   += int'(dut.ch_rejected != 0);
    n_enc_trig    += int'(dut.cmd_trigger);
    n_enc_bcr     += int'(dut.cmd_bcr);
    n_enc_ecr     += int'(dut.cmd_ecr);
    n_enc_gr      += int'(dut.cmd_greset);
  end
  always @(posedge error) n_error_pin++;

  // ------------------------------------------------ time reference
  realtime last_rise;
  int      last_cnt;
  always @(posedge dut.clk_ring) begin
    last_rise = $realtime;
    #0.001 last_cnt = int'(dut.cnt_a);
  end

  // An edge that lands on a ring clock edge in the same time step may be
  // captured with either coarse count; amb marks it.
  typedef struct { int ch; logic trailing; int t17; logic amb; } edge_t;
  edge_t edges [$];
  function automatic int now17();
    return (last_cnt * 16 + int'($floor(($realtime - last_rise) / 0.78125))) % 131072;
  endfunction
  task automatic pulse(input int ch, input real width);
    fork
      begin
        edge_t e;
        hit[ch] = 1'b1;
        e.ch = ch; e.trailing = 0; e.t17 = now17(); e.amb = ($realtime - last_rise) < 0.002; edges.push_back(e);
        #(width);
        hit[ch] = 1'b0;
        e.trailing = 1; e.t17 = now17(); e.amb = ($realtime - last_rise) < 0.002; edges.push_back(e);
        if (edges.size() > 20000) void'(edges.pop_front());
      end
    join_none
  endtask

  function automatic logic near(input int a, input int b, input int modulo);
    int d;
    d = ((a - b) % modulo + modulo) % modulo;
    return d <= 1 || d >= modulo - 1;
  endfunction

  // ------------------------------------------------ event parser
  int cur_ev = -1, cur_tag = 0, cur_words = 0, last_evid = -1;
  logic in_event = 0;
  logic check_window = 1;
  logic check_hits = 1;
  task automatic take_word(input logic [31:0] w);
    logic [3:0] typ;
    logic [23:0] d;
    typ = w[31:28]; d = w[23:0];
    check(w[27:24] == 4'h0, "TDC ID nibble");
    case (typ)
      TYPE_HEADER: begin
        check(!in_event, "header outside an event");
        in_event = 1; cur_ev = int'(d[23:12]); cur_tag = int'(d[11:0]); cur_words = 1;
      end
      TYPE_TRAILER: begin
        check(in_event && int'(d[23:12]) == cur_ev && int'(d[11:0]) == cur_words + 1,
              $sformatf("trailer of event %0d: count %0d, expected %0d", cur_ev, d[11:0], cur_words + 1));
        in_event = 0; n_events++; last_evid = cur_ev;
      end
      TYPE_MASK:  begin n_mask++; cur_words++; end
      TYPE_ERROR: begin n_err_words++; cur_words++; end
      TYPE_SINGLE, TYPE_COMBINED: begin
        int ch, t, found;
        cur_words++;
        ch = int'(d[23:19]);
        found = 0;
        if (typ == TYPE_SINGLE) begin
          t = int'({d[16:5], d[4:0]});
          n_single++;
          foreach (edges[i]) if (edges[i].ch == ch && edges[i].trailing == d[18] &&
                                 (near(edges[i].t17, t, 131072) || (edges[i].amb && near(edges[i].t17 + 16, t, 131072)))) found = 1;
          if (in_event && check_window) begin
            int dd;
            dd = ((int'(d[16:5]) - cur_tag) % 4096 + 4096) % 4096;
            check(dd <= 32, $sformatf("hit %0d bunches after its trigger tag", dd));
          end
          check(d[17] == 1'b0 || !check_window, "hit error flag clear");
        end else begin
          t = int'({d[10:5], d[4:0]});
          n_pair++;
          foreach (edges[i]) if (edges[i].ch == ch && !edges[i].trailing &&
                                 (near(edges[i].t17 % 2048, t, 2048) || (edges[i].amb && near((edges[i].t17 + 16) % 2048, t, 2048)))) found = 1;
        end
        if (check_hits) check(found != 0, $sformatf("data word %h matches a generated hit", w));
        if (found != 0) n_hits_ok++;
      end
      default: check(0, $sformatf("unknown word type %h", typ));
    endcase
  endtask

  // parallel reader
  logic reading = 1;
  always @(negedge ref_clk) begin
    par_get <= 1'b0;
    if (reading && par_valid && !par_get) begin
      take_word(par_data);
      par_get <= 1'b1;
    end
  end

  // serial receiver: leading strobe, a bit at each strobe rising edge
  logic [35:0] rx_sh;
  int rx_n = 0;
  logic rx_on = 0;
  always @(posedge serial_strobe) if (rx_on) begin
    if (rx_n == 0) begin
      if (serial_data) rx_n = 1;
    end else begin
      rx_sh = {rx_sh[34:0], serial_data};
      rx_n++;
      if (rx_n == 36) begin
        check(^rx_sh[34:2] == 1'b0 && rx_sh[1:0] == 2'b00, "serial frame parity and stop bits");
        take_word(rx_sh[34:3]);
        n_frames++;
        rx_n = 0;
      end
    end
  end

  // ------------------------------------------------ stimulus helpers
  task automatic csr_write(input int a, input logic [11:0] v);
    @(negedge ref_clk); csr_addr = 5'(a); csr_wdata = v; csr_we = 1;
    @(negedge ref_clk); csr_we = 0;
  endtask
  task automatic csr_read(input int a, output logic [11:0] v);
    @(negedge ref_clk); csr_addr = 5'(a); #1 v = csr_rdata;
  endtask
  // encoded command: start bit then two bits
  task automatic command(input logic b1, input logic b2);
    @(negedge ref_clk); encoded_control = 1;
    @(negedge ref_clk); encoded_control = b1;
    @(negedge ref_clk); encoded_control = b2;
    @(negedge ref_clk); encoded_control = 0;
  endtask
  // random hits and triggers for a time
  task automatic traffic(input int bunches, input int hit_per_mille, input int trig_per_mille);
    int last_hit [24];
    for (int c = 0; c < 24; c++) last_hit[c] = -100;
    for (int b = 0; b < bunches; b++) begin
      @(negedge ref_clk);
      if ($urandom_range(0, 999) < hit_per_mille) begin
        int c;
        c = $urandom_range(0, 23);
        if (b - last_hit[c] > 8) begin
          #($urandom_range(0, 2400) / 100.0);
          pulse(c, 15.0 + $urandom_range(0, 4000) / 100.0);
          last_hit[c] = b;
        end
      end
      if ($urandom_range(0, 999) < trig_per_mille) command(0, 0);
    end
  endtask
  task automatic drain();
    repeat (400) @(negedge ref_clk);
    while (dut.match_running || !dut.tf_empty || !dut.ro_empty || par_valid) @(negedge ref_clk);
    repeat (200) @(negedge ref_clk);
  endtask

  // JTAG helpers
  task automatic jclock(input logic m, input logic d);
    tms = m; tdi = d; #20 tck = 1; #20 tck = 0;
  endtask

  initial begin
    logic [11:0] v;
    logic [31:0] id;
    #1 trst_n = 0;                 // TAP held in reset at power-up
    repeat (10) @(negedge ref_clk);
    reset_n = 1;
    trst_n = 1;
    repeat (10) @(negedge ref_clk);
    // parallel read-out, everything else at its reset value (pair mode)
    csr_write(10, 12'hB34);
    csr_read(10, v);
    check(v == 12'hB34, "control register write and read back");
    command(1, 0);                               // bunch count reset
    // ---- phase 1: normal running
    traffic(3000, 300, 12);
    drain();
    check(n_events > 20 && n_pair > 100, $sformatf("phase 1: %0d events, %0d pair words", n_events, n_pair));
    check(!in_event, "phase 1: all events complete");
    // ---- phase 2: read-out stalled, trigger FIFO overflows
    reading = 0;
    traffic(1500, 300, 40);
    reading = 1;
    drain();
    check(n_stall > 0 && n_tf_lost > 0 && n_lost_events > 0,
          $sformatf("phase 2: stall %0d, lost triggers %0d, empty events %0d", n_stall, n_tf_lost, n_lost_events));
    // ---- phase 3: reject hits when the read-out FIFO is full
    csr_write(11, 12'h830);
    for (int round = 0; round < 4 && n_ro_reject == 0; round++) begin
      reading = 0;
      traffic(1000, 900, 15);
      reading = 1;
      drain();
    end
    csr_write(11, 12'h030);
    check(n_ro_reject > 0, $sformatf("phase 3: %0d hits rejected on a full read-out FIFO", n_ro_reject));
    // ---- phase 4: L1 overflow (auto-rejection off, flood, no triggers)
    csr_write(10, 12'h334);
    check_window = 0;
    traffic(2500, 1000, 0);
    csr_write(10, 12'hB34);
    repeat (600) @(negedge ref_clk);
    traffic(300, 100, 0);
    repeat (600) @(negedge ref_clk);
    traffic(400, 200, 20);
    drain();
    check_window = 1;
    check(n_l1_lost > 0 && n_l1_recover > 0, $sformatf("phase 4: L1 lost %0d, recovered %0d", n_l1_lost, n_l1_recover));
    check(n_auto > 0, $sformatf("auto rejection %0d", n_auto));
    // ---- phase 5: leading edges only
    begin
      int s0;
      s0 = n_single;
      csr_write(10, 12'hB31);
      n_mode_switch++;
      traffic(1500, 300, 12);
      drain();
      check(n_single - s0 > 50, "phase 5: single leading-edge words");
    end
    // ---- phase 6: serial read-out, 40 Mbit/s, leading strobe (reset values)
    reading = 0;
    rx_on = 1;
    csr_write(10, 12'hB71);
    n_mode_switch++;
    traffic(2000, 200, 8);
    drain();
    repeat (3000) @(negedge ref_clk);
    rx_on = 0;
    check(n_frames > 50, $sformatf("phase 6: %0d serial frames", n_frames));
    csr_write(10, 12'hB34);
    reading = 1;
    n_mode_switch++;
    // ---- phase 7: event count reset, then global reset, by command
    command(1, 1);
    traffic(200, 200, 0);
    command(0, 0);
    traffic(200, 200, 0);
    drain();
    check(last_evid == 0, $sformatf("event number restarts after event count reset (%0d)", last_evid));
    command(0, 1);
    repeat (5) @(negedge ref_clk);
    check(dut.l1_wr_ptr == 0 && dut.ro_empty, "global reset clears the buffers");
    csr_read(10, v);
    check(v == 12'hB34, "global reset keeps the control registers");
    command(1, 0);
    // ---- phase 8: JTAG IDCODE
    trst_n = 0; #50 trst_n = 1;
    jclock(0, 0); jclock(1, 0); jclock(0, 0); jclock(0, 0);
    for (int i = 0; i < 32; i++) begin #1 id[i] = tdo; jclock(i == 31, 0); end
    jclock(1, 0); jclock(0, 0);
    check(id == 32'h0A3D_2001, $sformatf("JTAG IDCODE %h", id));
    // ---- phase 9: L1 upset raises the error pin; error reset clears it
    check_hits = 0;                // the upset word itself is wrong
    traffic(100, 300, 0);
    @(negedge ref_clk);
    dut.u_l1.mem[dut.l1_start_ptr[7:0]][2] = ~dut.u_l1.mem[dut.l1_start_ptr[7:0]][2];
    command(0, 0);
    traffic(300, 100, 0);
    drain();
    check(error, "error pin set by an L1 parity error");
    csr_read(16, v);
    check(v[ERR_L1_PARITY], "status register shows the L1 parity error");
    csr_write(0, 12'h401);
    csr_write(0, 12'h001);
    @(negedge ref_clk);
    check(!error, "error reset clears the error pin");
    // ---- mechanism summary
    check(n_enc_trig > 100 && n_enc_bcr > 0 && n_enc_ecr > 0 && n_enc_gr > 0, "encoded commands used");
    check(n_mask > 0, $sformatf("mask words %0d", n_mask));
    check(n_err_words > 0, $sformatf("error words %0d", n_err_words));
    check(n_ch_reject > 0 && n_mode_switch == 3 && n_error_pin > 0, "mode switches and error pin");
    $display("mechanisms: events %0d hits %0d pair %0d single %0d mask %0d err %0d stall %0d tf_lost %0d lost_ev %0d ro_rej %0d auto %0d l1_lost %0d l1_rec %0d ch_rej %0d frames %0d",
             n_events, n_hits_ok, n_pair, n_single, n_mask, n_err_words, n_stall, n_tf_lost,
             n_lost_events, n_ro_reject, n_auto, n_l1_lost, n_l1_recover, n_ch_reject, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
