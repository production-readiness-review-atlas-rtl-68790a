// tb_readout_interface: self-checking test of the read-out interface.
// A queue plays the read-out FIFO. For every speed (80, 40, 20, 10 Mbit/s)
// and every strobe type, a receiver model recovers the frames from the two
// output lines alone: with the DS strobe a bit is taken whenever data XOR
// strobe changes; with the leading strobe a bit is taken at each strobe
// rising edge. Each frame must be start bit 1, the 32-bit packet {type, TDC
// ID, data} with even parity over packet and parity bit, and two 0 stop
// bits; packets must arrive complete and in order, and the measured bit
// period must match the speed. Then the parallel port is checked with a
// reader that takes words at random moments. The state check must stay
// quiet.
module tb_readout_interface;
  import amt_pkg::*;
  logic clk = 0, clk_ring = 0, rst = 1;
  logic enable_serial = 1, par_get = 0;
  logic [1:0] readout_speed = 0, strobe_select = 0;
  logic [3:0] tdc_id = 4'hA;
  logic ro_empty, ro_pop;
  ro_word_t ro_word;
  logic serial_data, serial_strobe, par_valid, state_error, busy;
  logic [31:0] par_data;
  ro_word_t src [$];
  logic [31:0] sent [$];
  int checks = 0, failures = 0;

  readout_interface dut (.clk, .clk_ring, .rst, .enable_serial, .readout_speed, .strobe_select,
    .tdc_id, .ro_empty, .ro_word, .ro_pop, .serial_data, .serial_strobe, .par_data, .par_valid,
    .par_get, .state_error, .busy);

  always #12.5 clk = ~clk;
  always #6.25 clk_ring = ~clk_ring;

  assign ro_empty = (src.size() == 0);
  assign ro_word  = ro_empty ? ro_word_t'('0) : src[0];

  always @(posedge clk) if (!rst) begin
    if (state_error) begin failures++; $display("FAIL state error at %0t", $time); end
    if (ro_pop && !ro_empty) begin
      sent.push_back({src[0].typ, tdc_id, src[0].data});
      #1 void'(src.pop_front());    // after the design has sampled the FIFO
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #20000000;
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver: bit events from the line pair
  logic rx_on = 0;
  int frames = 0;
  logic [35:0] sh;
  int nb = 0;
  realtime t_start, t_bit;
  logic xor_q = 0;
  event bit_ev;
  logic bit_v;

  always @(posedge serial_strobe) if (rx_on && strobe_select != 2'd0) begin bit_v = serial_data; ->bit_ev; end
  always @(serial_data or serial_strobe) if (rx_on && strobe_select == 2'd0) begin
    #0.1;
    if ((serial_data ^ serial_strobe) != xor_q) begin
      xor_q = serial_data ^ serial_strobe; bit_v = serial_data; ->bit_ev;
    end
  end

  always @(bit_ev) begin
    if (nb == 0) begin
      if (bit_v) begin nb = 1; t_start = $realtime; end
    end else begin
      sh = {sh[34:0], bit_v};
      nb++;
      if (nb == 36) begin
        logic [31:0] pk;
        t_bit = ($realtime - t_start) / 35.0;
        pk = sh[34:3];
        check(sent.size() > 0 && pk == sent[0], $sformatf("frame packet %h", pk));
        if (sent.size() > 0) void'(sent.pop_front());
        check(^sh[34:2] == 1'b0, "even parity");
        check(sh[1:0] == 2'b00, "two stop bits");
        check(t_bit > 12.5 * (1 << readout_speed) * 0.98 && t_bit < 12.5 * (1 << readout_speed) * 1.02,
              $sformatf("bit period %0.2f ns at speed %0d", t_bit, readout_speed));
        frames++;
        nb = 0;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int sp = 0; sp < 4; sp++) begin
      for (int ss = 0; ss < 3; ss++) begin
        int f0;
        @(negedge clk);
        readout_speed = 2'(sp); strobe_select = 2'(ss);
        tdc_id = 4'($urandom);
        repeat (2) @(negedge clk);
        xor_q = serial_data ^ serial_strobe;
        rx_on = 1;
        f0 = frames;
        for (int k = 0; k < 6; k++) src.push_back(ro_word_t'($urandom));
        while ((src.size() > 0 || sent.size() > 0) && frames - f0 < 10) @(negedge clk);
        repeat (100 * (1 << sp)) @(negedge clk);
        check(frames - f0 == 6 && !busy, $sformatf("six frames at speed %0d strobe %0d (%0d)", sp, ss, frames - f0));
        rx_on = 0;
        // strobe held low when off
      end
    end
    strobe_select = 2'd3;
    src.push_back(ro_word_t'($urandom));
    repeat (5) @(negedge clk);
    begin
      int toggles;
      toggles = 0;
      repeat (400) begin @(negedge clk); toggles += int'(serial_strobe); end
      check(toggles == 0, "strobe off");
    end
    sent.delete();
    // parallel
    enable_serial = 0;
    repeat (4) @(negedge clk);
    for (int k = 0; k < 50; k++) src.push_back(ro_word_t'($urandom));
    begin
      int got;
      got = 0;
      while (got < 50) begin
        @(negedge clk);
        par_get = 0;
        if (par_valid && $urandom_range(0, 2) == 0) begin
          check(sent.size() > 0 && par_data == sent[0], "parallel word");
          if (sent.size() > 0) void'(sent.pop_front());
          par_get = 1;
          got++;
        end
      end
      @(negedge clk); par_get = 0;
      repeat (3) @(negedge clk);
      check(!par_valid && src.size() == 0, "parallel: all words taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
