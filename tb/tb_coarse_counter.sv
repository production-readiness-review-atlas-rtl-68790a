// tb_coarse_counter: runs the coarse counter on an 80 MHz clock. Checks that
// a load puts {offset, 0} into both copies, that copy A counts once per
// rising edge and rolls over to 0 after {roll_over, 1}, that copy B equals A
// in the first half of each period and A + 1 (on the same ring) in the
// second, and that both parity bits are even parity of their counts.
module tb_coarse_counter;
  import amt_pkg::*;
  logic        clk_ring = 0;
  logic        load;
  logic [11:0] offset, roll;
  logic [12:0] cnt_a, cnt_b;
  logic        par_a, par_b;
  int checks = 0, failures = 0;
  int exp_a;

  coarse_counter dut (.clk_ring, .load, .coarse_time_offset(offset), .count_roll_over(roll),
                      .cnt_a, .par_a, .cnt_b, .par_b);

  always #6.25 clk_ring = ~clk_ring;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t a=%0d b=%0d exp=%0d", what, $realtime, cnt_a, cnt_b, exp_a); end
  endtask

  initial begin
    offset = 12'd10; roll = 12'd20; load = 1;
    repeat (2) @(posedge clk_ring);
    #1;
    check(cnt_a == 13'd20 && cnt_b == 13'd20, "load offset, LSB 0");
    load = 0;
    exp_a = 20;
    for (int n = 0; n < 120; n++) begin
      @(posedge clk_ring); #1;
      exp_a = (exp_a == 41) ? 0 : exp_a + 1;        // roll over after {20,1} = 41
      check(cnt_a == 13'(exp_a), "A counts and rolls over");
      check(cnt_b == cnt_a, "B equals A in first half");
      check(par_a == ^cnt_a && par_b == ^cnt_b, "parity");
      @(negedge clk_ring); #1;
      check(cnt_b == 13'((exp_a == 41) ? 0 : exp_a + 1), "B is A+1 in second half");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
