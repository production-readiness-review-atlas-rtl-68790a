// csr_regs: the 16 control registers (CSR0..CSR15) and 6 status registers
// (CSR16..CSR21), all 12 bits wide.
//
// Access (document): a 12-bit control bus and the JTAG port. The bus here is
// addr / wdata / we with a combinational rdata; status registers are read
// only. The JTAG CONTROL instruction reads and writes all 16 control
// registers at once as a 192-bit vector, CSR0 in the most significant bits.
// Bit layout: as in the chip's register tables; ctrl_t (amt_pkg) names every
// field; enable_channel is {CSR14, CSR13}.
// Parity (document): a parity bit is kept with the control registers and
// checked continuously, so a single-event upset of any bit raises
// parity_error. The parity is recomputed on every write (own choice).
// Reset values (own choice) follow the document's baseline operating
// conditions: pair mode; header, trailer and mask words on; matching
// window 800 ns (32 clocks), mask window 800 ns, search window 1000 ns (40);
// trigger latency 2.5 us (trigger counter 100 counts behind the bunch
// count), reject latency 3.5 us (140); roll-over 4095; all channels on;
// serial read-out at 40 Mbit/s with leading strobe; ring at 2x the clock;
// automatic rejection on; no read-out-full rejection (case A).
module csr_regs
  import amt_pkg::*;
#(
  parameter int NCTRL = 16,
  parameter int NSTAT = 6
) (
  input  logic                  clk,
  input  logic                  rst,           // power-on / pin reset only
  // 12-bit control bus
  input  logic [4:0]            addr,
  input  logic [11:0]           wdata,
  input  logic                  we,
  output logic [11:0]           rdata,
  // JTAG access to all control registers
  input  logic                  jtag_load,
  input  logic [NCTRL*12-1:0]   jtag_wdata,
  output logic [NCTRL*12-1:0]   ctrl_flat,
  // status inputs
  input  logic [11:0]           status [NSTAT],
  output ctrl_t                 cfg,
  output logic                  parity_error
);

  logic [11:0] r [NCTRL];
  logic        par;

  function automatic logic [11:0] rst_val(input int i);
    case (i)
      0:  return 12'b0000_0000_0001;   // pll_multi = 1 (ring at 2x clock)
      1:  return 12'd32;               // mask_window
      2:  return 12'd40;               // search_window
      3:  return 12'd32;               // match_window
      4:  return 12'd3956;             // reject_count_offset = 4096 - 140
      5:  return 12'd0;                // event_count_offset
      6:  return 12'd3996;             // bunch_count_offset = 4096 - 100
      7:  return 12'd0;                // coarse_time_offset
      8:  return 12'd4095;             // count_roll_over
      9:  return 12'b01_01_000_0_0000; // leading strobe, 40 Mbit/s
      10: return 12'b1011_0111_0100;   // auto_reject, match, mask, serial, header, trailer, pair
      11: return 12'b0000_0011_0000;   // errmark_ovr, l1ovr_detect
      12: return 12'b0001_1111_1111;   // all hardware errors enabled
      13: return 12'hFFF;
      14: return 12'hFFF;
      default: return 12'h000;
    endcase
  endfunction

  always_comb begin
    for (int i = 0; i < NCTRL; i++) ctrl_flat[(NCTRL-1-i)*12 +: 12] = r[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NCTRL; i++) r[i] <= rst_val(i);
    end else if (jtag_load) begin
      for (int i = 0; i < NCTRL; i++) r[i] <= jtag_wdata[(NCTRL-1-i)*12 +: 12];
    end else if (we && int'(addr) < NCTRL) begin
      r[int'(addr)] <= wdata;
    end
  end

  // Parity follows every write, so it is computed from the value written.
  logic [NCTRL*12-1:0] rst_flat, bus_flat;
  always_comb begin
    for (int i = 0; i < NCTRL; i++) rst_flat[(NCTRL-1-i)*12 +: 12] = rst_val(i);
    bus_flat = ctrl_flat;
    if (int'(addr) < NCTRL) bus_flat[(NCTRL-1-int'(addr))*12 +: 12] = wdata;
  end

  always_ff @(posedge clk) begin
    if (rst)                              par <= ^rst_flat;
    else if (jtag_load)                   par <= ^jtag_wdata;
    else if (we && int'(addr) < NCTRL)    par <= ^bus_flat;
  end

  assign parity_error = (^ctrl_flat) != par;

  always_comb begin
    if (int'(addr) < NCTRL)                rdata = r[int'(addr)];
    else if (int'(addr) < NCTRL + NSTAT)   rdata = status[int'(addr) - NCTRL];
    else                                   rdata = '0;
  end

  assign cfg = ctrl_t'({r[0], r[1], r[2], r[3], r[4], r[5], r[6], r[7], r[8],
                        r[9], r[10], r[11], r[12], r[14], r[13], r[15]});

endmodule
