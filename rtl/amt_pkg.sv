// amt_pkg: types and constants shared by the AMT TDC blocks.
//
// The AMT is a 24-channel TDC for drift-tube read-out. Hits are time-stamped
// with a 17-bit value (12-bit coarse time = bunch count, 5-bit fine time =
// LSB of the 80 MHz coarse counter plus the 4-bit vernier), kept in a 256-word
// level 1 buffer, matched against trigger time tags and sent out as 32-bit
// packets. The packet formats (type nibble, TDC ID nibble, 24-bit payload)
// and the error bit numbers follow the chip's published formats; the L1 word
// layout, the read-out FIFO word, the error word type code and the control
// register record are this design's own packing of the same information.
package amt_pkg;

  localparam int NCH        = 24;   // hit channels
  localparam int TAPS       = 16;   // ring-oscillator taps
  localparam int CW         = 13;   // coarse counter width (80 MHz)

  // Packet type nibbles (bits 31:28 of a 32-bit output packet).
  localparam logic [3:0] TYPE_HEADER   = 4'b1010;
  localparam logic [3:0] TYPE_TRAILER  = 4'b1100;
  localparam logic [3:0] TYPE_MASK     = 4'b0010;
  localparam logic [3:0] TYPE_SINGLE   = 4'b0011;
  localparam logic [3:0] TYPE_COMBINED = 4'b0100;
  localparam logic [3:0] TYPE_ERROR    = 4'b0110;   // own choice

  // Error flag bit numbers (hardware errors 0..8, temporal errors 9..12).
  localparam int ERR_COARSE      = 0;
  localparam int ERR_CHSEL       = 1;
  localparam int ERR_L1_PARITY   = 2;
  localparam int ERR_TF_PARITY   = 3;
  localparam int ERR_MATCH_STATE = 4;
  localparam int ERR_RO_PARITY   = 5;
  localparam int ERR_RO_STATE    = 6;
  localparam int ERR_CTRL_PARITY = 7;
  localparam int ERR_JTAG        = 8;
  localparam int ERR_L1_OVF      = 9;
  localparam int ERR_TF_OVF      = 10;
  localparam int ERR_RO_OVF      = 11;
  localparam int ERR_HIT         = 12;

  // One captured edge as it leaves a channel buffer: the raw tap snapshot and
  // both coarse counter copies, each with its parity bit.
  typedef struct packed {
    logic              trailing;   // 0 = leading edge, 1 = trailing edge
    logic              err;        // a hit was rejected before this one
    logic [TAPS-1:0]   taps;
    logic [CW-1:0]     ca;         // counter clocked on the rising edge
    logic              pa;
    logic [CW-1:0]     cb;         // counter clocked on the falling edge
    logic              pb;
  } edge_raw_t;

  // What a channel hands to the arbiter: one edge, or a leading/trailing pair.
  typedef struct packed {
    logic      pair;
    edge_raw_t lead;               // the edge itself when pair = 0
    edge_raw_t trail;
  } chan_word_t;

  // One level 1 buffer entry.
  typedef struct packed {
    logic        full_mark;        // written when the buffer went full / recovered
    logic        pair;             // combined leading + width measurement
    logic        trailing;
    logic        err;              // hit error (rejected hit, coarse or select error)
    logic [4:0]  ch;
    logic [7:0]  width;
    logic [11:0] coarse;
    logic [4:0]  fine;
  } l1_word_t;

  // Trigger FIFO entry.
  typedef struct packed {
    logic        lost;             // event_id is the last of a run of lost triggers
    logic [11:0] event_id;
    logic [11:0] tag;              // trigger time tag (bunch count)
  } trig_word_t;

  // Read-out FIFO entry: the packet without its TDC ID nibble.
  typedef struct packed {
    logic [3:0]  typ;
    logic [23:0] data;
  } ro_word_t;

  // Decoded control registers CSR0..CSR15.
  typedef struct packed {
    // CSR0
    logic        global_reset;
    logic        error_reset;
    logic        disable_encode;
    logic        enable_errrst_bcrevr;
    logic        test_mode;
    logic        test_invert;
    logic        enable_direct;
    logic        disable_ringosc;
    logic [1:0]  clkout_mode;
    logic [1:0]  pll_multi;
    // CSR1..CSR8
    logic [11:0] mask_window;
    logic [11:0] search_window;
    logic [11:0] match_window;
    logic [11:0] reject_count_offset;
    logic [11:0] event_count_offset;
    logic [11:0] bunch_count_offset;
    logic [11:0] coarse_time_offset;
    logic [11:0] count_roll_over;
    // CSR9
    logic [1:0]  strobe_select;
    logic [1:0]  readout_speed;
    logic [2:0]  width_select;
    logic        error_test;
    logic [3:0]  tdc_id;
    // CSR10
    logic        enable_auto_reject;
    logic        enable_l1occup_readout;
    logic        enable_match;
    logic        enable_mask;
    logic        enable_relative;
    logic        enable_serial;
    logic        enable_header;
    logic        enable_trailer;
    logic        enable_rejected;
    logic        enable_pair;
    logic        enable_trailing;
    logic        enable_leading;
    // CSR11
    logic        enable_rofull_reject;
    logic        enable_l1full_reject;
    logic        enable_trfull_reject;
    logic        enable_errmark;
    logic        inclk_boost;
    logic        enable_errmark_rejected;
    logic        enable_errmark_ovr;
    logic        enable_l1ovr_detect;
    logic        enable_mreset_code;
    logic        enable_resetcb_sepa;
    logic        enable_mreset_evrst;
    logic        enable_setcount_bcrst;
    // CSR12
    logic        enable_sepa_readout;
    logic        enable_sepa_bcrst;
    logic        enable_sepa_evrst;
    logic [8:0]  enable_error;
    // CSR13, CSR14, CSR15
    logic [23:0] enable_channel;
    logic [11:0] general_out;
  } ctrl_t;

  // Signed time difference a - b on a ring of (roll + 1) bunch counts, folded
  // into [-(roll+1)/2, (roll+1)/2).
  function automatic logic signed [13:0] tdiff(input logic [11:0] a,
                                               input logic [11:0] b,
                                               input logic [11:0] roll);
    logic signed [13:0] d, r;
    d = $signed({2'b00, a}) - $signed({2'b00, b});
    r = $signed({2'b00, roll}) + 14'sd1;
    if (d < -(r >>> 1))      d = d + r;
    else if (d >= (r >>> 1)) d = d - r;
    return d;
  endfunction

  // Next value of the 13-bit coarse counter, rolling over after {roll, 1}.
  function automatic logic [CW-1:0] coarse_next(input logic [CW-1:0] c,
                                                input logic [11:0]   roll);
    return (c == {roll, 1'b1}) ? '0 : c + 1'b1;
  endfunction

  // Previous value of the coarse counter on the same ring.
  function automatic logic [CW-1:0] coarse_prev(input logic [CW-1:0] c,
                                                input logic [11:0]   roll);
    return (c == '0) ? {roll, 1'b1} : c - 1'b1;
  endfunction

endpackage
