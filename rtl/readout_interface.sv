// readout_interface: sends the read-out FIFO contents as 32-bit packets,
// serially or on a 32-bit parallel port.
//
// Packet (document): type nibble (31:28), TDC ID (27:24, programmable),
// 24 data bits. The read-out FIFO holds type and data; the TDC ID is added
// here.
// Serial frame (document): a start bit (1), the 32 packet bits, a parity bit
// and two stop bits (0); the line idles at 0. Bits go out MSB first and the
// parity bit makes the number of ones in the 32 packet bits plus parity even
// (bit order and parity sense are own choices). Speed (readout_speed):
// 0 = 80, 1 = 40, 2 = 20, 3 = 10 Mbit/s, i.e. one bit every 1, 2, 4 or 8
// periods of the 80 MHz ring clock (code assignment own choice).
// Strobe (strobe_select, own code assignment):
//   0  DS: the strobe toggles at every bit boundary where the data bit does
//      not change, so exactly one of the two lines changes per bit;
//   1  leading strobe, continuous: rises in the middle of every bit;
//   2  leading strobe, gated: as 1 but only while a frame is sent;
//   3  strobe held low.
// At 80 Mbit/s the leading strobe is the inverted ring clock itself, gated.
// Parallel (enable_serial = 0): the packet is presented on par_data with
// par_valid, and par_get (40 MHz domain) takes it.
// Clocking: the FIFO side runs on clk (40 MHz), the serializer on clk_ring
// (80 MHz). A one-word holding register passes packets across with a toggle
// handshake: the 40 MHz side flips load_tog when it fills the register, the
// serializer flips take_tog when it has copied it, and each side sees the
// other's toggle through two flip-flops. The two clocks have a fixed phase,
// but the handshake does not rely on which of two coinciding edges acts
// first. The handshake (about four 40 MHz cycles) overlaps a frame, which
// lasts at least 36 ring cycles, so frames follow back to back.
// The serializer state register is one-hot and checked (state_error).
module readout_interface
  import amt_pkg::*;
(
  input  logic        clk,
  input  logic        clk_ring,
  input  logic        rst,
  input  logic        enable_serial,
  input  logic [1:0]  readout_speed,
  input  logic [1:0]  strobe_select,
  input  logic [3:0]  tdc_id,
  // read-out FIFO
  input  logic        ro_empty,
  input  ro_word_t    ro_word,
  output logic        ro_pop,
  // serial output
  output logic        serial_data,
  output logic        serial_strobe,
  // parallel output
  output logic [31:0] par_data,
  output logic        par_valid,
  input  logic        par_get,
  output logic        state_error,
  output logic        busy            // a frame is being sent
);

  // ------------------------------------------------------ 40 MHz side
  logic [31:0] hold;
  logic        hold_full;                 // parallel mode: word waiting
  logic        load_tog, take_tog, take_s1, take_s2, hold_free;

  assign hold_free = enable_serial ? (load_tog == take_s2) : (!hold_full || par_get);
  assign ro_pop    = hold_free && !ro_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      hold      <= '0;
      hold_full <= 1'b0;
      load_tog  <= 1'b0;
      take_s1   <= 1'b0;
      take_s2   <= 1'b0;
    end else begin
      take_s1 <= take_tog;
      take_s2 <= take_s1;
      if (ro_pop) begin
        hold <= {ro_word.typ, tdc_id, ro_word.data};
        if (enable_serial) load_tog <= ~load_tog;
      end
      if (!enable_serial && hold_free) hold_full <= !ro_empty;
      else if (enable_serial)          hold_full <= 1'b0;
    end
  end

  assign par_data  = hold;
  assign par_valid = hold_full && !enable_serial;

  // ------------------------------------------------------ 80 MHz side
  typedef enum logic [1:0] { T_IDLE = 2'b01, T_SEND = 2'b10 } tstate_t;
  tstate_t     st;
  logic [35:0] shreg;
  logic [5:0]  nbits;
  logic [2:0]  div;
  logic [2:0]  period_m1;
  logic        ds, lead_q, bit_edge;
  logic        load_s1, load_s2;
  logic        framing;                   // the bit on the line belongs to a frame

  always_comb begin
    case (readout_speed)
      2'd0:    period_m1 = 3'd0;
      2'd1:    period_m1 = 3'd1;
      2'd2:    period_m1 = 3'd3;
      default: period_m1 = 3'd7;
    endcase
  end

  assign bit_edge = (div == period_m1);

  always_ff @(posedge clk_ring) begin
    if (rst) begin
      st          <= T_IDLE;
      shreg       <= '0;
      nbits       <= '0;
      div         <= '0;
      take_tog    <= 1'b0;
      load_s1     <= 1'b0;
      load_s2     <= 1'b0;
      framing     <= 1'b0;
      serial_data <= 1'b0;
      ds          <= 1'b0;
      lead_q      <= 1'b0;
    end else begin
      load_s1 <= load_tog;
      load_s2 <= load_s1;
      div    <= bit_edge ? 3'd0 : div + 3'd1;
      lead_q <= (period_m1 != 3'd0) && (div >= (period_m1 >> 1)) && !bit_edge;
      if (bit_edge) begin
        logic nb;
        nb = 1'b0;
        framing <= (st == T_SEND);
        unique case (st)
          T_IDLE: begin
            if (enable_serial && (load_s2 != take_tog)) begin
              nb       = 1'b1;                      // start bit
              framing  <= 1'b1;
              shreg    <= {hold, ^hold, 2'b00, 1'b0};
              nbits    <= 6'd35;
              take_tog <= ~take_tog;
              st       <= T_SEND;
            end
          end
          T_SEND: begin
            nb    = shreg[35];
            shreg <= {shreg[34:0], 1'b0};
            nbits <= nbits - 6'd1;
            if (nbits == 6'd1) st <= T_IDLE;
          end
          default: st <= T_IDLE;
        endcase
        serial_data <= nb;
        if (nb == serial_data) ds <= ~ds;
      end
    end
  end

  assign busy = (st == T_SEND);

  always_comb begin
    unique case (strobe_select)
      2'd0:    serial_strobe = ds;
      2'd1:    serial_strobe = (period_m1 == 3'd0) ? ~clk_ring : lead_q;
      2'd2:    serial_strobe = ((period_m1 == 3'd0) ? ~clk_ring : lead_q) && framing;
      default: serial_strobe = 1'b0;
    endcase
  end

  assign state_error = (st == T_IDLE) == (st == T_SEND);

endmodule
