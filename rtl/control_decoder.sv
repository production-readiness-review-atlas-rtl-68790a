// control_decoder: decodes the encoded trigger / reset line, or passes the
// direct trigger and reset inputs when encoding is disabled.
//
// Encoding (document): a command is a start bit (1) followed by two bits,
// one bit per 40 MHz clock, so one command fits in three clock periods:
//   1 0 0  trigger            1 1 0  bunch count reset
//   1 0 1  global reset       1 1 1  event count reset
// (listed in time order: start bit first). After the third bit the decoder
// is ready for the next start bit at once. The command appears as a one-cycle
// pulse in the cycle after the third bit is sampled, i.e. the command takes
// three clock periods to arrive, which is the extra latency the document
// gives for the encoded path.
// With disable_encode = 1 the direct inputs are registered once and used
// instead (own choice of the register, to give both paths a clean pulse).
module control_decoder (
  input  logic clk,
  input  logic rst,
  input  logic encoded,          // serial encoded control line
  input  logic disable_encode,
  input  logic direct_trigger,
  input  logic direct_bunch_reset,
  input  logic direct_event_reset,
  input  logic direct_global_reset,
  output logic trigger,
  output logic bunch_reset,
  output logic event_reset,
  output logic global_reset
);

  logic [1:0] phase;       // 0: waiting for start bit, 1: first bit, 2: second bit
  logic       b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase        <= 2'd0;
      b1           <= 1'b0;
      trigger      <= 1'b0;
      bunch_reset  <= 1'b0;
      event_reset  <= 1'b0;
      global_reset <= 1'b0;
    end else begin
      trigger      <= 1'b0;
      bunch_reset  <= 1'b0;
      event_reset  <= 1'b0;
      global_reset <= 1'b0;
      if (disable_encode) begin
        phase        <= 2'd0;
        trigger      <= direct_trigger;
        bunch_reset  <= direct_bunch_reset;
        event_reset  <= direct_event_reset;
        global_reset <= direct_global_reset;
      end else begin
        case (phase)
          2'd0: if (encoded) phase <= 2'd1;
          2'd1: begin
            b1    <= encoded;
            phase <= 2'd2;
          end
          default: begin
            phase <= 2'd0;
            unique case ({b1, encoded})
              2'b00: trigger      <= 1'b1;
              2'b10: bunch_reset  <= 1'b1;
              2'b01: global_reset <= 1'b1;
              2'b11: event_reset  <= 1'b1;
            endcase
          end
        endcase
      end
    end
  end

endmodule
