// error_monitor: collects the nine hardware error conditions of the chip.
//
// Each source (coarse count parity, channel select, L1 buffer parity,
// trigger FIFO parity, matching state, read-out FIFO parity, read-out state,
// control register parity, JTAG instruction parity; bit numbers as in the
// document) is a level or pulse. A source that is enabled in enable_error
// sets its sticky flag, which stays set until error_reset or reset. The flags
// are read in the status registers and can be written into events as an
// error word. any_error is their OR, registered with them.
module error_monitor (
  input  logic       clk,
  input  logic       rst,
  input  logic       error_reset,
  input  logic [8:0] enable_error,
  input  logic [8:0] sources,
  output logic [8:0] flags,
  output logic       any_error
);

  always_ff @(posedge clk) begin
    if (rst || error_reset) flags <= '0;
    else                    flags <= flags | (sources & enable_error);
  end

  assign any_error = |flags;

endmodule
