// channel_arbiter: registered hard-wired-priority arbitration of the channel
// buffers' write requests into the level 1 buffer.
//
// A queue register holds a snapshot of the pending requests. Each cycle the
// lowest-numbered queued channel that still requests is granted, removed
// from the queue, and its measurement is passed on with its channel number.
// A new snapshot is taken only when no queued requester is left, so every
// channel that was waiting is served once before any channel is served
// twice: channels get equal service although the priority inside a snapshot
// is fixed. This is the document's scheme. A queued channel whose request
// has gone (the channel granted last, when that was its only entry) is
// skipped without costing a cycle.
// Timing: a request that arrives while the queue is empty is loaded at the
// next edge and granted in the following cycle; N simultaneous requests then
// take N consecutive cycles. Together with the two-flip-flop synchroniser of
// the channel buffer this is the "2 + N cycles" of the chip.
// A channel select error is flagged when the grant vector is not the one-hot
// code of the channel number whose word is passed on (a fault in the
// selection logic); the document names the error but not its detection.
module channel_arbiter
  import amt_pkg::*;
#(
  parameter int NCH_P = NCH
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [NCH_P-1:0]         req,
  input  chan_word_t               words [NCH_P],
  output logic [NCH_P-1:0]         grant,      // one-hot, pops the channel
  output logic                     valid,      // a measurement is selected
  output chan_word_t               word,
  output logic [4:0]               ch,
  output logic                     chsel_error
);

  logic [NCH_P-1:0] queue, eff;

  assign eff = queue & req;

  // lowest queued requester
  always_comb begin
    grant = '0;
    ch    = '0;
    for (int i = NCH_P - 1; i >= 0; i--) begin
      if (eff[i]) begin
        grant = '0;
        grant[i] = 1'b1;
        ch    = 5'(i);
      end
    end
  end

  assign valid = |eff;
  assign word  = words[ch];

  always_ff @(posedge clk) begin
    if (rst) begin
      queue <= '0;
    end else if ((eff & ~grant) == '0) begin
      queue <= req;
    end else begin
      queue <= eff & ~grant;
    end
  end

  assign chsel_error = valid && (grant != (NCH_P'(1) << ch));

endmodule
