// hit_encoder: converts the raw snapshot of the selected channel into a time
// measurement and registers it for the level 1 buffer.
//
// Vernier: the tap snapshot gives m, the number of 1/16 ring periods since
// the ring clock's last rising edge (vernier_encoder).
// Coarse selection: counter copy A changes at m = 0, copy B at m = 8. The
// copy furthest from its change is used: A for m = 4..11; B for m = 0..3
// (where B == A); B minus one for m = 12..15 (where B is already A + 1). The
// document states that one of the two values is selected from the fine time;
// the exact split is this design's.
// Time: the selected 13-bit count and m form a 17-bit time in 0.78125 ns
// bins; its upper 12 bits are the coarse time (bunch count) and the low five
// the fine time, as in the document.
// Width (pair mode): trailing minus leading time, corrected across the
// programmed roll-over, shifted right by width_select (0.78 ns to 100 ns per
// bit) and saturated to 8 bits.
// Checks: a parity mismatch on either stored counter copy raises
// coarse_error; together with a missing vernier edge, a channel select error
// or a rejected-hit flag it sets the hit error flag of the entry.
// Timing: one register stage; out_valid follows in_valid by one cycle.
module hit_encoder
  import amt_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  chan_word_t  in_word,
  input  logic [4:0]  in_ch,
  input  logic        chsel_error,
  input  logic [11:0] count_roll_over,
  input  logic [2:0]  width_select,
  output logic        out_valid,
  output l1_word_t    out_word,
  output logic        coarse_error     // pulse, with out_valid
);

  logic [3:0]  m_lead, m_trail;
  logic        v_lead, v_trail;

  vernier_encoder #(.TAPS(TAPS)) u_vlead  (.taps(in_word.lead.taps),  .vernier(m_lead),  .valid(v_lead));
  vernier_encoder #(.TAPS(TAPS)) u_vtrail (.taps(in_word.trail.taps), .vernier(m_trail), .valid(v_trail));

  function automatic logic [CW-1:0] pick(input edge_raw_t e, input logic [3:0] m,
                                         input logic [11:0] roll);
    case (m[3:2])
      2'b00:   return e.cb;
      2'b11:   return coarse_prev(e.cb, roll);
      default: return e.ca;
    endcase
  endfunction

  function automatic logic par_bad(input edge_raw_t e);
    return (^e.ca != e.pa) || (^e.cb != e.pb);
  endfunction

  logic [16:0] t_lead, t_trail;
  logic signed [18:0] dt;
  logic [18:0] dt_u, scaled;
  logic [7:0]  width;
  logic        cerr, herr;

  always_comb begin
    t_lead  = {pick(in_word.lead,  m_lead,  count_roll_over), m_lead};
    t_trail = {pick(in_word.trail, m_trail, count_roll_over), m_trail};
    dt = $signed({2'b00, t_trail}) - $signed({2'b00, t_lead});
    if (dt < 0) dt = dt + $signed({2'b00, count_roll_over, 5'b00000}) + 19'sd32;
    dt_u   = 19'(dt);
    scaled = dt_u >> width_select;
    width  = (scaled > 19'd255) ? 8'hFF : scaled[7:0];
    cerr   = par_bad(in_word.lead) || (in_word.pair && par_bad(in_word.trail));
    herr   = cerr || chsel_error || in_word.lead.err || !v_lead
           || (in_word.pair && !v_trail);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid    <= 1'b0;
      out_word     <= '0;
      coarse_error <= 1'b0;
    end else begin
      out_valid    <= in_valid;
      coarse_error <= in_valid && cerr;
      if (in_valid) begin
        out_word.full_mark <= 1'b0;
        out_word.pair      <= in_word.pair;
        out_word.trailing  <= in_word.lead.trailing && !in_word.pair;
        out_word.err       <= herr;
        out_word.ch        <= in_ch;
        out_word.width     <= in_word.pair ? width : 8'h00;
        out_word.coarse    <= t_lead[16:5];
        out_word.fine      <= t_lead[4:0];
      end
    end
  end

endmodule
