// word_match_buffer -- per-packet record of which signatures matched.
//
// While a packet streams through, every signature match signal from the
// signature match array is latched (OR-ed in) at its end position on each
// consumed word, so a signature that matched anywhere in the packet leaves
// its bit set.  The buffer is cleared by the SM Reset of the control
// circuit, which it gets at the last word of a packet.
//
// The output mp is the buffer rewired from end to start position: the
// bit of a signature's last character is moved to the position of its
// first character, giving the matched-position (MP) vector that the match
// address output logic encodes into start addresses.  mp_next is the same
// rewiring applied to the value the buffer is about to hold (buffer OR the
// current word's matches), so the MAO logic can capture a packet's result
// in the same clock edge in which the buffer is cleared for the next one;
// that same-edge hand-over is this design's choice.
//
// mp and mp_next are zero at every position that does not start a
// signature, and only the end-position flip-flops can ever be set, so
// synthesis keeps one flip-flop per signature; the full-width vectors
// keep the position numbering of the signature set.
module word_match_buffer #(
  parameter int unsigned          NCHARS  = smp_pkg::DEF_NCHARS,
  parameter logic [NCHARS-1:0]    SIG_BEG = smp_pkg::def_sig_beg()
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,         // a word is consumed
  input  logic              clr,        // SM Reset
  input  logic [NCHARS-1:0] sig_match,  // from the signature match array
  output logic [NCHARS-1:0] mp,         // start-position view of the buffer
  output logic [NCHARS-1:0] mp_next     // start-position view incl. this word
);

  logic [NCHARS-1:0] wmb_q, wmb_d;

  assign wmb_d = en ? (wmb_q | sig_match) : wmb_q;

  always_ff @(posedge clk) begin
    if (rst || clr) wmb_q <= '0;
    else            wmb_q <= wmb_d;
  end

  // End position e of the signature starting at s is the position before
  // the next start (or the last position).
  function automatic int unsigned end_of(input int unsigned s);
    int unsigned e;
    e = s;
    while (e + 1 < NCHARS && !SIG_BEG[e+1]) e++;
    return e;
  endfunction

  for (genvar s = 0; s < NCHARS; s++) begin : g_mp
    if (SIG_BEG[s]) begin : g_start
      localparam int unsigned E = end_of(s);
      assign mp[s]      = wmb_q[E];
      assign mp_next[s] = wmb_d[E];
    end else begin : g_none
      assign mp[s]      = 1'b0;
      assign mp_next[s] = 1'b0;
    end
  end

endmodule
