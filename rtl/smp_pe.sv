// smp_pe -- processing element of the signature match array.
//
// One PE stands for one character of the signature set.  Lane j of its
// carries says "the signature matches up to this character, and this
// character is byte j+1 of the current word".  Carries are formed as
//   cout[0]   = mx[0] & (cin[P-1] | sig_beg)
//   cout[j]   = mx[j] & (cin[j-1] | sig_beg)        j = 1 .. P-1
//   sig_match = sig_end & |cout
// where cin[P-1] is the previous PE's registered last-lane carry (the
// character matched as the last byte of the previous word).  Only that
// last-lane carry is stored, so each PE needs one flip-flop whatever P is;
// the output cout[P-1] is the registered value, cout[0..P-2] are
// combinational.  This is the algorithm of the design's PE.
//
// Timing: sig_match is combinational from the current word; the register
// loads on every accepted word (en) and is cleared by clr (packet reset,
// this design's name for the PE Reset of the control circuit), clr winning.
module smp_pe #(
  parameter int unsigned P = smp_pkg::DEF_P
) (
  input  logic         clk,
  input  logic         rst,       // synchronous, active high
  input  logic         en,        // a word is consumed this cycle
  input  logic         clr,       // PE Reset: clear the stored carry
  input  logic         sig_beg,   // this character starts a signature
  input  logic         sig_end,   // this character ends a signature
  input  logic [P-1:0] mx,        // MX[1:P] from the character's column
  input  logic [P-1:0] cin,       // carries from the previous PE
  output logic [P-1:0] cout,      // carries to the next PE
  output logic         sig_match  // whole signature matched this word
);

  logic [P-1:0] c;      // cout1..coutP before the register
  logic         last_q; // registered coutP

  always_comb begin
    c[0] = mx[0] & (cin[P-1] | sig_beg);
    for (int j = 1; j < P; j++) c[j] = mx[j] & (cin[j-1] | sig_beg);
  end

  always_ff @(posedge clk) begin
    if (rst || clr) last_q <= 1'b0;
    else if (en)    last_q <= c[P-1];
  end

  always_comb begin
    cout        = c;
    cout[P-1]   = last_q;
    sig_match   = sig_end & (|c);
  end

endmodule
