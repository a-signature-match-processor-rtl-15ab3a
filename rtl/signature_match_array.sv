// signature_match_array -- the n x 1 chain of processing elements.
//
// Each character position i of the signature set has one smp_pe, whose
// MX inputs come from the comparator column of that position's byte and
// whose carry inputs come from PE i-1 (PE 0 has none).  A signature's
// first PE ignores its carry input through sig_beg, so signatures can sit
// back to back in the one chain.  sig_match[i] is meaningful only at the
// last character of a signature and is combinational from the current
// word; it is high when the signature completes anywhere in that word.
//
// The signature set is fixed by parameters (see smp_pkg): SIG_CHARS packs
// the characters, position 0 in the most significant byte, and SIG_BEG
// marks the first character of each signature.  Signatures run from one
// marked position to the next; position 0 must be marked.  sig_match is
// constant zero at positions that do not end a signature, and the last
// PE's carries go nowhere.
module signature_match_array #(
  parameter int unsigned          P         = smp_pkg::DEF_P,
  parameter int unsigned          NCHARS    = smp_pkg::DEF_NCHARS,
  parameter logic [NCHARS*8-1:0]  SIG_CHARS = smp_pkg::def_sig_chars(),
  parameter logic [NCHARS-1:0]    SIG_BEG   = smp_pkg::def_sig_beg()
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,         // a word is consumed
  input  logic                 clr,        // PE Reset
  input  logic [255:0][P-1:0]  match,      // character match array outputs
  output logic [NCHARS-1:0]    sig_match   // per position, end positions only
);

  logic [NCHARS:0][P-1:0] carry;   // carry[i] feeds PE i
  assign carry[0] = '0;

  for (genvar i = 0; i < NCHARS; i++) begin : g_pe
    localparam logic [7:0] CH   = SIG_CHARS[8*(NCHARS-1-i) +: 8];
    localparam logic       BEG  = SIG_BEG[i];
    localparam logic       ENDP = (i == NCHARS-1) ? 1'b1 : SIG_BEG[(i+1) % NCHARS];
    smp_pe #(.P(P)) u_pe (
      .clk, .rst, .en, .clr,
      .sig_beg  (BEG),
      .sig_end  (ENDP),
      .mx       (match[CH]),
      .cin      (carry[i]),
      .cout     (carry[i+1]),
      .sig_match(sig_match[i])
    );
  end

endmodule
