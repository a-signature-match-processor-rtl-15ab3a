// smp_pkg -- shared constants of the Signature Match Processor (SMP).
//
// The SMP matches a fixed set of byte-string signatures against a packet
// stream, p bytes per clock.  The signature set is compiled into the logic
// (discrete comparators), so it is given as parameters:
//   SIG_CHARS : all signature characters packed back to back, as a string
//               literal would pack them (character position 0 is the
//               leftmost, i.e. most significant, byte);
//   SIG_BEG   : bit i set when character position i begins a signature.
// A signature ends where the next one begins, or at the last position.
//
// The defaults follow the main configuration evaluated for this design:
// parallelism p = 4 and a set of 1021 characters in 94 signatures.  The
// real rule contents of that set are not reproduced; the default set is
// the two example signatures "144" and "ads1", followed by 92 synthetic
// signatures (2 of 12 characters, then 90 of 11) whose bytes come from a
// 32-bit linear congruential generator (x0 = 0x12345678,
// x' = 1664525*x + 1013904223, byte = 'a' + (x'[23:16] mod 26)), so the
// total is 3 + 4 + 1014 = 1021.  set_sig_len gives the same split for
// other set sizes.
package smp_pkg;

  localparam int unsigned DEF_P      = 4;     // degree of parallelism
  localparam int unsigned DEF_NCHARS = 1021;  // characters in the set
  localparam int unsigned DEF_NSIGS  = 94;    // signatures in the set

  // Length of signature s in a set of n characters and ns signatures
  // built the same way as the default one: "144", "ads1", then ns-2
  // synthetic signatures sharing the remaining n-7 characters as evenly
  // as possible, the longer ones first.
  function automatic int unsigned set_sig_len(input int unsigned s, input int unsigned n,
                                              input int unsigned ns);
    int unsigned base, rem;
    if (s == 0) return 3;          // "144"
    if (s == 1) return 4;          // "ads1"
    base = (n - 7) / (ns - 2);
    rem  = (n - 7) % (ns - 2);
    return base + ((s - 2 < rem) ? 1 : 0);
  endfunction

  function automatic int unsigned def_sig_len(input int unsigned s);
    return set_sig_len(s, DEF_NCHARS, DEF_NSIGS);
  endfunction

  // Start position of signature s of the default set.
  function automatic int unsigned def_sig_start(input int unsigned s);
    int unsigned a;
    a = 0;
    for (int unsigned k = 0; k < s; k++) a += def_sig_len(k);
    return a;
  endfunction

  function automatic logic [DEF_NCHARS*8-1:0] def_sig_chars();
    logic [DEF_NCHARS*8-1:0] v;
    logic [31:0] x;
    string head;
    head = "144ads1";
    v = '0;
    x = 32'h1234_5678;
    for (int unsigned i = 0; i < DEF_NCHARS; i++) begin
      logic [7:0] c;
      if (i < 7) c = head[i];
      else begin
        x = x * 32'd1664525 + 32'd1013904223;
        c = 8'(8'h61 + (x[23:16] % 8'd26));
      end
      v[8*(DEF_NCHARS-1-i) +: 8] = c;
    end
    return v;
  endfunction

  function automatic logic [DEF_NCHARS-1:0] def_sig_beg();
    logic [DEF_NCHARS-1:0] v;
    v = '0;
    for (int unsigned s = 0; s < DEF_NSIGS; s++) v[def_sig_start(s)] = 1'b1;
    return v;
  endfunction

endpackage
