// tb_signature_match_array -- the PE chain, on the worked example and on
// random packets.
//  * The two-cycle example: signatures "144" and "ads1", P = 2, input
//    "f1" then "44": after the first word only the stored carry of the
//    first '1' PE is set; in the second word the second '4' PE signals the
//    match and the other end position does not.
//  * Random packets against a direct string search (sma_check) for
//    P = 1, 2, 3 and 4 and a set with overlapping and one-character
//    signatures: "FOO", "BAR", "ads1", "144", "OO", "4".
module tb_signature_match_array;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // --- worked example --------------------------------------------------
  logic rst = 1, en = 0, clr = 0;
  logic [255:0][1:0] match = '0;
  logic [6:0] sm;
  signature_match_array #(.P(2), .NCHARS(7), .SIG_CHARS("144ads1"), .SIG_BEG(7'b0001001))
    ex (.clk, .rst, .en, .clr, .match, .sig_match(sm));

  // --- random --------------------------------------------------------------
  localparam logic [16*8-1:0] SET = "FOOBARads1144OO4";
  localparam logic [15:0]     BEG = 16'b1010_0100_0100_1001;  // 0,3,6,10,13,15
  int c[4], f[4], m[4];
  logic d[4];
  sma_check #(.P(1), .N(16), .SIG_CHARS(SET), .SIG_BEG(BEG)) r1 (.clk, .checks(c[0]), .failures(f[0]), .n_hits(m[0]), .done(d[0]));
  sma_check #(.P(2), .N(16), .SIG_CHARS(SET), .SIG_BEG(BEG)) r2 (.clk, .checks(c[1]), .failures(f[1]), .n_hits(m[1]), .done(d[1]));
  sma_check #(.P(3), .N(16), .SIG_CHARS(SET), .SIG_BEG(BEG)) r3 (.clk, .checks(c[2]), .failures(f[2]), .n_hits(m[2]), .done(d[2]));
  sma_check #(.P(4), .N(16), .SIG_CHARS(SET), .SIG_BEG(BEG)) r4 (.clk, .checks(c[3]), .failures(f[3]), .n_hits(m[3]), .done(d[3]));

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // word 1: byte1 'f', byte2 '1'
    match = '0; match["f"][0] = 1; match["1"][1] = 1; en = 1;
    #1;
    checks++; if (sm != '0) begin failures++; $display("FAIL example word 1 match"); end
    @(negedge clk);
    checks++; if (ex.g_pe[0].u_pe.cout[1] !== 1'b1) begin failures++; $display("FAIL stored carry of '1' PE"); end
    // word 2: '4','4'
    match = '0; match["4"] = 2'b11; clr = 1;
    #1;
    checks++; if (sm[2] !== 1'b1) begin failures++; $display("FAIL example: 144 not found"); end
    checks++; if (sm[6] !== 1'b0) begin failures++; $display("FAIL example: ads1 reported"); end
    @(negedge clk);
    en = 0; clr = 0; match = '0;
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int k = 0; k < 4; k++) begin
      checks += c[k]; failures += f[k];
      checks++;
      if (m[k] < 50) begin failures++; $display("FAIL too few n_hits for P=%0d: %0d", k+1, m[k]); end
    end
    $display("signature matches seen: P1=%0d P2=%0d P3=%0d P4=%0d", m[0], m[1], m[2], m[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
