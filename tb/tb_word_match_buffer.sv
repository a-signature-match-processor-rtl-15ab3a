// tb_word_match_buffer -- latching, clearing and end-to-start rewiring.
// Signatures start at positions 0, 3, 4 and 8 of a 10-character set, so
// they end at 2, 3, 7 and 9.  Random match pulses at the end positions
// are accumulated by a reference model; mp must show each accumulated
// end bit at its signature's start, mp_next the value including the
// current word, and clr/en must behave as specified.
module tb_word_match_buffer;
  localparam int N = 10;
  localparam logic [N-1:0] BEG = 10'b01_0001_1001;
  localparam int START[4] = '{0, 3, 4, 8};
  localparam int ENDP[4]  = '{2, 3, 7, 9};
  logic clk = 0, rst = 1, en = 0, clr = 0;
  logic [N-1:0] sig_match = '0, mp, mp_next;
  logic [3:0] acc = '0, now;
  int checks = 0, failures = 0, clears = 0;

  word_match_buffer #(.NCHARS(N), .SIG_BEG(BEG)) dut (.clk, .rst, .en, .clr, .sig_match, .mp, .mp_next);

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] exp_mp, exp_next;
      now = 4'($urandom) & 4'($urandom);
      sig_match = '0;
      for (int s = 0; s < 4; s++) sig_match[ENDP[s]] = now[s];
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 9) == 0);
      #1;
      exp_mp = '0; exp_next = '0;
      for (int s = 0; s < 4; s++) begin
        exp_mp[START[s]]   = acc[s];
        exp_next[START[s]] = acc[s] | (en & now[s]);
      end
      checks++;
      if (mp != exp_mp || mp_next != exp_next) begin
        failures++; $display("FAIL t=%0d mp=%b exp=%b next=%b exp=%b", t, mp, exp_mp, mp_next, exp_next);
      end
      @(negedge clk);
      if (clr) begin acc = '0; clears++; end
      else if (en) acc = acc | now;
    end
    checks++;
    if (clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
