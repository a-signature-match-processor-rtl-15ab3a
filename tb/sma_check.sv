// sma_check -- drives one signature_match_array with random packets and
// compares its sig_match outputs, word by word, with a direct string
// search over the packet bytes.  Used by tb_signature_match_array.
// Packets are made from the signature characters plus 'x' so that
// n_hits, partial n_hits and overlaps are frequent; words are offered
// with random gaps, and the last word of a packet may be partial.
module sma_check #(
  parameter int              P         = 2,
  parameter int              N         = 7,
  parameter logic [N*8-1:0]  SIG_CHARS = "144ads1",
  parameter logic [N-1:0]    SIG_BEG   = 7'b0001001,
  parameter int              NPKT      = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_hits,
  output logic done
);
  logic rst = 1, en = 0, clr = 0;
  logic [255:0][P-1:0] match = '0;
  logic [N-1:0] sig_match;

  signature_match_array #(.P(P), .NCHARS(N), .SIG_CHARS(SIG_CHARS), .SIG_BEG(SIG_BEG))
    dut (.clk, .rst, .en, .clr, .match, .sig_match);

  function automatic logic [7:0] ch(int i);
    return SIG_CHARS[8*(N-1-i) +: 8];
  endfunction
  function automatic bit is_end(int i);
    return (i == N-1) || SIG_BEG[i+1];
  endfunction

  initial begin
    byte unsigned pk[$];
    checks = 0; failures = 0; n_hits = 0; done = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int p = 0; p < NPKT; p++) begin
      int len, nw;
      pk = {};
      len = $urandom_range(1, 24);
      for (int b = 0; b < len; b++)
        pk.push_back(($urandom_range(0, 5) == 0) ? 8'h78 : ch($urandom_range(0, N-1)));
      nw = (len + P - 1) / P;
      for (int w = 0; w < nw; w++) begin
        // optional idle cycle: no word, garbage-free comparators
        if ($urandom_range(0, 4) == 0) begin
          en = 0; clr = 0; match = '0;
          @(negedge clk);
        end
        match = '0;
        for (int j = 0; j < P; j++)
          if (w*P + j < len) match[pk[w*P+j]][j] = 1'b1;
        en = 1; clr = (w == nw - 1);
        #1;
        for (int i = 0; i < N; i++) begin
          bit exp;
          exp = 0;
          if (is_end(i)) begin
            int s, L;
            s = i;
            while (!SIG_BEG[s]) s--;
            L = i - s + 1;
            for (int j = 0; j < P; j++) begin
              int g;
              bit ok;
              g = w*P + j;
              if (g < len && g - L + 1 >= 0) begin
                ok = 1;
                for (int k = 0; k < L; k++) if (pk[g-L+1+k] != ch(s+k)) ok = 0;
                if (ok) exp = 1;
              end
            end
          end
          checks++;
          if (exp) n_hits++;
          if (sig_match[i] != exp) begin
            failures++;
            $display("FAIL P=%0d pkt %0d word %0d pos %0d: got %0b", P, p, w, i, sig_match[i]);
          end
        end
        @(negedge clk);
      end
      en = 0; clr = 0; match = '0;
    end
    done = 1;
  end
endmodule
