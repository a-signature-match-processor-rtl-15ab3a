// smp_driver -- packet source, monitor and scoreboard for the smp top.
//
// The source builds random packets from the signature alphabet plus 'x'
// (or only from 'a'..'z' and the alphabet for large sets), plants random
// whole signatures in many of them (sometimes the same one twice, or two
// back to back), and offers them word by word with PKT_RDY, holding a
// refused word until PKT_ACK, with random idle cycles.  The expected
// result of a packet is the sorted list of start positions of all
// signatures that occur in it, found by a direct string search.
//
// The monitor checks, per packet: the addresses and their order, that
// pkt_done comes max(M,1) cycles after the edge that took the last word
// (M addresses, one per cycle), and for packets sent without gaps or
// stalls the total of ceil(b/P) + M + 1 cycles from the first word to
// the last address.  It also counts each mechanism of the design and
// reports a failure for any that never happened.
module smp_driver #(
  parameter int              P         = 4,
  parameter int              N         = 16,
  parameter logic [N*8-1:0]  SIG_CHARS = "FOOBARads1144OO4",
  parameter logic [N-1:0]    SIG_BEG   = 16'b1010_0100_0100_1001,
  parameter int              NPKT      = 400,
  parameter int              MAXLEN    = 40,
  parameter int              GAPS      = 1,    // insert idle cycles
  localparam int             AW        = (N < 2) ? 1 : $clog2(N),
  localparam int             NBW       = $clog2(P + 1)
) (
  input  logic                clk,
  output logic                rst,
  output logic [P-1:0][7:0]   pkt_data,
  output logic                pkt_rdy,
  output logic                pkt_end,
  output logic [NBW-1:0]      pkt_nbytes,
  input  logic                pkt_ack,
  input  logic                match_valid,
  input  logic [AW-1:0]       match_addr,
  input  logic                pkt_done,
  input  logic                match_irq,
  input  logic [31:0]         pkt_count,
  input  logic [31:0]         stall_count,
  output int                  checks,
  output int                  failures,
  output logic                done
);
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---- signature set -----------------------------------------------------
  int nsig = 0;
  int sstart[$], slen[$];
  function automatic logic [7:0] ch(int i);
    return SIG_CHARS[8*(N-1-i) +: 8];
  endfunction

  // ---- per packet expectations -------------------------------------------
  typedef struct {
    int addrs[$];
    int t_first;     // edge that took the first word
    int t_last;      // edge that took the last word
    int nw;
    bit clean;       // no idle cycle or stall inside the packet
  } exp_t;
  exp_t exq[$];

  // mechanism counters
  int n_stall = 0, n_gap = 0, n_partial = 0, n_multi = 0, n_zero = 0;
  int n_overlap = 0, n_cross = 0, n_dup = 0, n_stream_busy = 0, n_formula = 0;
  int npk_done = 0, n_addr = 0;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ---- source -------------------------------------------------------------
  initial begin
    byte unsigned pk[$];
    checks = 0; failures = 0; done = 0;
    rst = 1; pkt_rdy = 0; pkt_end = 0; pkt_nbytes = NBW'(P); pkt_data = '0;
    for (int i = 0; i < N; i++)
      if (SIG_BEG[i]) begin
        int e;
        e = i;
        while (e + 1 < N && !SIG_BEG[e+1]) e++;
        sstart.push_back(i); slen.push_back(e - i + 1); nsig++;
      end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int p = 0; p < NPKT; p++) begin
      int len, nw, nplant;
      exp_t ex;
      bit stalled, gapped;
      pk = {};
      len = $urandom_range(1, MAXLEN);
      for (int b = 0; b < len; b++)
        pk.push_back(($urandom_range(0, 4) == 0) ? 8'h78 :
                     (N > 64) ? 8'($urandom_range(8'h61, 8'h7a)) : ch($urandom_range(0, N-1)));
      // plant signatures
      nplant = $urandom_range(0, 3);
      for (int k = 0; k < nplant; k++) begin
        int s, at;
        s = $urandom_range(0, nsig-1);
        if (slen[s] <= len) begin
          at = $urandom_range(0, len - slen[s]);
          for (int c = 0; c < slen[s]; c++) pk[at+c] = ch(sstart[s] + c);
          if (k == 0 && $urandom_range(0, 3) == 0 && at + 2*slen[s] <= len)
            for (int c = 0; c < slen[s]; c++) pk[at+slen[s]+c] = ch(sstart[s] + c);
        end
      end
      // reference search
      ex.addrs = {};
      begin
        int occ_end[$];
        occ_end = {};
        for (int s = 0; s < nsig; s++) begin
          int hits;
          hits = 0;
          for (int a = 0; a + slen[s] <= len; a++) begin
            bit ok;
            ok = 1;
            for (int c = 0; c < slen[s]; c++) if (pk[a+c] != ch(sstart[s] + c)) ok = 0;
            if (ok) begin
              hits++;
              if (a / P != (a + slen[s] - 1) / P) n_cross++;
              foreach (occ_end[q]) if (a <= occ_end[q]) n_overlap++;
              occ_end.push_back(a + slen[s] - 1);
            end
          end
          if (hits > 0) ex.addrs.push_back(sstart[s]);
          if (hits > 1) n_dup++;
        end
      end
      if (ex.addrs.size() > 1) n_multi++;
      if (ex.addrs.size() == 0) n_zero++;
      // stream the words
      nw = (len + P - 1) / P;
      ex.nw = nw;
      stalled = 0; gapped = 0;
      for (int w = 0; w < nw; w++) begin
        if (GAPS != 0 && $urandom_range(0, 9) == 0) begin
          pkt_rdy = 0; pkt_data = '0;
          if (w > 0) begin gapped = 1; n_gap++; end
          repeat ($urandom_range(1, 3)) @(negedge clk);
        end
        for (int j = 0; j < P; j++)
          pkt_data[j] = (w*P + j < len) ? pk[w*P+j] : 8'($urandom);
        pkt_rdy = 1;
        pkt_end = (w == nw - 1);
        pkt_nbytes = (w == nw - 1) ? NBW'(len - w*P) : NBW'($urandom_range(0, P));
        if (w == nw - 1 && len - w*P < P) n_partial++;
        #1;
        while (!pkt_ack) begin
          chk(match_irq, "stall only while addresses are waiting");
          stalled = 1; n_stall++;
          @(negedge clk); #1;
        end
        if (match_irq) n_stream_busy++;
        if (w == 0) ex.t_first = cyc + 1;
        if (w == nw - 1) ex.t_last = cyc + 1;
        @(negedge clk);
      end
      ex.clean = !stalled && !gapped;
      exq.push_back(ex);
      pkt_rdy = 0; pkt_end = 0;
      if (GAPS != 0 && $urandom_range(0, 7) == 0) repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    pkt_rdy = 0;
    repeat (N + 20) @(negedge clk);
    chk(exq.size() == 0, "every packet finished");
    chk(npk_done == NPKT, "pkt_done count");
    chk(pkt_count == 32'(NPKT), "pkt_count");
    chk(stall_count == 32'(n_stall), "stall_count");
    chk(n_multi > 0,       "mechanism: several signatures in one packet");
    chk(n_zero > 0,        "mechanism: packet without match");
    chk(n_cross > 0,       "mechanism: match across a word boundary (carry register)");
    if (P > 1) chk(n_partial > 0, "mechanism: partial last word");
    chk(n_dup > 0,         "mechanism: signature occurring twice, reported once");
    chk(n_stream_busy > 0, "mechanism: packet streamed while addresses are output");
    chk(n_formula > 0,     "mechanism: b/p + M + 1 timing observed");
    if (N <= 64) begin
      chk(n_stall > 0,   "mechanism: stall on a busy MAO");
      chk(n_overlap > 0, "mechanism: overlapping signatures");
    end
    if (GAPS != 0) chk(n_gap > 0, "mechanism: idle cycle inside a packet");
    $display("packets=%0d addresses=%0d multi=%0d zero=%0d cross=%0d overlap=%0d dup=%0d partial=%0d gaps=%0d stalls=%0d busy_stream=%0d formula=%0d",
             npk_done, n_addr, n_multi, n_zero, n_cross, n_overlap, n_dup, n_partial, n_gap,
             n_stall, n_stream_busy, n_formula);
    done = 1;
  end

  // ---- monitor ------------------------------------------------------------
  int got[$];
  always @(negedge clk) if (!rst) begin
    if (match_valid) begin got.push_back(int'(match_addr)); n_addr++; end
    if (pkt_done) begin
      chk(exq.size() > 0, "pkt_done without a packet");
      if (exq.size() > 0) begin
        exp_t ex;
        int m;
        ex = exq.pop_front();
        m = ex.addrs.size();
        chk(got.size() == m, $sformatf("packet %0d: %0d addresses, expected %0d", npk_done, got.size(), m));
        for (int i = 0; i < m && i < got.size(); i++)
          chk(got[i] == ex.addrs[i], $sformatf("packet %0d address %0d: %0d, expected %0d", npk_done, i, got[i], ex.addrs[i]));
        chk(cyc - ex.t_last == ((m > 0) ? m : 1), $sformatf("packet %0d: done %0d cycles after last word, M=%0d", npk_done, cyc - ex.t_last, m));
        if (ex.clean && m > 0) begin
          chk(cyc - ex.t_first + 2 == ex.nw + m + 1, $sformatf("packet %0d: b/p+M+1 timing", npk_done));
          n_formula++;
        end
        npk_done++;
      end
      got = {};
    end
  end
endmodule
