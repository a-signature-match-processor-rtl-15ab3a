// tb_mao -- match address output logic against a reference encoder.
// Random matched-position vectors are loaded back to back whenever the
// block is ready.  For each one the addresses must come out lowest first,
// one per cycle, exactly the set bits, and finish must come with the last
// address, max(M,1) cycles after the load edge (M cycles for M matches).
module tb_mao;
  localparam int N  = 37;
  localparam int AW = $clog2(N);
  logic clk = 0, rst = 1, load = 0;
  logic [N-1:0] mp_in = '0;
  logic ready, maa, addr_valid, finish;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;
  int cyc = 0;

  mao #(.NCHARS(N)) dut (.clk, .rst, .load, .mp_in, .ready, .maa,
                         .addr_valid, .addr, .finish);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected traffic
  logic [N-1:0] exp_q[$];
  int           load_cyc_q[$];
  int           got[$];
  int           npk = 0, max_m = 0, zero_m = 0, b2b = 0;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // monitor
  always @(negedge clk) if (!rst) begin
    if (addr_valid) got.push_back(int'(addr));
    if (finish) begin
      logic [N-1:0] e;
      int exp_list[$], m, lc;
      chk(exp_q.size() > 0, "finish without a load");
      if (exp_q.size() > 0) begin
        e = exp_q.pop_front(); lc = load_cyc_q.pop_front(); exp_list = {};
        for (int i = 0; i < N; i++) if (e[i]) exp_list.push_back(i);
        m = exp_list.size();
        chk(got.size() == m, $sformatf("packet %0d: %0d addresses, expected %0d", npk, got.size(), m));
        for (int i = 0; i < m && i < got.size(); i++)
          chk(got[i] == exp_list[i], $sformatf("packet %0d addr %0d: %0d vs %0d", npk, i, got[i], exp_list[i]));
        chk(cyc - lc == ((m > 0) ? m : 1), $sformatf("packet %0d latency %0d, M=%0d", npk, cyc - lc, m));
        if (m > max_m) max_m = m;
        if (m == 0) zero_m++;
        npk++;
      end
      got = {};
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int p = 0; p < 300; p++) begin
      logic [N-1:0] v;
      int dens;
      dens = $urandom_range(0, 4);
      for (int i = 0; i < N; i++) v[i] = (dens == 0) ? 1'b0 : ($urandom_range(0, 7) < dens);
      if (p == 5) v = '1;                        // every position matched
      if (p == 6) v = '0;
      while (!ready) @(negedge clk);
      if (maa) b2b++;                            // loaded while last address encoded
      load = 1; mp_in = v;
      exp_q.push_back(v); load_cyc_q.push_back(cyc + 1);
      @(negedge clk);
      load = 0; mp_in = '0;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 5)) @(negedge clk);
    end
    repeat (N + 5) @(negedge clk);
    chk(exp_q.size() == 0, "all packets finished");
    chk(npk == 300, "300 packets encoded");
    chk(max_m == N, "full vector encoded");
    chk(zero_m > 0, "packet without matches seen");
    chk(b2b > 0, "load in the cycle of the last address seen");
    $display("packets=%0d max_matches=%0d zero_match=%0d back_to_back=%0d", npk, max_m, zero_m, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
