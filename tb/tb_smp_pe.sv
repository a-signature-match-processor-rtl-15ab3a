// tb_smp_pe -- exhaustive check of one processing element (P = 4).
// Every combination of MX, carry-in, sig_beg and sig_end is applied for
// both values of the stored carry; the combinational carries, sig_match
// and the register update (en, clr) are compared with a reference model.
module tb_smp_pe;
  localparam int P = 4;
  logic clk = 0, rst = 1, en = 0, clr = 0, beg = 0, sig_end = 0;
  logic [P-1:0] mx = '0, cin = '0, cout;
  logic sig_match;
  int checks = 0, failures = 0;

  smp_pe #(.P(P)) dut (.clk, .rst, .en, .clr, .sig_beg(beg), .sig_end,
                       .mx, .cin, .cout, .sig_match);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [P-1:0] ref_c(logic [P-1:0] m, logic [P-1:0] ci, logic b);
    logic [P-1:0] r;
    r[0] = m[0] && (ci[P-1] || b);
    for (int j = 1; j < P; j++) r[j] = m[j] && (ci[j-1] || b);
    return r;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [P-1:0] rc;
    @(negedge clk); rst = 0;
    for (int st = 0; st < 2; st++) begin
      // load the stored carry with st: beg=1, mx[P-1]=st
      beg = 1; mx = '0; mx[P-1] = st[0]; en = 1; @(negedge clk); en = 0;
      chk(cout[P-1] == st[0], "register load");
      for (int v = 0; v < 1024; v++) begin
        {sig_end, beg, cin, mx} = v[9:0];
        #1;
        rc = ref_c(mx, cin, beg);
        chk(cout[P-2:0] == rc[P-2:0], $sformatf("cout v=%0d", v));
        chk(cout[P-1] == st[0], "register holds without en");
        chk(sig_match == (sig_end && (|rc)), $sformatf("sig_match v=%0d", v));
      end
      @(negedge clk);
    end
    // en stores coutP-temp; clr wins over en
    cin = 4'b0100; mx = 4'b1000; beg = 0; en = 1; @(negedge clk);
    chk(cout[P-1] == 1'b1, "stored coutP from cin3 & MX4");
    clr = 1; @(negedge clk); clr = 0; en = 0;
    chk(cout[P-1] == 1'b0, "clr clears register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
