// tb_smp_workloads -- the processor in further evaluated configurations:
// the 1021-character / 94-signature set at P = 1 (P = 4 is tb_smp_full)
// and the 2044-character / 246-signature set at P = 2.  Each instance is
// checked end to end by smp_driver.  The other combinations of set size
// and P differ from these only in size.
module tb_smp_workloads;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int c[2], f[2];
  logic d[2];

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  smp_workload #(.P(1), .N(1021), .NS(94))  w0 (.clk, .checks(c[0]), .failures(f[0]), .done(d[0]));
  smp_workload #(.P(2), .N(2044), .NS(246)) w1 (.clk, .checks(c[1]), .failures(f[1]), .done(d[1]));

  initial begin
    repeat (5) @(posedge clk);
    wait (d[0] && d[1]);
    for (int k = 0; k < 2; k++) begin checks += c[k]; failures += f[k]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
