// tb_smp_full -- the Signature Match Processor at its default size:
// P = 4 bytes per cycle, the default 1021-character set of 94 signatures
// (smp_pkg).  Random lower-case packets of up to 64 bytes with planted
// signatures are checked end to end by smp_driver.
module tb_smp_full;
  localparam int P  = smp_pkg::DEF_P;
  localparam int N  = smp_pkg::DEF_NCHARS;
  localparam int AW = $clog2(N);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks, failures;

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic rst, rdy, pend, ack, mv, done, irq, act, fin;
  logic [P-1:0][7:0] data;
  logic [$clog2(P+1)-1:0] nb;
  logic [AW-1:0] addr;
  logic [31:0] pc, sc;

  smp dut (
    .clk, .rst, .pkt_data(data), .pkt_rdy(rdy), .pkt_end(pend), .pkt_nbytes(nb),
    .pkt_ack(ack), .match_valid(mv), .match_addr(addr), .pkt_done(done),
    .match_irq(irq), .pkt_active(act), .pkt_count(pc), .stall_count(sc));

  smp_driver #(.P(P), .N(N), .SIG_CHARS(smp_pkg::def_sig_chars()), .SIG_BEG(smp_pkg::def_sig_beg()),
               .NPKT(300), .MAXLEN(64)) drv (
    .clk, .rst, .pkt_data(data), .pkt_rdy(rdy), .pkt_end(pend), .pkt_nbytes(nb),
    .pkt_ack(ack), .match_valid(mv), .match_addr(addr), .pkt_done(done),
    .match_irq(irq), .pkt_count(pc), .stall_count(sc), .checks(checks), .failures(failures), .done(fin));

  initial begin
    repeat (5) @(posedge clk);
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
