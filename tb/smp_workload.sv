// smp_workload -- one evaluated configuration of the processor: an smp
// with P bytes per cycle and a set of N characters in NS signatures,
// driven and checked by smp_driver.  The set is built like the default
// one (smp_pkg): "144", "ads1", then synthetic lower-case signatures whose
// lengths come from smp_pkg::set_sig_len and whose bytes come from the
// LCG x' = 1664525*x + 1013904223 (x0 = 0x12345678), byte = 'a' +
// (x'[23:16] mod 26).  Used by tb_smp_workloads.
module smp_workload #(
  parameter int P    = 4,
  parameter int N    = 1021,
  parameter int NS   = 94,
  parameter int NPKT = 150
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int AW = $clog2(N);

  function automatic logic [N*8-1:0] set_chars();
    logic [N*8-1:0] v;
    logic [31:0] x;
    string head;
    head = "144ads1";
    v = '0;
    x = 32'h1234_5678;
    for (int i = 0; i < N; i++) begin
      logic [7:0] c;
      if (i < 7) c = head[i];
      else begin
        x = x * 32'd1664525 + 32'd1013904223;
        c = 8'(8'h61 + (x[23:16] % 8'd26));
      end
      v[8*(N-1-i) +: 8] = c;
    end
    return v;
  endfunction

  function automatic logic [N-1:0] set_beg();
    logic [N-1:0] v;
    int a;
    v = '0;
    a = 0;
    for (int s = 0; s < NS; s++) begin
      v[a] = 1'b1;
      a += int'(smp_pkg::set_sig_len(s, N, NS));
    end
    return v;
  endfunction

  localparam logic [N*8-1:0] CHARS = set_chars();
  localparam logic [N-1:0]   BEG   = set_beg();

  logic rst, rdy, pend, ack, mv, pdone, irq, act;
  logic [P-1:0][7:0] data;
  logic [$clog2(P+1)-1:0] nb;
  logic [AW-1:0] addr;
  logic [31:0] pc, sc;

  smp #(.P(P), .NCHARS(N), .SIG_CHARS(CHARS), .SIG_BEG(BEG)) dut (
    .clk, .rst, .pkt_data(data), .pkt_rdy(rdy), .pkt_end(pend), .pkt_nbytes(nb),
    .pkt_ack(ack), .match_valid(mv), .match_addr(addr), .pkt_done(pdone),
    .match_irq(irq), .pkt_active(act), .pkt_count(pc), .stall_count(sc));

  smp_driver #(.P(P), .N(N), .SIG_CHARS(CHARS), .SIG_BEG(BEG), .NPKT(NPKT), .MAXLEN(64)) drv (
    .clk, .rst, .pkt_data(data), .pkt_rdy(rdy), .pkt_end(pend), .pkt_nbytes(nb),
    .pkt_ack(ack), .match_valid(mv), .match_addr(addr), .pkt_done(pdone),
    .match_irq(irq), .pkt_count(pc), .stall_count(sc), .checks, .failures, .done);

  // the set must have the requested shape
  initial begin
    assert ($countones(BEG) == NS && BEG[0]) else $error("smp_workload: set has wrong signature count");
  end
endmodule
