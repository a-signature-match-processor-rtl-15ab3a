// tb_smp -- end-to-end test of the Signature Match Processor at a reduced
// signature set: "FOO", "BAR", "ads1", "144", "OO" and "4" (16 characters,
// P = 4, and the same set at P = 2).  See smp_driver for what is checked.
module tb_smp;
  localparam logic [16*8-1:0] SET = "FOOBARads1144OO4";
  localparam logic [15:0]     BEG = 16'b1010_0100_0100_1001;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // P = 4
  logic rst4, rdy4, end4, ack4, mv4, done4, irq4, act4, fin4;
  logic [3:0][7:0] data4;
  logic [2:0] nb4;
  logic [3:0] addr4;
  logic [31:0] pc4, sc4;
  int c4, f4;
  smp #(.P(4), .NCHARS(16), .SIG_CHARS(SET), .SIG_BEG(BEG)) dut4 (
    .clk, .rst(rst4), .pkt_data(data4), .pkt_rdy(rdy4), .pkt_end(end4), .pkt_nbytes(nb4),
    .pkt_ack(ack4), .match_valid(mv4), .match_addr(addr4), .pkt_done(done4),
    .match_irq(irq4), .pkt_active(act4), .pkt_count(pc4), .stall_count(sc4));
  smp_driver #(.P(4), .N(16), .SIG_CHARS(SET), .SIG_BEG(BEG), .NPKT(600)) drv4 (
    .clk, .rst(rst4), .pkt_data(data4), .pkt_rdy(rdy4), .pkt_end(end4), .pkt_nbytes(nb4),
    .pkt_ack(ack4), .match_valid(mv4), .match_addr(addr4), .pkt_done(done4),
    .match_irq(irq4), .pkt_count(pc4), .stall_count(sc4), .checks(c4), .failures(f4), .done(fin4));

  // P = 2
  logic rst2, rdy2, end2, ack2, mv2, done2, irq2, act2, fin2;
  logic [1:0][7:0] data2;
  logic [1:0] nb2;
  logic [3:0] addr2;
  logic [31:0] pc2, sc2;
  int c2, f2;
  smp #(.P(2), .NCHARS(16), .SIG_CHARS(SET), .SIG_BEG(BEG)) dut2 (
    .clk, .rst(rst2), .pkt_data(data2), .pkt_rdy(rdy2), .pkt_end(end2), .pkt_nbytes(nb2),
    .pkt_ack(ack2), .match_valid(mv2), .match_addr(addr2), .pkt_done(done2),
    .match_irq(irq2), .pkt_active(act2), .pkt_count(pc2), .stall_count(sc2));
  smp_driver #(.P(2), .N(16), .SIG_CHARS(SET), .SIG_BEG(BEG), .NPKT(600)) drv2 (
    .clk, .rst(rst2), .pkt_data(data2), .pkt_rdy(rdy2), .pkt_end(end2), .pkt_nbytes(nb2),
    .pkt_ack(ack2), .match_valid(mv2), .match_addr(addr2), .pkt_done(done2),
    .match_irq(irq2), .pkt_count(pc2), .stall_count(sc2), .checks(c2), .failures(f2), .done(fin2));

  // pkt_active must be high exactly between a packet's first and last word
  int act_checks = 0, act_fail = 0;
  logic seen_word = 0;
  always @(posedge clk) if (!rst4) begin
    act_checks++;
    if (act4 != seen_word) act_fail++;
    if (rdy4 && ack4) seen_word <= !end4;
  end

  initial begin
    repeat (5) @(posedge clk);
    wait (fin4 && fin2);
    checks = c4 + c2 + act_checks;
    failures = f4 + f2 + act_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
