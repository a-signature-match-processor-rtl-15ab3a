// tb_control_circuit -- handshake, lane masking, resets and counters.
// A random packet source (that keeps an offered last word until it is
// taken) and a random MAO-ready signal drive the block; every output is
// compared with a reference each cycle.  The stall (last word refused
// while the MAO logic is busy) must occur and be counted.
module tb_control_circuit;
  localparam int P = 4;
  logic clk = 0, rst = 1;
  logic pkt_rdy = 0, pkt_end = 0, mao_ready = 1;
  logic [2:0] pkt_nbytes = 3'd4;
  logic pkt_ack, word_en, pe_reset, sm_reset, mao_load, in_packet;
  logic [P-1:0] lane_valid;
  logic [31:0] pkt_count, stall_count;
  int checks = 0, failures = 0, stalls = 0, pkts = 0, partial = 0;
  logic ref_in = 0;

  control_circuit #(.P(P)) dut (.clk, .rst, .pkt_rdy, .pkt_end, .pkt_nbytes, .pkt_ack,
    .mao_ready, .word_en, .lane_valid, .pe_reset, .sm_reset, .mao_load,
    .in_packet, .pkt_count, .stall_count);

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit held;
    repeat (2) @(negedge clk);
    rst = 0;
    held = 0;
    for (int t = 0; t < 3000; t++) begin
      logic exp_ack, exp_en, exp_last;
      logic [P-1:0] exp_lanes;
      if (!held) begin
        pkt_rdy = ($urandom_range(0, 4) != 0);
        pkt_end = pkt_rdy && ($urandom_range(0, 3) == 0);
        pkt_nbytes = pkt_end ? 3'($urandom_range(1, P)) : 3'($urandom_range(0, 7));
      end
      mao_ready = ($urandom_range(0, 2) != 0);
      #1;
      exp_ack  = !(pkt_end && !mao_ready);
      exp_en   = pkt_rdy && exp_ack;
      exp_last = exp_en && pkt_end;
      for (int j = 0; j < P; j++) exp_lanes[j] = exp_en && (!pkt_end || j < pkt_nbytes);
      chk(pkt_ack == exp_ack, "pkt_ack");
      chk(word_en == exp_en, "word_en");
      chk(lane_valid == exp_lanes, "lane_valid");
      chk(pe_reset == exp_last && sm_reset == exp_last && mao_load == exp_last, "resets/load");
      chk(in_packet == ref_in, "in_packet");
      chk(pkt_count == 32'(pkts), "pkt_count");
      chk(stall_count == 32'(stalls), "stall_count");
      if (pkt_rdy && !pkt_ack) stalls++;
      if (exp_last) begin pkts++; if (pkt_nbytes < P) partial++; end
      if (exp_last) ref_in = 0; else if (exp_en) ref_in = 1;
      held = pkt_rdy && !pkt_ack;
      @(negedge clk);
    end
    chk(stalls > 0, "stall occurred");
    chk(partial > 0, "partial last word occurred");
    $display("packets=%0d stalls=%0d partial=%0d", pkts, stalls, partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
