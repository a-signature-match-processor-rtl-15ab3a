// control_circuit -- packet flow control of the SMP.
//
// The packet source offers one word of P bytes at a time with pkt_rdy
// (PKT_RDY); pkt_end (PKT_END) marks the last word of a packet and
// pkt_nbytes gives how many of its bytes are real (1..P, byte 1 first).
// A word is consumed in a cycle where pkt_rdy and pkt_ack (PKT_ACK) are
// both high; the source must hold the word until then.  Consumed words go
// straight to the character match array, one per cycle.
//
// At the last word the control circuit
//   * tells the match address output (MAO) logic to capture the packet's
//     matched positions (mao_load), including those of the last word;
//   * resets the signature match array (pe_reset) and the word match
//     buffer (sm_reset) in the same clock edge,
// so the next packet can stream in the following cycle while the MAO logic
// encodes the addresses of this one.  If the MAO logic has not finished the
// previous packet (its ready/Finish condition), the last word is held back
// (pkt_ack low) until it has: this is the only stall.  Resetting at the end
// of a packet, rather than at the start of the next, is this design's
// choice; it gives the same clean state without a dead cycle.
//
// The circuit also counts packets and stalls for the host (status only).
module control_circuit #(
  parameter int unsigned P  = smp_pkg::DEF_P,
  localparam int unsigned NBW = $clog2(P + 1)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           pkt_rdy,     // PKT_RDY: a word is offered
  input  logic           pkt_end,     // PKT_END: it is the packet's last
  input  logic [NBW-1:0] pkt_nbytes,  // real bytes in the last word
  output logic           pkt_ack,     // PKT_ACK: the word is taken
  input  logic           mao_ready,   // MAO logic can take a new packet
  output logic           word_en,     // word consumed this cycle
  output logic [P-1:0]   lane_valid,  // real bytes of the consumed word
  output logic           pe_reset,    // PE Reset
  output logic           sm_reset,    // SM Reset
  output logic           mao_load,    // hand the packet to the MAO logic
  output logic           in_packet,   // a packet has started and not ended
  output logic [31:0]    pkt_count,   // packets completed
  output logic [31:0]    stall_count  // cycles a last word waited for the MAO
);

  logic last;

  always_comb begin
    pkt_ack = !(pkt_end && !mao_ready);
    word_en = pkt_rdy && pkt_ack;
    last    = word_en && pkt_end;
    for (int j = 0; j < P; j++)
      lane_valid[j] = word_en && (!pkt_end || (j < int'(pkt_nbytes)));
    pe_reset = last;
    sm_reset = last;
    mao_load = last;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_packet   <= 1'b0;
      pkt_count   <= '0;
      stall_count <= '0;
    end else begin
      if (last)         in_packet <= 1'b0;
      else if (word_en) in_packet <= 1'b1;
      if (last) pkt_count <= pkt_count + 32'd1;
      if (pkt_rdy && !pkt_ack) stall_count <= stall_count + 32'd1;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (rst)
                           pkt_rdy && !pkt_ack |=> pkt_rdy && pkt_end)
    else $error("control_circuit: offered last word withdrawn before PKT_ACK");
  a_nbytes: assert property (@(posedge clk) disable iff (rst)
                             pkt_rdy && pkt_end |-> pkt_nbytes != 0 && 32'(pkt_nbytes) <= P)
    else $error("control_circuit: pkt_nbytes out of range");

endmodule
