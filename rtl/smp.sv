// smp -- Signature Match Processor: top level.
//
// Finds which of a fixed set of byte-string signatures occur in each
// packet of a stream, P bytes per clock, and reports the start position of
// every matched signature.  The data path is:
//   control_circuit        accepts words (PKT_RDY / PKT_END / PKT_ACK)
//   char_match_array       256 comparators per byte lane
//   signature_match_array  one PE per signature character, carries chained
//   word_match_buffer      latches matches for the packet, end -> start
//   mao                    binary-tree encoder, one address per cycle
//
// Timing: a packet of b bytes is consumed in ceil(b/P) cycles (with no
// gaps from the source).  Its M matches appear on match_valid/match_addr
// on M consecutive cycles starting two cycles after the last word, lowest
// address first, and pkt_done pulses with the last of them (or alone two
// cycles after the last word when M = 0).  The next packet streams while
// the addresses of the previous one are produced; the last word of a
// packet is held back only when the previous packet still has addresses
// to produce.  match_irq (MAA) is high while addresses are waiting and
// serves as the interrupt to the host.
//
// The signature set is compiled in (parameters SIG_CHARS / SIG_BEG, see
// smp_pkg); match_addr is the character position, within that set, of the
// first character of the matched signature.
module smp #(
  parameter int unsigned          P         = smp_pkg::DEF_P,
  parameter int unsigned          NCHARS    = smp_pkg::DEF_NCHARS,
  parameter logic [NCHARS*8-1:0]  SIG_CHARS = smp_pkg::def_sig_chars(),
  parameter logic [NCHARS-1:0]    SIG_BEG   = smp_pkg::def_sig_beg(),
  localparam int unsigned         AW        = (NCHARS < 2) ? 1 : $clog2(NCHARS),
  localparam int unsigned         NBW       = $clog2(P + 1)
) (
  input  logic                 clk,
  input  logic                 rst,
  // packet input (from the MAC/PHY or another packet source)
  input  logic [P-1:0][7:0]    pkt_data,    // pkt_data[j] = byte j+1
  input  logic                 pkt_rdy,
  input  logic                 pkt_end,
  input  logic [NBW-1:0]       pkt_nbytes,
  output logic                 pkt_ack,
  // matched word address output (to the host)
  output logic                 match_valid,
  output logic [AW-1:0]        match_addr,
  output logic                 pkt_done,
  output logic                 match_irq,
  // status
  output logic                 pkt_active,  // inside a packet
  output logic [31:0]          pkt_count,
  output logic [31:0]          stall_count
);

  logic                word_en, pe_reset, sm_reset, mao_load, mao_ready;
  logic [P-1:0]        lane_valid;
  logic [255:0][P-1:0] match;
  logic [NCHARS-1:0]   sig_match, mp_next;

  control_circuit #(.P(P)) u_ctrl (
    .clk, .rst,
    .pkt_rdy, .pkt_end, .pkt_nbytes, .pkt_ack,
    .mao_ready,
    .word_en, .lane_valid, .pe_reset, .sm_reset, .mao_load,
    .in_packet(pkt_active), .pkt_count, .stall_count
  );

  char_match_array #(.P(P)) u_cma (
    .data(pkt_data), .lane_valid, .match
  );

  signature_match_array #(
    .P(P), .NCHARS(NCHARS), .SIG_CHARS(SIG_CHARS), .SIG_BEG(SIG_BEG)
  ) u_sma (
    .clk, .rst, .en(word_en), .clr(pe_reset), .match, .sig_match
  );

  word_match_buffer #(.NCHARS(NCHARS), .SIG_BEG(SIG_BEG)) u_wmb (
    .clk, .rst, .en(word_en), .clr(sm_reset), .sig_match, .mp(), .mp_next
  );

  mao #(.NCHARS(NCHARS)) u_mao (
    .clk, .rst,
    .load(mao_load), .mp_in(mp_next), .ready(mao_ready),
    .maa(match_irq), .addr_valid(match_valid), .addr(match_addr),
    .finish(pkt_done)
  );

endmodule
