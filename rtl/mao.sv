// mao -- match address output logic: a binary-tree priority encoder.
//
// At the end of a packet the matched-position vector (one bit at the start
// position of every signature that matched) is loaded into the MP
// register.  Each cycle a tree of mao_node cells computes MAA (any match
// left) on the way up and a leftmost pointer LP on the way down.  Address
// bit k is taken from the right-hand pointers of tree level k (level 0
// joins pairs of leaves), so the address is the start position of the
// leftmost set MP bit.  The pointer that reaches a leaf clears that MP
// bit, so the next cycle encodes the next match: M matches take M cycles,
// lowest start address first.
//
// Pipelining (two stages, as the design specifies; where the cut lies is
// this design's choice): stage 1 is the MP register and the tree, stage 2
// registers the address, its valid flag and the end-of-packet flag.
//   load/ready : load is honoured only when ready is high.  ready is high
//                when the MP register will be empty after this cycle, so a
//                new packet may be loaded in the very cycle the previous
//                packet's last address is encoded.
//   addr_valid : one registered pulse per match, addr holding its start
//                position.
//   finish     : one registered pulse per loaded packet, together with its
//                last address (or alone, one cycle after the load, when the
//                packet had no match).  This is the Finish signal back to
//                the control circuit.
//   maa        : stage-1 MAA, high while matches are still waiting.
module mao #(
  parameter int unsigned NCHARS = smp_pkg::DEF_NCHARS,
  localparam int unsigned AW    = (NCHARS < 2) ? 1 : $clog2(NCHARS),
  localparam int unsigned L     = 1 << AW
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [NCHARS-1:0] mp_in,
  output logic              ready,
  output logic              maa,
  output logic              addr_valid,
  output logic [AW-1:0]     addr,
  output logic              finish
);

  logic [NCHARS-1:0]        mp_q;
  logic                     pending_q;
  logic [AW:0][L-1:0]       up;     // up[l][k]: subtree k of level l has a match
  logic [AW:0][L-1:0]       lp;     // lp[l][k]: leftmost pointer into subtree k
  logic [AW-1:0]            a;      // address of the leftmost match
  logic [NCHARS-1:0]        grant;  // leaf that receives the pointer
  logic                     empty_after;

  // Leaves: the MP register, padded with empty leaves up to L.
  assign up[0] = L'(mp_q);

  assign lp[AW]       = L'(up[AW][0]);  // the root holds the pointer
  for (genvar l = 1; l <= AW; l++) begin : g_fill
    assign up[l][L-1:(L >> l)] = '0;
  end

  for (genvar l = 0; l < AW; l++) begin : g_lvl
    for (genvar k = 0; k < (L >> (l + 1)); k++) begin : g_node
      mao_node u_node (
        .mp0    (up[l][2*k]),
        .mp1    (up[l][2*k+1]),
        .lp_in  (lp[l+1][k]),
        .maa_out(up[l+1][k]),
        .lp0    (lp[l][2*k]),
        .lp1    (lp[l][2*k+1])
      );
    end
    if (l + 1 < AW) begin : g_pad
      assign lp[l+1][L-1:(L >> (l + 1))] = '0;
    end
  end

  // Address bit l: the pointer went right at some node of level l.
  always_comb begin
    for (int l = 0; l < AW; l++) begin
      a[l] = 1'b0;
      for (int k = 0; k < int'(L >> (l + 1)); k++) a[l] |= lp[l][2*k+1];
    end
  end

  assign grant       = lp[0][NCHARS-1:0];
  assign maa         = up[AW][0];
  assign empty_after = ((mp_q & ~grant) == '0);
  assign ready       = empty_after;

  // Stage 1: MP register.
  always_ff @(posedge clk) begin
    if (rst) begin
      mp_q      <= '0;
      pending_q <= 1'b0;
    end else begin
      if (load && ready) mp_q <= mp_in;
      else               mp_q <= mp_q & ~grant;
      if (load && ready)    pending_q <= 1'b1;
      else if (empty_after) pending_q <= 1'b0;
    end
  end

  // Stage 2: output register.
  always_ff @(posedge clk) begin
    if (rst) begin
      addr_valid <= 1'b0;
      addr       <= '0;
      finish     <= 1'b0;
    end else begin
      addr_valid <= maa;
      addr       <= a;
      finish     <= pending_q && empty_after;
    end
  end

  a_load_when_ready: assert property (@(posedge clk) disable iff (rst) load |-> ready)
    else $error("mao: load while the previous packet is still being encoded");

endmodule
