// bt_tree: Bluetree memory tree, a binary tree of N-1 bt_mux multiplexers
// joining N cores (leaves) to one root port.
//
// Nodes are numbered as a heap: node 1 is the root multiplexer, node k has
// children 2k (its HP, left input) and 2k+1 (its LP, right input), and
// leaf i (core i) is node N+i. Following the bits of a core index from the
// most significant one gives its path from the root: a 0 bit enters the HP
// side, a 1 bit the LP side, so core 0 is HP everywhere and core N-1 LP
// everywhere. The multiplexer at depth d (root d=0) therefore steers
// downward packets on core-index bit log2(N)-1-d. Each level adds one
// register stage up and one down. All multiplexers share the blocking
// factor M and slot_en. N must be a power of two, at most bt_pkg::NCPU.
//
// The tree shape, two-input multiplexers and M=4 follow the system
// description; the node numbering and the ev_* vectors are this design's.
module bt_tree
  import bt_pkg::*;
#(
  parameter int unsigned N = NCPU,
  parameter int unsigned M = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    slot_en,
  // leaves (cores)
  input  logic    leaf_up_valid  [N],
  output logic    leaf_up_ready  [N],
  input  bt_pkt_t leaf_up_pkt    [N],
  output logic    leaf_down_valid[N],
  output bt_pkt_t leaf_down_pkt  [N],
  // root
  output logic    root_up_valid,
  input  logic    root_up_ready,
  output bt_pkt_t root_up_pkt,
  input  logic    root_down_valid,
  input  bt_pkt_t root_down_pkt,
  // events, one bit per multiplexer (index k-1 for node k)
  output logic [N-2:0] ev_slot,
  output logic [N-2:0] ev_squash
);
  localparam int unsigned LG = $clog2(N);

  logic    up_v  [1:2*N-1];
  logic    up_r  [1:2*N-1];
  bt_pkt_t up_p  [1:2*N-1];
  logic    dn_v  [1:2*N-1];
  bt_pkt_t dn_p  [1:2*N-1];

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign up_v[N+i]          = leaf_up_valid[i];
    assign up_p[N+i]          = leaf_up_pkt[i];
    assign leaf_up_ready[i]   = up_r[N+i];
    assign leaf_down_valid[i] = dn_v[N+i];
    assign leaf_down_pkt[i]   = dn_p[N+i];
  end

  assign root_up_valid = up_v[1];
  assign root_up_pkt   = up_p[1];
  assign up_r[1]       = root_up_ready;
  assign dn_v[1]       = root_down_valid;
  assign dn_p[1]       = root_down_pkt;

  for (genvar k = 1; k < N; k++) begin : g_mux
    localparam int unsigned D = $clog2(k + 1) - 1;
    bt_mux #(.M(M), .SEL_BIT(LG - 1 - D)) u_mux (
      .clk, .rst_n, .slot_en,
      .hp_in_valid(up_v[2*k]),   .hp_in_ready(up_r[2*k]),   .hp_in_pkt(up_p[2*k]),
      .lp_in_valid(up_v[2*k+1]), .lp_in_ready(up_r[2*k+1]), .lp_in_pkt(up_p[2*k+1]),
      .up_valid(up_v[k]), .up_ready(up_r[k]), .up_pkt(up_p[k]),
      .down_in_valid(dn_v[k]), .down_in_pkt(dn_p[k]),
      .hp_down_valid(dn_v[2*k]),   .hp_down_pkt(dn_p[2*k]),
      .lp_down_valid(dn_v[2*k+1]), .lp_down_pkt(dn_p[2*k+1]),
      .ev_slot(ev_slot[k-1]), .ev_squash(ev_squash[k-1])
    );
  end
endmodule
