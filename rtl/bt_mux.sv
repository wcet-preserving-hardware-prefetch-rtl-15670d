// bt_mux: one 2-to-1 Bluetree multiplexer with rate-limited arbitration,
// prefetch-slot generation and a squash detector.
//
// Upward path: each input side (HP = left, LP = right) has a single input
// register that can be written in the same cycle its packet leaves. The
// bt_arbiter picks the HP register, the LP register or an empty PK_SLOT
// packet; the chosen packet is shown combinationally on up_*, so one level
// adds one register stage. Downward path: one input register captures
// down_in every cycle (the downward path never blocks) and a demultiplexer
// steers it by bit SEL_BIT of the packet's core index (0 = HP side,
// 1 = LP side) one cycle later.
//
// Squash detector: when the downward register holds prefetch data for core
// c, line a, and the input register on c's side holds a demand read from c
// for line a, the prefetch goes down as a read response and the read in the
// register turns into a prefetch-hit notification, which continues up to
// the prefetcher in the read's place.
//
// The arbitration and squash detection follow the multiplexer the design is
// built on; register depths of one follow its analysis. Slot contents (core
// 0, line 0) and the ev_* event pulses are this design's choices.
module bt_mux
  import bt_pkg::*;
#(
  parameter int unsigned M       = 4,
  parameter int unsigned SEL_BIT = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    slot_en,
  // upward, from the two children
  input  logic    hp_in_valid,
  output logic    hp_in_ready,
  input  bt_pkt_t hp_in_pkt,
  input  logic    lp_in_valid,
  output logic    lp_in_ready,
  input  bt_pkt_t lp_in_pkt,
  // upward, to the parent
  output logic    up_valid,
  input  logic    up_ready,
  output bt_pkt_t up_pkt,
  // downward, from the parent (never blocks)
  input  logic    down_in_valid,
  input  bt_pkt_t down_in_pkt,
  // downward, to the children
  output logic    hp_down_valid,
  output bt_pkt_t hp_down_pkt,
  output logic    lp_down_valid,
  output bt_pkt_t lp_down_pkt,
  // events
  output logic    ev_slot,
  output logic    ev_squash
);
  logic    hp_v, lp_v, dn_v;
  bt_pkt_t hp_q, lp_q, dn_q;
  bt_pkt_t hp_e, lp_e, dn_e;
  logic    g_hp, g_lp, g_slot, arb_valid;
  logic    sq_hp, sq_lp, dn_side;

  // ---- squash detector ----
  assign dn_side = dn_q.cpu[SEL_BIT];
  always_comb begin
    sq_hp = dn_v && dn_q.ptype == PK_PFDATA && !dn_side &&
            hp_v && hp_q.ptype == PK_READ && hp_q.cpu == dn_q.cpu && hp_q.addr == dn_q.addr;
    sq_lp = dn_v && dn_q.ptype == PK_PFDATA && dn_side &&
            lp_v && lp_q.ptype == PK_READ && lp_q.cpu == dn_q.cpu && lp_q.addr == dn_q.addr;
    hp_e = hp_q;
    lp_e = lp_q;
    dn_e = dn_q;
    if (sq_hp) hp_e.ptype = PK_HIT;
    if (sq_lp) lp_e.ptype = PK_HIT;
    if (sq_hp || sq_lp) dn_e.ptype = PK_RESP;
  end
  assign ev_squash = sq_hp | sq_lp;

  // ---- upward arbitration ----
  bt_arbiter #(.M(M)) u_arb (
    .clk, .rst_n, .slot_en,
    .hp_valid(hp_v), .lp_valid(lp_v), .out_ready(up_ready),
    .out_valid(arb_valid), .grant_hp(g_hp), .grant_lp(g_lp), .grant_slot(g_slot)
  );

  assign up_valid = arb_valid;
  always_comb begin
    if (g_hp)      up_pkt = hp_e;
    else if (g_lp) up_pkt = lp_e;
    else           up_pkt = mk_pkt(PK_SLOT, '0, '0, '0);
  end
  assign ev_slot = g_slot && up_ready;

  logic hp_pop, lp_pop;
  assign hp_pop      = g_hp && up_ready;
  assign lp_pop      = g_lp && up_ready;
  assign hp_in_ready = !hp_v || hp_pop;
  assign lp_in_ready = !lp_v || lp_pop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hp_v <= 1'b0;
      lp_v <= 1'b0;
      dn_v <= 1'b0;
    end else begin
      if (hp_in_ready) hp_v <= hp_in_valid;
      if (lp_in_ready) lp_v <= lp_in_valid;
      dn_v <= down_in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (hp_in_ready && hp_in_valid) hp_q <= hp_in_pkt;
    else                            hp_q <= hp_e;   // keeps a squash conversion
    if (lp_in_ready && lp_in_valid) lp_q <= lp_in_pkt;
    else                            lp_q <= lp_e;
    dn_q <= down_in_pkt;
  end

  // ---- downward demultiplexer ----
  assign hp_down_valid = dn_v && !dn_side;
  assign lp_down_valid = dn_v &&  dn_side;
  assign hp_down_pkt   = dn_e;
  assign lp_down_pkt   = dn_e;

  a_hold_hp: assert property (@(posedge clk) disable iff (!rst_n)
                              hp_in_valid && !hp_in_ready |=> hp_in_valid);
endmodule
