// bt_arbiter: turn-based arbiter of one Bluetree multiplexer, with blocking
// factor M and prefetch-slot generation.
//
// A turn counter cnt runs 0..M-1 and advances each time a packet (or a slot)
// leaves the multiplexer. Turn 0 belongs to the low-priority (LP, right)
// input and turns 1..M-1 to the high-priority (HP, left) input, so a fully
// loaded multiplexer sends HP,HP,..,LP: an LP packet waits behind at most
// M-1 HP packets and an HP packet behind at most one LP packet. The counter
// holds while the output is not accepted, so a multiplexer stalled from above
// keeps its place in the turn sequence.
//
// When the side owning the current turn has nothing and the other side has a
// packet, that packet would go out of turn (a work-conserving access). With
// slot_en high the arbiter sends an empty prefetch slot in its place instead;
// the waiting packet then leaves on its own turn, which is no later than on a
// fully loaded tree. With slot_en low the arbiter is work-conserving. When
// neither side has a packet nothing is sent and the counter holds.
//
// Interface: hp_valid/lp_valid say an input register holds a packet;
// out_ready is the upward acceptance. Exactly one of grant_hp, grant_lp,
// grant_slot is high when out_valid is high. Purely combinational decision,
// registered turn counter.
module bt_arbiter #(
  parameter int unsigned M = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic slot_en,
  input  logic hp_valid,
  input  logic lp_valid,
  input  logic out_ready,
  output logic out_valid,
  output logic grant_hp,
  output logic grant_lp,
  output logic grant_slot
);
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  logic [CW-1:0] cnt;
  logic          lp_turn, own_has, other_has;

  assign lp_turn   = (cnt == '0);
  assign own_has   = lp_turn ? lp_valid : hp_valid;
  assign other_has = lp_turn ? hp_valid : lp_valid;

  always_comb begin
    grant_hp   = 1'b0;
    grant_lp   = 1'b0;
    grant_slot = 1'b0;
    if (own_has) begin
      grant_lp = lp_turn;
      grant_hp = !lp_turn;
    end else if (other_has) begin
      if (slot_en) begin
        grant_slot = 1'b1;
      end else begin
        grant_lp = !lp_turn;
        grant_hp = lp_turn;
      end
    end
  end

  assign out_valid = grant_hp | grant_lp | grant_slot;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else if (out_valid && out_ready)
      cnt <= (cnt == CW'(M - 1)) ? '0 : cnt + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                             $onehot0({grant_hp, grant_lp, grant_slot}));
endmodule
