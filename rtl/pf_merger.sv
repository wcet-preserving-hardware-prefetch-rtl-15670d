// pf_merger: fills prefetch slots with waiting prefetches.
//
// Each cycle it looks at the head of the hit/slot queue (a slot or a
// prefetch-hit notification, both usable as a slot) and the head of the
// prefetch buffer. If a prefetch waits, a row of the outstanding-prefetches
// table is free and the prefetch queue can take an entry, the two are merged:
// both heads are popped, a prefetch request tagged with the table row is
// pushed into the prefetch queue and the row is allocated. Otherwise the slot
// is abandoned (popped unused) at a cost of one cycle, and any prefetch
// keeps waiting. Slots never wait, so they can never back up into the tree.
// Purely combinational; the prefetch request is the candidate's fields wired
// straight through plus the table row.
//
// Merging, table insertion and abandoning an unused slot follow the
// prefetcher description; abandoning a slot also when the table or the
// prefetch queue is full is this design's choice.
module pf_merger
  import bt_pkg::*;
(
  input  logic                slot_valid,
  output logic                slot_pop,
  input  logic                pf_valid,
  input  pf_cand_t            pf,
  output logic                pf_pop,
  input  logic                free_avail,
  input  logic [PF_OUT_W-1:0] free_row,
  output logic                alloc,
  output logic                pfq_valid,
  input  logic                pfq_ready,
  output mem_req_t            pfq_req,
  output logic                ev_merge,
  output logic                ev_abandon
);
  logic merge;
  assign merge      = slot_valid && pf_valid && free_avail && pfq_ready;
  assign slot_pop   = slot_valid;
  assign pf_pop     = merge;
  assign alloc      = merge;
  assign pfq_valid  = merge;
  assign ev_merge   = merge;
  assign ev_abandon = slot_valid && !merge;
  always_comb begin
    pfq_req.pf   = 1'b1;
    pfq_req.row  = free_row;
    pfq_req.cpu  = pf.cpu;
    pfq_req.addr = pf.addr;
  end
endmodule
