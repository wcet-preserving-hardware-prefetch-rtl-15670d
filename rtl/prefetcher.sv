// prefetcher: worst-case-preserving stream prefetcher at the root of the
// Bluetree, between the tree and memory.
//
// Every packet from the tree is sorted by type: demand reads go to the
// demand queue, prefetch slots and prefetch-hit notifications to the
// hit/slot queue. The prefetch calculator (pf_calculator, holding the
// stream buffers) watches the reads and hits as they are accepted and puts
// the prefetches it proposes into the prefetch buffer (a proposal that finds
// the buffer full is dropped). Demand reads pass the incoming squash filter
// (pf_squash): a read for a line already being prefetched for the same core
// is absorbed, the rest wait in the demand memory queue. The merger
// (pf_merger) fills each slot or hit with a waiting prefetch, records it in
// the outstanding-prefetches table and queues it in the prefetch queue;
// unfilled slots are dropped. The memory multiplexer (pf_mem_mux) sends
// demand reads and prefetches in turn. Memory responses pass the outgoing
// squash filter: a returning prefetch whose row was squashed goes down as a
// read response, otherwise as prefetch data; demand responses go down as read
// responses. The output queue drives the tree's downward root port, which
// never blocks, one packet per cycle.
//
// A prefetch is only ever sent in place of a slot or a hit, both of which
// stand for a memory access the tree could have made under full load, so
// prefetching adds no traffic beyond the worst case the tree is analysed
// for. With pf_enable low the calculator proposes nothing and all slots are
// dropped.
//
// Memory interface: mem_req_valid/ready handshake with mem_req_t; responses
// arrive on mem_rsp_valid/mem_rsp with mem_rsp_ready back-pressure, carrying
// the request's pf flag, table row, core and line. Queue depths are this
// design's choices; the block structure follows the prefetcher diagram.
module prefetcher
  import bt_pkg::*;
#(
  parameter int unsigned NSTREAM = 8,
  parameter int unsigned QDEPTH  = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     pf_enable,
  // tree root, upward
  input  logic     up_valid,
  output logic     up_ready,
  input  bt_pkt_t  up_pkt,
  // tree root, downward (never blocks)
  output logic     down_valid,
  output bt_pkt_t  down_pkt,
  // memory
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  output mem_req_t mem_req,
  input  logic     mem_rsp_valid,
  output logic     mem_rsp_ready,
  input  mem_rsp_t mem_rsp,
  // events
  output logic     ev_merge,
  output logic     ev_abandon,
  output logic     ev_in_squash,
  output logic     ev_out_squash,
  output logic     ev_pf_drop
);
  localparam int unsigned CW = $clog2(QDEPTH + 1);

  // ---- input demultiplexer ----
  logic    is_read;
  logic    dq_in_ready, sq_in_ready;
  assign is_read  = (up_pkt.ptype == PK_READ);
  assign up_ready = is_read ? dq_in_ready : sq_in_ready;

  logic    dq_v, dq_pop;  bt_pkt_t dq_head;
  logic    sq_v, sq_pop;  bt_pkt_t sq_head;
  logic [CW-1:0] c0, c1, c2, c3, c4, c5;

  sync_fifo #(.T(bt_pkt_t), .DEPTH(QDEPTH)) u_demand_q (
    .clk, .rst_n, .in_valid(up_valid && is_read), .in_ready(dq_in_ready), .in_data(up_pkt),
    .out_valid(dq_v), .out_ready(dq_pop), .out_data(dq_head), .count(c0));

  sync_fifo #(.T(bt_pkt_t), .DEPTH(QDEPTH)) u_hitslot_q (
    .clk, .rst_n, .in_valid(up_valid && !is_read), .in_ready(sq_in_ready), .in_data(up_pkt),
    .out_valid(sq_v), .out_ready(sq_pop), .out_data(sq_head), .count(c1));

  // ---- prefetch calculator and stream buffers ----
  logic     cand_v;
  pf_cand_t cand;
  logic     acc;
  assign acc = up_valid && up_ready;

  pf_calculator #(.NSTREAM(NSTREAM)) u_calc (
    .clk, .rst_n, .enable(pf_enable),
    .ev_valid(acc && (up_pkt.ptype == PK_READ || up_pkt.ptype == PK_HIT)),
    .ev_hit(up_pkt.ptype == PK_HIT), .ev_cpu(up_pkt.cpu), .ev_addr(up_pkt.addr),
    .cand_valid(cand_v), .cand(cand));

  logic     pb_in_ready, pb_v, pb_pop;
  pf_cand_t pb_head;
  sync_fifo #(.T(pf_cand_t), .DEPTH(QDEPTH)) u_pf_buffer (
    .clk, .rst_n, .in_valid(cand_v), .in_ready(pb_in_ready), .in_data(cand),
    .out_valid(pb_v), .out_ready(pb_pop), .out_data(pb_head), .count(c2));
  assign ev_pf_drop = cand_v && !pb_in_ready;

  // ---- outstanding prefetches and squash filters ----
  logic                free_avail, alloc, in_squash, out_squashed;
  logic [PF_OUT_W-1:0] free_row;
  logic                rsp_fire;

  pf_squash u_squash (
    .clk, .rst_n,
    .alloc, .alloc_cpu(pb_head.cpu), .alloc_addr(pb_head.addr),
    .free_avail, .free_row,
    .in_valid(dq_v), .in_cpu(dq_head.cpu), .in_addr(dq_head.addr), .in_squash,
    .out_valid(rsp_fire && mem_rsp.pf), .out_row(mem_rsp.row), .out_squashed);
  assign ev_in_squash  = in_squash;
  assign ev_out_squash = out_squashed;

  // demand memory queue, behind the incoming squash filter
  logic     dmq_in_ready, dmq_v, dmq_pop;
  mem_req_t dmq_in, dmq_head;
  always_comb begin
    dmq_in.pf   = 1'b0;
    dmq_in.row  = '0;
    dmq_in.cpu  = dq_head.cpu;
    dmq_in.addr = dq_head.addr;
  end
  assign dq_pop = dq_v && (in_squash || dmq_in_ready);
  sync_fifo #(.T(mem_req_t), .DEPTH(QDEPTH)) u_demand_mem_q (
    .clk, .rst_n, .in_valid(dq_v && !in_squash), .in_ready(dmq_in_ready), .in_data(dmq_in),
    .out_valid(dmq_v), .out_ready(dmq_pop), .out_data(dmq_head), .count(c3));

  // ---- merger and prefetch queue ----
  logic     pfq_push, pfq_in_ready, pfq_v, pfq_pop;
  mem_req_t pfq_in, pfq_head;
  pf_merger u_merger (
    .slot_valid(sq_v), .slot_pop(sq_pop),
    .pf_valid(pb_v), .pf(pb_head), .pf_pop(pb_pop),
    .free_avail, .free_row, .alloc,
    .pfq_valid(pfq_push), .pfq_ready(pfq_in_ready), .pfq_req(pfq_in),
    .ev_merge, .ev_abandon);
  sync_fifo #(.T(mem_req_t), .DEPTH(QDEPTH)) u_pf_q (
    .clk, .rst_n, .in_valid(pfq_push), .in_ready(pfq_in_ready), .in_data(pfq_in),
    .out_valid(pfq_v), .out_ready(pfq_pop), .out_data(pfq_head), .count(c4));

  // ---- memory multiplexer ----
  pf_mem_mux u_mem_mux (
    .clk, .rst_n,
    .dq_valid(dmq_v), .dq_req(dmq_head), .dq_pop(dmq_pop),
    .pq_valid(pfq_v), .pq_req(pfq_head), .pq_pop(pfq_pop),
    .mem_valid(mem_req_valid), .mem_ready(mem_req_ready), .mem_req);

  // ---- outgoing squash filter and output queue ----
  bt_pkt_t out_pkt;
  logic    oq_in_ready;
  always_comb begin
    out_pkt.cpu   = mem_rsp.cpu;
    out_pkt.addr  = mem_rsp.addr;
    out_pkt.data  = mem_rsp.data;
    out_pkt.ptype = (mem_rsp.pf && !out_squashed) ? PK_PFDATA : PK_RESP;
  end
  assign mem_rsp_ready = oq_in_ready;
  assign rsp_fire      = mem_rsp_valid && oq_in_ready;

  sync_fifo #(.T(bt_pkt_t), .DEPTH(QDEPTH)) u_output_q (
    .clk, .rst_n, .in_valid(mem_rsp_valid), .in_ready(oq_in_ready), .in_data(out_pkt),
    .out_valid(down_valid), .out_ready(1'b1), .out_data(down_pkt), .count(c5));

  // occupancy counts, slot contents and read data fields are not used here
  logic unused_counts;
  assign unused_counts = ^{c0, c1, c2, c3, c4, c5, sq_head, dq_head.ptype, dq_head.data};
endmodule
