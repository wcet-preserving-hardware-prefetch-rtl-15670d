// wcet_pf_top: memory system of a 16-core real-time many-core, with a
// prefetcher that cannot raise any task's worst-case memory latency.
//
// Each core i reaches memory through its prefetch cache (pcache, CPU=i) and
// leaf i of the Bluetree (bt_tree, 15 two-input multiplexers with blocking
// factor M). The root of the tree feeds the prefetcher, which talks to the
// memory controller. Multiplexers send empty prefetch slots in place of
// out-of-turn packets, prefetch caches send hit notifications in place of
// reads they answered, and the prefetcher fills both with stream prefetches;
// prefetched lines travel back down to the prefetch cache of the core they
// are for.
//
// Ports: per core, a read request (valid/ready, line address) and a read
// response (valid, line address, 16-byte line) with no back-pressure; the
// memory port of the prefetcher (mem_req_t / mem_rsp_t, valid/ready on
// both); pf_enable switches slot generation and prefetching on. The ev_*
// outputs count, per cycle, events of each mechanism: slots created by each
// multiplexer, squashes in multiplexers and in prefetch caches, prefetch
// cache hits, slots filled and abandoned, demand reads absorbed by the
// incoming squash filter, prefetches returned as read responses, and
// prefetch proposals dropped because the prefetch buffer was full.
//
// The cores (soft processors) and the DDR3 memory with its controller are
// outside this module.
module wcet_pf_top
  import bt_pkg::*;
#(
  parameter int unsigned M       = 4,
  parameter int unsigned NSTREAM = 8,
  parameter int unsigned PC_SIZE = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pf_enable,
  // cores
  input  logic          cpu_req_valid [NCPU],
  output logic          cpu_req_ready [NCPU],
  input  laddr_t        cpu_req_addr  [NCPU],
  output logic          cpu_rsp_valid [NCPU],
  output laddr_t        cpu_rsp_addr  [NCPU],
  output line_t         cpu_rsp_data  [NCPU],
  // memory controller
  output logic          mem_req_valid,
  input  logic          mem_req_ready,
  output mem_req_t      mem_req,
  input  logic          mem_rsp_valid,
  output logic          mem_rsp_ready,
  input  mem_rsp_t      mem_rsp,
  // mechanism events
  output logic [NCPU-2:0] ev_mux_slot,
  output logic [NCPU-2:0] ev_mux_squash,
  output logic [NCPU-1:0] ev_pc_hit,
  output logic [NCPU-1:0] ev_pc_squash,
  output logic          ev_merge,
  output logic          ev_abandon,
  output logic          ev_in_squash,
  output logic          ev_out_squash,
  output logic          ev_pf_drop
);
  logic    lu_v [NCPU];
  logic    lu_r [NCPU];
  bt_pkt_t lu_p [NCPU];
  logic    ld_v [NCPU];
  bt_pkt_t ld_p [NCPU];

  for (genvar i = 0; i < NCPU; i++) begin : g_core
    pcache #(.CPU(i), .SIZE_BYTES(PC_SIZE)) u_pcache (
      .clk, .rst_n,
      .req_valid(cpu_req_valid[i]), .req_ready(cpu_req_ready[i]), .req_addr(cpu_req_addr[i]),
      .rsp_valid(cpu_rsp_valid[i]), .rsp_addr(cpu_rsp_addr[i]), .rsp_data(cpu_rsp_data[i]),
      .up_valid(lu_v[i]), .up_ready(lu_r[i]), .up_pkt(lu_p[i]),
      .down_valid(ld_v[i]), .down_pkt(ld_p[i]),
      .ev_hit(ev_pc_hit[i]), .ev_squash(ev_pc_squash[i]));
  end

  logic    ru_v, ru_r, rd_v;
  bt_pkt_t ru_p, rd_p;

  bt_tree #(.N(NCPU), .M(M)) u_tree (
    .clk, .rst_n, .slot_en(pf_enable),
    .leaf_up_valid(lu_v), .leaf_up_ready(lu_r), .leaf_up_pkt(lu_p),
    .leaf_down_valid(ld_v), .leaf_down_pkt(ld_p),
    .root_up_valid(ru_v), .root_up_ready(ru_r), .root_up_pkt(ru_p),
    .root_down_valid(rd_v), .root_down_pkt(rd_p),
    .ev_slot(ev_mux_slot), .ev_squash(ev_mux_squash));

  prefetcher #(.NSTREAM(NSTREAM)) u_pf (
    .clk, .rst_n, .pf_enable,
    .up_valid(ru_v), .up_ready(ru_r), .up_pkt(ru_p),
    .down_valid(rd_v), .down_pkt(rd_p),
    .mem_req_valid, .mem_req_ready, .mem_req,
    .mem_rsp_valid, .mem_rsp_ready, .mem_rsp,
    .ev_merge, .ev_abandon, .ev_in_squash, .ev_out_squash, .ev_pf_drop);
endmodule
