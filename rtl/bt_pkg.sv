// bt_pkg: types and constants shared by the Bluetree memory tree, the prefetch
// caches and the worst-case-preserving stream prefetcher.
//
// One packet format, bt_pkt_t, travels both ways through the tree. Upward
// (core -> memory) packets are demand reads, prefetch slots and prefetch-hit
// notifications; downward packets are read responses and prefetch data. Every
// packet names the core it belongs to (its index also selects its route down
// the tree) and a cache-line address. Only downward packets use the data field.
//
// Sizes follow the 16-core system: 16 cores, 32-bit byte addresses, 16-byte
// lines (four 32-bit words). The line size and the address width are this
// design's choices; the core count is the system's.
package bt_pkg;

  localparam int unsigned NCPU       = 16;
  localparam int unsigned CPU_W      = $clog2(NCPU);
  localparam int unsigned ADDR_W     = 32;              // byte address
  localparam int unsigned LINE_BYTES = 16;              // four 32-bit words
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);
  localparam int unsigned LADDR_W    = ADDR_W - OFF_W;  // line address
  localparam int unsigned DATA_W     = LINE_BYTES * 8;

  typedef logic [CPU_W-1:0]   cpu_t;
  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [DATA_W-1:0]  line_t;

  typedef enum logic [2:0] {
    PK_READ   = 3'd0,  // up:   demand miss from a core
    PK_SLOT   = 3'd1,  // up:   empty prefetch slot created by a multiplexer
    PK_HIT    = 3'd2,  // up:   prefetch-hit notification (also serves as a slot)
    PK_RESP   = 3'd3,  // down: read response for a demand miss
    PK_PFDATA = 3'd4   // down: prefetched line for a core's prefetch cache
  } pkt_type_e;

  typedef struct packed {
    pkt_type_e ptype;
    cpu_t      cpu;
    laddr_t    addr;
    line_t     data;
  } bt_pkt_t;

  // Outstanding-prefetch table size (prefetcher), a design choice.
  localparam int unsigned PF_OUT     = 8;
  localparam int unsigned PF_OUT_W   = $clog2(PF_OUT);

  // Request and response at the memory port of the prefetcher.
  typedef struct packed {
    logic                 pf;     // 1: prefetch, 0: demand read
    logic [PF_OUT_W-1:0]  row;    // outstanding-table row of a prefetch
    cpu_t                 cpu;
    laddr_t               addr;
  } mem_req_t;

  typedef struct packed {
    logic                 pf;
    logic [PF_OUT_W-1:0]  row;
    cpu_t                 cpu;
    laddr_t               addr;
    line_t                data;
  } mem_rsp_t;

  // A prefetch waiting for a slot.
  typedef struct packed {
    cpu_t   cpu;
    laddr_t addr;
  } pf_cand_t;

  function automatic bt_pkt_t mk_pkt(pkt_type_e t, cpu_t c, laddr_t a, line_t d);
    bt_pkt_t p;
    p.ptype = t;
    p.cpu   = c;
    p.addr  = a;
    p.data  = d;
    return p;
  endfunction

endpackage
