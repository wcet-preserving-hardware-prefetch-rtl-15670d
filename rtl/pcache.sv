// pcache: per-core prefetch cache, a small direct-mapped cache between a
// core and its leaf of the Bluetree that receives prefetched lines, so that
// prefetching never evicts anything from the core's own cache.
//
// SIZE_BYTES / LINE_BYTES lines (32 by default), indexed by the low bits of
// the line address and tagged with the rest. Prefetch data coming down the
// tree is written into its line and not passed to the core. A read request
// from the core (a miss in its own cache) is looked up:
//   * hit: the line is returned to the core one cycle later and a
//     prefetch-hit notification is sent up the tree in place of the read;
//   * miss: a demand read is sent up the tree; its response, arriving as a
//     read response, is passed to the core and not cached.
// Like a multiplexer, the cache squashes: prefetch data for a line whose read
// is still waiting in the upward register answers the core at once, and the
// read becomes a hit notification.
//
// Interface: req_valid/req_ready/req_addr (line address) from the core;
// rsp_valid/rsp_addr/rsp_data to the core with no back-pressure; the tree
// side is up_valid/up_ready/up_pkt and down_valid/down_pkt. A read response
// from the tree wins the response port; a waiting hit response goes out in
// the next free cycle. One request is taken at a time: req_ready is low while
// the upward register or the hit response is occupied.
//
// Direct mapping, the 512-byte size and a line of four words follow the
// system description; the hit notification format and the squash in the
// cache are this design's choices. Upward packets never carry data, so the
// data field of up_pkt is constant zero.
module pcache
  import bt_pkg::*;
#(
  parameter int unsigned CPU        = 0,
  parameter int unsigned SIZE_BYTES = 512
) (
  input  logic    clk,
  input  logic    rst_n,
  // core side
  input  logic    req_valid,
  output logic    req_ready,
  input  laddr_t  req_addr,
  output logic    rsp_valid,
  output laddr_t  rsp_addr,
  output line_t   rsp_data,
  // tree side
  output logic    up_valid,
  input  logic    up_ready,
  output bt_pkt_t up_pkt,
  input  logic    down_valid,
  input  bt_pkt_t down_pkt,
  // events
  output logic    ev_hit,
  output logic    ev_squash
);
  localparam int unsigned NLINES = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned IW     = $clog2(NLINES);
  localparam int unsigned TW     = LADDR_W - IW;
  localparam cpu_t        ME     = cpu_t'(CPU);

  logic          lv  [NLINES];
  logic [TW-1:0] ltg [NLINES];
  line_t         ld  [NLINES];

  logic    up_v;
  bt_pkt_t up_q;
  logic    hr_v;
  laddr_t  hr_a;
  line_t   hr_d;

  logic [IW-1:0] ridx, didx;
  logic          lookup_hit, take, dn_resp, dn_pf, sq;

  assign ridx       = req_addr[IW-1:0];
  assign didx       = down_pkt.addr[IW-1:0];
  assign lookup_hit = lv[ridx] && ltg[ridx] == req_addr[LADDR_W-1:IW];
  assign req_ready  = !up_v && !hr_v;
  assign take       = req_valid && req_ready;

  assign dn_resp = down_valid && down_pkt.ptype == PK_RESP;
  assign dn_pf   = down_valid && down_pkt.ptype == PK_PFDATA;
  assign sq      = dn_pf && up_v && up_q.ptype == PK_READ && up_q.addr == down_pkt.addr;

  always_comb begin
    up_valid = up_v;
    up_pkt   = up_q;
    if (sq) up_pkt.ptype = PK_HIT;
  end

  always_comb begin
    rsp_valid = 1'b0;
    rsp_addr  = hr_a;
    rsp_data  = hr_d;
    if (dn_resp || sq) begin
      rsp_valid = 1'b1;
      rsp_addr  = down_pkt.addr;
      rsp_data  = down_pkt.data;
    end else if (hr_v) begin
      rsp_valid = 1'b1;
    end
  end

  assign ev_hit    = take && lookup_hit;
  assign ev_squash = sq;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      up_v <= 1'b0;
      hr_v <= 1'b0;
      for (int i = 0; i < NLINES; i++) lv[i] <= 1'b0;
    end else begin
      if (up_v && up_ready) up_v <= 1'b0;
      else if (sq)          up_q.ptype <= PK_HIT;
      if (hr_v && !(dn_resp || sq)) hr_v <= 1'b0;
      if (take) begin
        up_v <= 1'b1;
        up_q <= mk_pkt(lookup_hit ? PK_HIT : PK_READ, ME, req_addr, '0);
        if (lookup_hit) begin
          hr_v <= 1'b1;
          hr_a <= req_addr;
          hr_d <= ld[ridx];
        end
      end
      if (dn_pf) begin
        lv[didx]  <= 1'b1;
        ltg[didx] <= down_pkt.addr[LADDR_W-1:IW];
        ld[didx]  <= down_pkt.data;
      end
    end
  end

  a_route: assert property (@(posedge clk) disable iff (!rst_n)
                            down_valid |-> down_pkt.cpu == ME);
endmodule
