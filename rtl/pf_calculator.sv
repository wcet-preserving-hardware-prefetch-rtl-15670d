// pf_calculator: prefetch calculator and stream buffers of the prefetcher.
//
// The stream buffers are a table of NSTREAM entries per core, each holding a
// valid bit and the last line address seen on that stream. The calculator
// observes every demand read (ev_hit=0) and prefetch-hit notification
// (ev_hit=1) that the prefetcher accepts from the tree:
//   * if an entry of that core holds line a-1, the stream continues: the
//     entry moves to line a and a prefetch of line a+1 is proposed;
//   * else if an entry already holds line a, nothing happens (repeat);
//   * else a new stream is started in the core's round-robin victim entry
//     with last line a. A demand read proposes nothing yet; a hit proposes
//     line a+1, since a useful prefetch already shows a stream.
// So two misses to adjacent lines start prefetching, and each hit on a
// prefetched line asks for the next one. With enable low nothing is trained
// or proposed. The proposal appears on cand_valid/cand one cycle after the
// event; the table updates on the same edge.
//
// A per-core table of last addresses with a valid bit, eight entries per
// core and round-robin replacement follow the prefetcher description; the
// two-miss detection rule, the hit rule and the one-line prefetch distance
// are this design's choices.
module pf_calculator
  import bt_pkg::*;
#(
  parameter int unsigned NSTREAM = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable,
  input  logic     ev_valid,
  input  logic     ev_hit,
  input  cpu_t     ev_cpu,
  input  laddr_t   ev_addr,
  output logic     cand_valid,
  output pf_cand_t cand
);
  localparam int unsigned SW = (NSTREAM > 1) ? $clog2(NSTREAM) : 1;

  logic   sv   [NCPU][NSTREAM];
  laddr_t slst [NCPU][NSTREAM];
  logic [SW-1:0] rr [NCPU];

  logic          m_next, m_same;
  logic [SW-1:0] m_idx;

  always_comb begin
    m_next = 1'b0;
    m_same = 1'b0;
    m_idx  = '0;
    for (int s = 0; s < NSTREAM; s++) begin
      if (sv[ev_cpu][s] && slst[ev_cpu][s] == ev_addr - 1'b1 && !m_next) begin
        m_next = 1'b1;
        m_idx  = SW'(s);
      end
      if (sv[ev_cpu][s] && slst[ev_cpu][s] == ev_addr) m_same = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cand_valid <= 1'b0;
      for (int c = 0; c < NCPU; c++) begin
        rr[c] <= '0;
        for (int s = 0; s < NSTREAM; s++) sv[c][s] <= 1'b0;
      end
    end else begin
      cand_valid <= 1'b0;
      if (enable && ev_valid) begin
        if (m_next) begin
          slst[ev_cpu][m_idx] <= ev_addr;
          cand_valid          <= 1'b1;
        end else if (!m_same) begin
          sv[ev_cpu][rr[ev_cpu]]   <= 1'b1;
          slst[ev_cpu][rr[ev_cpu]] <= ev_addr;
          rr[ev_cpu]               <= (rr[ev_cpu] == SW'(NSTREAM - 1)) ? '0 : rr[ev_cpu] + 1'b1;
          cand_valid               <= ev_hit;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    cand.cpu  <= ev_cpu;
    cand.addr <= ev_addr + 1'b1;
  end
endmodule
