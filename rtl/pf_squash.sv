// pf_squash: outstanding-prefetches table with the incoming and outgoing
// squash filters of the prefetcher.
//
// The table has PF_OUT rows of {valid, squashed, core, line}.
//   * Insert: when a prefetch is merged into a slot, alloc writes it into the
//     lowest free row, named on free_row (free_avail says one exists).
//   * Incoming squash filter: a demand read (in_valid, in_cpu, in_addr) that
//     matches a valid, not yet squashed row of the same core and line is
//     absorbed: in_squash is high (combinationally), the read must be
//     discarded, and the row is marked squashed on the clock edge.
//   * Outgoing squash filter: when memory returns a prefetch (out_valid,
//     out_row), out_squashed says whether it must go down as a read response
//     instead of prefetch data; the row is freed on the clock edge. A read
//     squashed into the same row in the same cycle counts as squashed.
// All lookups are combinational; table updates take effect next cycle.
//
// The table, its squashed mark and both filters follow the prefetcher
// description; the row count PF_OUT (bt_pkg) and the row tag carried
// through memory are this design's choices.
module pf_squash
  import bt_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // insert
  input  logic                alloc,
  input  cpu_t                alloc_cpu,
  input  laddr_t              alloc_addr,
  output logic                free_avail,
  output logic [PF_OUT_W-1:0] free_row,
  // incoming squash filter
  input  logic                in_valid,
  input  cpu_t                in_cpu,
  input  laddr_t              in_addr,
  output logic                in_squash,
  // outgoing squash filter
  input  logic                out_valid,
  input  logic [PF_OUT_W-1:0] out_row,
  output logic                out_squashed
);
  logic   rv  [PF_OUT];
  logic   rsq [PF_OUT];
  cpu_t   rc  [PF_OUT];
  laddr_t ra  [PF_OUT];

  logic [PF_OUT_W-1:0] in_row;

  always_comb begin
    free_avail = 1'b0;
    free_row   = '0;
    for (int r = PF_OUT - 1; r >= 0; r--)
      if (!rv[r]) begin
        free_avail = 1'b1;
        free_row   = PF_OUT_W'(r);
      end
  end

  always_comb begin
    in_squash = 1'b0;
    in_row    = '0;
    for (int r = 0; r < PF_OUT; r++)
      if (in_valid && rv[r] && !rsq[r] && rc[r] == in_cpu && ra[r] == in_addr && !in_squash) begin
        in_squash = 1'b1;
        in_row    = PF_OUT_W'(r);
      end
  end

  assign out_squashed = out_valid && (rsq[out_row] || (in_squash && in_row == out_row));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < PF_OUT; r++) begin
        rv[r]  <= 1'b0;
        rsq[r] <= 1'b0;
      end
    end else begin
      if (in_squash) rsq[in_row] <= 1'b1;
      if (out_valid) begin
        rv[out_row]  <= 1'b0;
        rsq[out_row] <= 1'b0;
      end
      if (alloc && free_avail) begin
        rv[free_row]  <= 1'b1;
        rsq[free_row] <= 1'b0;
        rc[free_row]  <= alloc_cpu;
        ra[free_row]  <= alloc_addr;
      end
    end
  end

  a_out_live: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid |-> rv[out_row]);
endmodule
