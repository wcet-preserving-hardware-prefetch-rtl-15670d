// tb_wc_blocking: worst-case blocking on a fully loaded 16-core tree for the
// blocking factors m = 2, 3, 4 and 5.
//
// Four 16-leaf trees (M = 2..5) run side by side. Every leaf of every tree
// offers a read on every cycle and the root accepts one packet per cycle, so
// every input register in the tree is always full: the "full load" state in
// which a multiplexer's turns decide everything and one cycle stands for one
// memory access ("block"). Each read carries its leaf's sequence number. At
// the root the testbench checks that
//   * each leaf's reads arrive in order and none is lost,
//   * no prefetch slot is generated (a fully loaded tree has no slack),
//   * each leaf's share of the root equals the product, along its path, of
//     (m-1)/m for an HP side and 1/m for an LP side, within 1% plus two,
//   * the longest time any read waited, from entering the tree (accepted
//     into the bottom multiplexer) to leaving the root, equals the
//     worst-case number of blocks analysed for that leaf and m (the table
//     below, from the turn-by-turn worst-case analysis of a tree whose
//     buffers are all full). The analysed worst case is reached in steady
//     full load, and never exceeded.
// The measured longest waits are printed per leaf beside the analysed ones.
// A read that waits W cycles here waits W memory accesses when each access
// takes t_mem cycles, so the bound scales to W * t_mem.
module tb_wc_blocking;
  import bt_pkg::*;

  localparam int N    = 16;
  localparam int NM   = 4;
  localparam int WARM = 4000;
  localparam int RUN  = 64000;

  // analysed worst-case blocks per core index, rows m = 2..5
  localparam int TBL[NM][N] = '{
    '{30, 30, 30, 30, 30, 30, 30, 30, 30, 30, 30, 30, 30, 30, 30, 30},
    '{15, 18, 24, 32, 29, 33, 47, 60, 30, 36, 48, 63, 57, 66, 93, 120},
    '{11, 16, 26, 39, 28, 44, 71, 114, 32, 48, 76, 116, 84, 132, 212, 340},
    '{10, 17, 27, 50, 33, 58, 102, 195, 40, 65, 105, 200, 130, 230, 405, 780}
  };

  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  logic measure = 0;

  int max_lat[NM][N];
  int n_got  [NM][N];
  int n_bad  [NM];
  int n_slot [NM];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  for (genvar g = 0; g < NM; g++) begin : g_m
    logic    lv [N];
    logic    lr [N];
    bt_pkt_t lp [N];
    logic    ldv[N];
    bt_pkt_t ldp[N];
    logic    rv;
    bt_pkt_t rp;
    logic [N-2:0] evs, evq;
    int unsigned seq [N];   // next sequence number each leaf offers
    int unsigned exp [N];   // next sequence number expected at the root
    int          t_in[N][$];

    bt_tree #(.N(N), .M(g + 2)) u_tree (
      .clk, .rst_n, .slot_en(1'b1),
      .leaf_up_valid(lv), .leaf_up_ready(lr), .leaf_up_pkt(lp),
      .leaf_down_valid(ldv), .leaf_down_pkt(ldp),
      .root_up_valid(rv), .root_up_ready(1'b1), .root_up_pkt(rp),
      .root_down_valid(1'b0), .root_down_pkt('0),
      .ev_slot(evs), .ev_squash(evq)
    );

    for (genvar i = 0; i < N; i++) begin : g_src
      assign lv[i] = rst_n;
      assign lp[i] = mk_pkt(PK_READ, cpu_t'(i), laddr_t'(seq[i]), '0);
    end

    initial for (int i = 0; i < N; i++) begin
      seq[i] = 0;
      exp[i] = 0;
    end

    always @(posedge clk) if (rst_n) begin
      for (int i = 0; i < N; i++)
        if (lr[i]) begin
          t_in[i].push_back(cyc);
          seq[i]++;
        end
      if (rv) begin
        if (rp.ptype != PK_READ) begin
          n_slot[g]++;
        end else begin
          automatic int c   = int'(rp.cpu);
          automatic int t0  = (t_in[c].size() > 0) ? t_in[c].pop_front() : cyc;
          automatic int lat = cyc - t0;
          if (rp.addr != laddr_t'(exp[c])) n_bad[g]++;
          exp[c] = int'(rp.addr) + 1;
          if (measure) begin
            n_got[g][c]++;
            if (lat > max_lat[g][c]) max_lat[g][c] = lat;
          end
        end
      end
    end
  end

  // expected share of the root, in millionths, for leaf i at blocking factor m
  function automatic longint share_ppm(int m, int i);
    longint s  = 1_000_000;
    longint ml = longint'(m);
    for (int b = 3; b >= 0; b--)
      s = (((i >> b) & 1) != 0) ? s / ml : s * (ml - 1) / ml;
    return s;
  endfunction

  initial begin
    for (int g = 0; g < NM; g++) begin
      n_bad[g] = 0;
      n_slot[g] = 0;
      for (int i = 0; i < N; i++) begin
        max_lat[g][i] = 0;
        n_got[g][i] = 0;
      end
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (WARM) @(posedge clk);
    measure = 1;
    repeat (RUN) @(posedge clk);
    measure = 0;
    @(posedge clk);
    for (int g = 0; g < NM; g++) begin
      automatic int m = g + 2;
      automatic string line = "";
      check(n_bad[g] == 0, $sformatf("m=%0d: reads out of order or lost (%0d)", m, n_bad[g]));
      check(n_slot[g] == 0, $sformatf("m=%0d: slots under full load (%0d)", m, n_slot[g]));
      for (int i = 0; i < N; i++) begin
        automatic longint expn = share_ppm(m, i) * RUN / 1_000_000;
        automatic longint tol  = expn / 100 + 2;
        automatic longint got  = longint'(n_got[g][i]);
        check(got >= expn - tol && got <= expn + tol,
              $sformatf("m=%0d leaf %0d: %0d reads, expected %0d", m, i, got, expn));
        check(max_lat[g][i] == TBL[g][i],
              $sformatf("m=%0d leaf %0d: longest wait %0d, analysed %0d",
                        m, i, max_lat[g][i], TBL[g][i]));
        line = {line, $sformatf(" %0d/%0d", max_lat[g][i], TBL[g][i])};
      end
      $display("m=%0d longest wait/analysed per leaf:%s", m, line);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WARM + RUN + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
