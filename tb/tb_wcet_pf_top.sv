// tb_wcet_pf_top: the whole 16-core memory system, end to end, at its
// default parameters, with the memory model (T_MEM = 10 cycles) and one
// core model per leaf.
//
// Runs, each from reset:
//   A. sixteen cores each read 48 consecutive lines (own region, a
//      different computation delay per core, one read outstanding),
//      prefetching off;
//   B. the same with prefetching on;
//   C. "full load": core P reads 48 lines with delay 0, 30, 60, 150 or 300 while the
//      other fifteen leaves are hardware traffic generators, prefetching off;
//   D. the same as C with prefetching on; C and D run for P = 1, 6, 15;
//   G, H. as A and B with 300 more cycles of computation per read, so that
//      memory is not saturated; with prefetching on the run must finish
//      no later than with it off;
//   E. as B with four reads outstanding per core;
//   F. full load with core 1 issuing four reads outstanding, prefetching on.
// Every response is checked for line and data by the core models and every
// software core must finish. In the full-load runs core P, with prefetching
// on, must finish within 5% of its time with it off and its longest read
// must stay within 8 memory accesses of that with it off (the prefetcher's
// queues can reorder that many). Each mechanism of the tree and the
// prefetcher (slots,
// squashes in multiplexers and caches, cache hits, merges, abandoned slots,
// absorbed reads, squashed prefetches returned as responses, dropped
// proposals) is counted over all runs and must occur at least once. The
// squash inside a prefetch cache needs a prefetch to overtake a read still
// waiting in the cache, which these traffic patterns make rare; it is
// counted and reported here and checked directly in tb_pcache.
module tb_wcet_pf_top;
  import bt_pkg::*;
  import tb_pkg::*;
  localparam int T_MEM = 10;
  localparam int LINES = 48;

  logic clk = 0, rst_n = 0, pf_enable;
  logic   cpu_req_valid[NCPU], cpu_req_ready[NCPU], cpu_rsp_valid[NCPU];
  laddr_t cpu_req_addr[NCPU], cpu_rsp_addr[NCPU];
  line_t  cpu_rsp_data[NCPU];
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic [NCPU-2:0] ev_mux_slot, ev_mux_squash;
  logic [NCPU-1:0] ev_pc_hit, ev_pc_squash;
  logic ev_merge, ev_abandon, ev_in_squash, ev_out_squash, ev_pf_drop;
  int n_demand, n_prefetch;

  wcet_pf_top dut (.*);

  mem_model #(.T_MEM(T_MEM)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready), .rsp(mem_rsp),
    .n_demand, .n_prefetch);

  logic gen[NCPU], start, done[NCPU];
  int   base[NCPU], delay[NCPU], errors[NCPU], fin[NCPU];
  int   n_lines, max_out;
  int   max_lat[NCPU];

  for (genvar i = 0; i < NCPU; i++) begin : g_core
    core_model u_core (
      .clk, .rst_n, .gen(gen[i]), .base(base[i]), .n_lines(n_lines), .delay(delay[i]), .max_out(max_out),
      .start, .req_valid(cpu_req_valid[i]), .req_ready(cpu_req_ready[i]), .req_addr(cpu_req_addr[i]),
      .rsp_valid(cpu_rsp_valid[i]), .rsp_addr(cpu_rsp_addr[i]), .rsp_data(cpu_rsp_data[i]),
      .done(done[i]), .errors(errors[i]), .finish_cycle(fin[i]));
    // read latency: from the cycle a read is taken to its response
    int t_iss[laddr_t];
    int now;
    always @(posedge clk) begin
      if (!rst_n) begin max_lat[i] = 0; now = 0; t_iss.delete(); end
      else if (!gen[i]) begin
        now++;
        if (cpu_rsp_valid[i] && t_iss.exists(cpu_rsp_addr[i])) begin
          if (now - t_iss[cpu_rsp_addr[i]] > max_lat[i]) max_lat[i] = now - t_iss[cpu_rsp_addr[i]];
          t_iss.delete(cpu_rsp_addr[i]);
        end
        if (cpu_req_valid[i] && cpu_req_ready[i]) t_iss[cpu_req_addr[i]] = now;
      end
    end
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c_slot = 0, c_msq = 0, c_hit = 0, c_psq = 0, c_merge = 0, c_aband = 0;
  int c_insq = 0, c_outsq = 0, c_drop = 0;

  always @(posedge clk) if (rst_n) begin
    c_slot  += $countones(ev_mux_slot);
    c_msq   += $countones(ev_mux_squash);
    c_hit   += $countones(ev_pc_hit);
    c_psq   += $countones(ev_pc_squash);
    c_merge += int'(ev_merge);
    c_aband += int'(ev_abandon);
    c_insq  += int'(ev_in_squash);
    c_outsq += int'(ev_out_squash);
    c_drop  += int'(ev_pf_drop);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // run one configuration; returns the finish cycle of core p (or of the
  // slowest core when p < 0) and its longest read latency
  task automatic run(bit pf, int p, string name, output int t_fin, output int t_lat);
    bit all_done;
    int cyc, s0, m0;
    @(negedge clk);
    rst_n = 0; start = 0; pf_enable = pf;
    for (int i = 0; i < NCPU; i++) begin
      gen[i]   = (p >= 0) && (i != p);
      base[i]  = 4096 * i + 16;
      delay[i] = (p >= 0) ? full_delay : light_delay + 3 * ((7 * i) % 16) + 3 * (i % 3);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    cyc = 0;
    s0 = c_slot; m0 = c_merge;
    do begin
      @(negedge clk);
      cyc++;
      all_done = 1;
      for (int i = 0; i < NCPU; i++) if (!gen[i] && !done[i]) all_done = 0;
    end while (!all_done && cyc < 400000);
    check(all_done, $sformatf("%s: all cores finished", name));
    t_fin = 0; t_lat = 0;
    for (int i = 0; i < NCPU; i++) if (!gen[i]) begin
      check(errors[i] == 0, $sformatf("%s: core %0d data errors %0d", name, i, errors[i]));
      if (fin[i] > t_fin) t_fin = fin[i];
      if (max_lat[i] > t_lat) t_lat = max_lat[i];
    end
    $display("%s: finished at cycle %0d, longest read %0d cycles, memory %0d demand / %0d prefetch, %0d slots, %0d filled",
             name, t_fin, t_lat, n_demand, n_prefetch, c_slot - s0, c_merge - m0);
    if (p < 0) begin
      string per = "";
      for (int i = 0; i < NCPU; i++) per = {per, $sformatf(" %0d", fin[i])};
      $display("  finish cycle per core:%s", per);
    end
    start = 0;
  endtask

  initial begin
    int fa, la, fb, lb;
    n_lines = LINES; max_out = 1;
    for (int i = 0; i < NCPU; i++) begin gen[i] = 0; base[i] = 0; delay[i] = 0; end
    start = 0; pf_enable = 0;
    run(0, -1, "A 16 cores, prefetch off", fa, la);
    check(c_slot == 0 && c_merge == 0 && n_prefetch == 0, "prefetch off: no slots, no prefetches");
    run(1, -1, "B 16 cores, prefetch on ", fb, lb);
    foreach (g_full_p[k]) foreach (g_full_d[j]) begin
      automatic int p = g_full_p[k];
      full_delay = g_full_d[j];
      run(0, p, $sformatf("C full load core %0d delay %0d, prefetch off", p, full_delay), fa, la);
      run(1, p, $sformatf("D full load core %0d delay %0d, prefetch on ", p, full_delay), fb, lb);
      check(fb * 100 <= fa * 105,
            $sformatf("full load core %0d: at most 5%% slower with prefetch (%0d vs %0d)", p, fb, fa));
      check(lb <= la + 8 * T_MEM,
            $sformatf("full load core %0d: longest read within margin (%0d vs %0d)", p, lb, la));
    end
    // sixteen cores with more computation between reads: memory not saturated
    light_delay = 300;
    run(0, -1, "G 16 cores, long delays, prefetch off", fa, la);
    run(1, -1, "H 16 cores, long delays, prefetch on ", fb, lb);
    check(fb <= fa, $sformatf("16 cores, long delays: faster with prefetch (%0d vs %0d)", fb, fa));
    light_delay = 0;
    // multi-issue cores, four reads outstanding
    max_out = 4;
    run(1, -1, "E 16 cores, 4 outstanding, prefetch on", fb, lb);
    full_delay = 0;
    run(1, 1, "F full load core 1, 4 outstanding, prefetch on", fb, lb);
    $display("events: slots %0d, mux squashes %0d, cache hits %0d, cache squashes %0d, merges %0d,",
             c_slot, c_msq, c_hit, c_psq, c_merge);
    $display("        abandoned slots %0d, absorbed reads %0d, prefetches as responses %0d, dropped %0d",
             c_aband, c_insq, c_outsq, c_drop);
    check(c_slot > 0, "slots created");
    check(c_msq > 0, "multiplexer squash");
    check(c_hit > 0, "prefetch cache hits");
    check(c_merge > 0, "slots filled");
    check(c_aband > 0, "slots abandoned");
    check(c_insq > 0, "reads absorbed by the incoming squash filter");
    check(c_outsq > 0, "prefetches returned as read responses");
    check(c_drop > 0, "proposals dropped on a full prefetch buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int g_full_p[3] = '{1, 6, 15};
  localparam int g_full_d[5] = '{0, 30, 60, 150, 300};
  int full_delay = 60;
  int light_delay = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
