// tb_bt_tree: the 16-leaf Bluetree with M=4.
// Checks: a lone read crosses the four levels in four cycles (slots off);
// a downward packet reaches the leaf named by its core index after four
// cycles and no other leaf, for every leaf; under full load (every leaf always waiting,
// root accepting every cycle) no packet is lost or reordered, no slot is
// made, and each leaf's share of the root bandwidth is the product over its
// path of 3/4 per HP side and 1/4 per LP side.
module tb_bt_tree;
  import bt_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, slot_en;
  logic    leaf_up_valid[N], leaf_up_ready[N], leaf_down_valid[N];
  bt_pkt_t leaf_up_pkt[N], leaf_down_pkt[N];
  logic    root_up_valid, root_up_ready, root_down_valid;
  bt_pkt_t root_up_pkt, root_down_pkt;
  logic [N-2:0] ev_slot, ev_squash;
  int checks = 0, failures = 0;
  int sent[N], got[N];
  bit on[N];
  int slots, slots_a, slots_b;
  int got_a[N], got_b[N];
  bit stop = 0;

  bt_tree #(.N(N), .M(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  for (genvar i = 0; i < N; i++) begin : g_src
    assign leaf_up_valid[i] = on[i];
    assign leaf_up_pkt[i]   = mk_pkt(PK_READ, cpu_t'(i), laddr_t'(sent[i]), '0);
    always @(posedge clk) if (leaf_up_valid[i] && leaf_up_ready[i]) begin
      sent[i]++;
      if (stop) on[i] = 0;   // a valid request is only withdrawn once taken
    end
  end

  always @(posedge clk) if (rst_n && root_up_valid && root_up_ready) begin
    if (root_up_pkt.ptype == PK_SLOT) slots++;
    else begin
      checks++;
      if (root_up_pkt.addr != laddr_t'(got[root_up_pkt.cpu])) begin
        failures++; $display("FAIL order core %0d", root_up_pkt.cpu);
      end
      got[root_up_pkt.cpu]++;
    end
  end

  function automatic real share(int i);
    real s = 1.0;
    for (int b = 0; b < 4; b++) s = s * (((i >> b) & 1) ? 0.25 : 0.75);
    return s;
  endfunction

  initial begin
    int t0, total;
    for (int i = 0; i < N; i++) begin sent[i] = 0; got[i] = 0; on[i] = 0; end
    slots = 0; slot_en = 0; root_up_ready = 1; root_down_valid = 0; root_down_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // upward latency of a lone packet from leaf 9
    @(negedge clk); on[9] = 1; stop = 1;
    @(negedge clk); stop = 0;
    t0 = 1;
    while (!root_up_valid && t0 < 20) begin @(negedge clk); t0++; end
    check(t0 == 4 && root_up_pkt.cpu == 9, $sformatf("upward latency %0d cycles", t0));
    @(negedge clk);
    // downward latency and steering, every leaf
    for (int c = 0; c < N; c++) begin
      root_down_valid = 1; root_down_pkt = mk_pkt(PK_RESP, cpu_t'(c), laddr_t'(33 + c), line_t'(1));
      @(negedge clk); root_down_valid = 0;
      t0 = 1;
      while (!leaf_down_valid[c] && t0 < 20) begin @(negedge clk); t0++; end
      check(t0 == 4, $sformatf("downward latency to leaf %0d: %0d cycles", c, t0));
      for (int i = 0; i < N; i++) if (i != c) check(!leaf_down_valid[i], $sformatf("only leaf %0d receives", c));
      check(leaf_down_pkt[c].addr == laddr_t'(33 + c), "leaf data");
      @(negedge clk);
    end
    // full load
    repeat (5) @(negedge clk);
    for (int i = 0; i < N; i++) begin sent[i] = 0; got[i] = 0; end
    slot_en = 1; slots = 0;
    for (int i = 0; i < N; i++) on[i] = 1;
    repeat (200) @(posedge clk);
    slots_a = slots;
    for (int i = 0; i < N; i++) got_a[i] = got[i];
    repeat (256 * 40) @(posedge clk);
    slots_b = slots;
    for (int i = 0; i < N; i++) got_b[i] = got[i] - got_a[i];
    stop = 1;
    repeat (2000) @(posedge clk);
    total = 0;
    for (int i = 0; i < N; i++) total += got_b[i];
    for (int i = 0; i < N; i++) begin
      check(got[i] == sent[i], $sformatf("leaf %0d: sent %0d got %0d", i, sent[i], got[i]));
      check(got_b[i] >= int'(share(i) * total) - 4 && got_b[i] <= int'(share(i) * total) + 4,
            $sformatf("leaf %0d share %0d of %0d, expected %f", i, got_b[i], total, share(i) * total));
    end
    check(total >= 256 * 40 - 2, $sformatf("root busy every cycle (%0d)", total));
    check(slots_b == slots_a, $sformatf("no slots under full load (%0d)", slots_b - slots_a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
