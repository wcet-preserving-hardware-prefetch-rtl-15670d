// tb_prefetcher: the prefetcher between a scripted tree root and the
// memory model (T_MEM = 12 cycles).
// Checks, with expected memory traffic and downward packets worked out by
// hand for each scenario:
//   1. two demand reads to adjacent lines go to memory and return as read
//      responses; a slot then carries the proposed prefetch of the next line,
//      which returns as prefetch data;
//   2. a slot with nothing to prefetch is abandoned and reaches no memory;
//   3. a demand read for a line whose prefetch is outstanding is absorbed
//      and the prefetch comes back as a read response (one response, one
//      memory access);
//   4. a prefetch hit both proposes the next line and serves as its slot;
//   5. with pf_enable low, nothing is prefetched.
module tb_prefetcher;
  import bt_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0, pf_enable;
  logic up_valid, up_ready, down_valid;
  bt_pkt_t up_pkt, down_pkt;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic ev_merge, ev_abandon, ev_in_squash, ev_out_squash, ev_pf_drop;
  int n_demand, n_prefetch;
  int checks = 0, failures = 0;
  int n_abandon = 0, n_merge = 0;
  bt_pkt_t got[$];

  prefetcher dut (.*);
  mem_model #(.T_MEM(12)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready), .rsp(mem_rsp),
    .n_demand, .n_prefetch);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (down_valid) got.push_back(down_pkt);
    if (ev_abandon) n_abandon++;
    if (ev_merge) n_merge++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic send(pkt_type_e t, int c, int a);
    @(negedge clk);
    up_valid = 1; up_pkt = mk_pkt(t, cpu_t'(c), laddr_t'(a), '0);
    @(posedge clk);
    while (!up_ready) @(posedge clk);
    @(negedge clk);
    up_valid = 0;
  endtask

  task automatic expect_down(pkt_type_e t, int c, int a);
    int w = 0;
    while (got.size() == 0 && w < 200) begin @(posedge clk); w++; end
    if (got.size() == 0) check(0, $sformatf("no packet for core %0d line %0d", c, a));
    else begin
      bt_pkt_t p = got.pop_front();
      check(p.ptype == t && p.cpu == cpu_t'(c) && p.addr == laddr_t'(a) && p.data == exp_line(p.addr),
            $sformatf("down %s core %0d line %0d (want %s %0d %0d)", p.ptype.name(), p.cpu, p.addr,
                      t.name(), c, a));
    end
  endtask

  task automatic settle();
    repeat (60) @(posedge clk);
  endtask

  initial begin
    pf_enable = 1; up_valid = 0; up_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1
    send(PK_READ, 2, 10);
    send(PK_READ, 2, 11);
    expect_down(PK_RESP, 2, 10);
    expect_down(PK_RESP, 2, 11);
    send(PK_SLOT, 0, 0);
    expect_down(PK_PFDATA, 2, 12);
    settle();
    check(n_demand == 2 && n_prefetch == 1, $sformatf("1: memory %0d demand %0d prefetch", n_demand, n_prefetch));
    check(n_merge == 1, "1: one merge");
    // 2
    send(PK_SLOT, 0, 0);
    settle();
    check(n_abandon == 1 && n_prefetch == 1 && got.size() == 0, "2: empty slot abandoned");
    // 3: stream on core 6, prefetch of 32 outstanding when the read for 32 arrives
    send(PK_READ, 6, 30);
    send(PK_READ, 6, 31);
    expect_down(PK_RESP, 6, 30);
    expect_down(PK_RESP, 6, 31);
    send(PK_SLOT, 0, 0);
    send(PK_READ, 6, 32);
    expect_down(PK_RESP, 6, 32);
    settle();
    check(got.size() == 0, "3: exactly one packet for line 32");
    check(n_demand == 4 && n_prefetch == 2, $sformatf("3: memory %0d demand %0d prefetch", n_demand, n_prefetch));
    // the read for 32 continued the stream: line 33 waits; a hit on 33 proposes 34 and
    // is itself a slot, carrying 33
    // 4
    send(PK_HIT, 6, 33);
    expect_down(PK_PFDATA, 6, 33);
    send(PK_SLOT, 0, 0);
    expect_down(PK_PFDATA, 6, 34);
    settle();
    check(n_prefetch == 4 && n_demand == 4, $sformatf("4: memory %0d demand %0d prefetch", n_demand, n_prefetch));
    // 5
    pf_enable = 0;
    send(PK_READ, 8, 70);
    send(PK_READ, 8, 71);
    send(PK_SLOT, 0, 0);
    send(PK_HIT, 8, 72);
    expect_down(PK_RESP, 8, 70);
    expect_down(PK_RESP, 8, 71);
    settle();
    check(got.size() == 0 && n_prefetch == 4, "5: nothing prefetched when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
