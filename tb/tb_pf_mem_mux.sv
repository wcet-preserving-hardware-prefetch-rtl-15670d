// tb_pf_mem_mux: round-robin multiplexing onto memory. Random waiting
// demand reads, waiting prefetches and memory readiness are checked against
// an independent turn model: the offered request, which queue is popped,
// and that with both queues always waiting they alternate.
module tb_pf_mem_mux;
  import bt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dq_valid, dq_pop, pq_valid, pq_pop, mem_valid, mem_ready;
  mem_req_t dq_req, pq_req, mem_req;
  int checks = 0, failures = 0;
  bit pf_turn = 0;
  int last = -1, alternations = 0;

  pf_mem_mux dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic step(bit dv, bit pv, bit rdy);
    bit exp_pf;
    @(negedge clk);
    dq_valid = dv; pq_valid = pv; mem_ready = rdy;
    dq_req = mem_req_t'($urandom); dq_req.pf = 0;
    pq_req = mem_req_t'($urandom); pq_req.pf = 1;
    #1;
    exp_pf = pv && (!dv || pf_turn);
    check(mem_valid == (dv || pv), "valid");
    if (dv || pv) check(mem_req == (exp_pf ? pq_req : dq_req), "selected request");
    check(dq_pop == (rdy && dv && !exp_pf), "demand pop");
    check(pq_pop == (rdy && exp_pf), "prefetch pop");
    @(posedge clk);
    if (rdy && dv && !exp_pf && pv) pf_turn = 1;
    else if (rdy && exp_pf && dv) pf_turn = 0;
  endtask

  initial begin
    dq_valid = 0; pq_valid = 0; mem_ready = 0; dq_req = '0; pq_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) step(($urandom % 2) == 1, ($urandom % 2) == 1, ($urandom % 3) != 0);
    // both always waiting: strict alternation
    for (int i = 0; i < 20; i++) begin
      step(1, 1, 1);
      if (last >= 0 && int'(pq_pop) != last) alternations++;
      last = int'(pq_pop);
    end
    check(alternations == 19, $sformatf("alternation %0d", alternations));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
