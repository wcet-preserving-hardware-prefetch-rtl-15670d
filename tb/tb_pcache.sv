// tb_pcache: prefetch cache of core 2 (512 bytes, 32 lines of 16 bytes).
// Checks: a miss goes up as a demand read and its response reaches the
// core uncached; prefetch data is stored silently; a read of a stored line
// is answered one cycle later and sends a hit notification up; a line at
// the same index (line + 32) replaces it; prefetch data meeting a read still
// waiting to go up answers the core at once and turns the read into a hit;
// a read response from the tree takes the response port before a waiting
// hit response.
module tb_pcache;
  import bt_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, rsp_valid, up_valid, up_ready, down_valid, ev_hit, ev_squash;
  laddr_t req_addr, rsp_addr;
  line_t rsp_data;
  bt_pkt_t up_pkt, down_pkt;
  int checks = 0, failures = 0;

  pcache #(.CPU(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic request(int a);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_addr = laddr_t'(a);
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic down(pkt_type_e t, int a);
    down_valid = 1; down_pkt = mk_pkt(t, cpu_t'(2), laddr_t'(a), exp_line(laddr_t'(a)));
  endtask

  initial begin
    req_valid = 0; req_addr = '0; up_ready = 1; down_valid = 0; down_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // miss
    request(40);
    check(up_valid && up_pkt.ptype == PK_READ && up_pkt.cpu == 2 && up_pkt.addr == 40, "miss goes up as read");
    check(!rsp_valid, "no response yet");
    @(negedge clk);
    check(!up_valid, "read taken");
    down(PK_RESP, 40); #1;
    check(rsp_valid && rsp_addr == 40 && rsp_data == exp_line(40), "response passed to core");
    @(negedge clk); down_valid = 0;
    // prefetch data stored, not passed
    down(PK_PFDATA, 41); #1;
    check(!rsp_valid, "prefetch data not passed to core");
    @(negedge clk); down_valid = 0;
    // hit
    request(41);
    check(rsp_valid && rsp_addr == 41 && rsp_data == exp_line(41), "hit answered next cycle");
    check(up_valid && up_pkt.ptype == PK_HIT && up_pkt.addr == 41, "hit notification goes up");
    @(negedge clk);
    check(!rsp_valid, "one response per hit");
    // line 40 was never cached
    request(40);
    check(up_valid && up_pkt.ptype == PK_READ, "responses are not cached");
    @(negedge clk);
    down(PK_RESP, 40); @(negedge clk); down_valid = 0;
    // replacement
    down(PK_PFDATA, 41 + 32); @(negedge clk); down_valid = 0;
    request(41);
    check(up_valid && up_pkt.ptype == PK_READ, "conflicting line replaced");
    @(negedge clk);
    down(PK_RESP, 41); @(negedge clk); down_valid = 0;
    request(73);
    check(up_valid && up_pkt.ptype == PK_HIT && rsp_valid && rsp_data == exp_line(73), "new line hits");
    @(negedge clk);
    // squash inside the cache
    up_ready = 0;
    request(90);
    check(up_valid && up_pkt.ptype == PK_READ, "read waiting");
    down(PK_PFDATA, 90); #1;
    check(ev_squash && rsp_valid && rsp_addr == 90 && rsp_data == exp_line(90), "squash answers the core");
    check(up_pkt.ptype == PK_HIT, "squash turns the read into a hit");
    @(negedge clk); down_valid = 0;
    check(up_valid && up_pkt.ptype == PK_HIT, "hit kept");
    up_ready = 1;
    @(negedge clk);
    // response-port conflict: hit response waits for a tree response
    down(PK_PFDATA, 95); @(negedge clk); down_valid = 0;
    @(negedge clk);
    req_valid = 1; req_addr = 95;
    @(negedge clk);
    req_valid = 0;
    down(PK_RESP, 96); #1;
    check(rsp_valid && rsp_addr == 96, "tree response first");
    @(negedge clk); down_valid = 0; #1;
    check(rsp_valid && rsp_addr == 95 && rsp_data == exp_line(95), "hit response next");
    @(negedge clk);
    check(!rsp_valid, "then idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
