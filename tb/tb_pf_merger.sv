// tb_pf_merger: every combination of slot, waiting prefetch, free table row
// and prefetch-queue space. A merge happens only when all four are present
// and then produces a prefetch request with the prefetch's core, line and
// the free row; a slot is always consumed, abandoned when no merge happens.
module tb_pf_merger;
  import bt_pkg::*;
  logic slot_valid, slot_pop, pf_valid, pf_pop, free_avail, alloc;
  logic pfq_valid, pfq_ready, ev_merge, ev_abandon;
  pf_cand_t pf;
  logic [PF_OUT_W-1:0] free_row;
  mem_req_t pfq_req;
  int checks = 0, failures = 0;

  pf_merger dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int rep = 0; rep < 8; rep++)
      for (int v = 0; v < 16; v++) begin
        bit m;
        slot_valid = v[0]; pf_valid = v[1]; free_avail = v[2]; pfq_ready = v[3];
        pf.cpu = cpu_t'($urandom); pf.addr = laddr_t'($urandom); free_row = PF_OUT_W'($urandom);
        #1;
        m = (v == 15);
        check(pfq_valid == m && alloc == m && pf_pop == m && ev_merge == m, $sformatf("merge v=%0d", v));
        check(slot_pop == v[0], "slot always consumed");
        check(ev_abandon == (v[0] && !m), "abandon");
        if (m) check(pfq_req.pf && pfq_req.cpu == pf.cpu && pfq_req.addr == pf.addr &&
                     pfq_req.row == free_row, "request contents");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
