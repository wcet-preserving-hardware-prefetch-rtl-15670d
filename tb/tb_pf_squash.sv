// tb_pf_squash: outstanding-prefetches table and both squash filters.
// Checks: allocation of the lowest free row and running out of rows; a
// matching demand read is absorbed once (same core and line only); a
// returning prefetch reports squashed exactly for squashed rows and frees
// its row; a read squashed in the same cycle as its prefetch returns still
// counts.
module tb_pf_squash;
  import bt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic alloc, free_avail, in_valid, in_squash, out_valid, out_squashed;
  cpu_t alloc_cpu, in_cpu;
  laddr_t alloc_addr, in_addr;
  logic [PF_OUT_W-1:0] free_row, out_row;
  int checks = 0, failures = 0;

  pf_squash dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic idle();
    alloc = 0; in_valid = 0; out_valid = 0;
  endtask

  initial begin
    idle(); alloc_cpu = '0; alloc_addr = '0; in_cpu = '0; in_addr = '0; out_row = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // fill all rows: row r holds core r, line 100+r
    for (int r = 0; r < PF_OUT; r++) begin
      check(free_avail && free_row == PF_OUT_W'(r), $sformatf("free row %0d", r));
      alloc = 1; alloc_cpu = cpu_t'(r); alloc_addr = laddr_t'(100 + r);
      @(negedge clk); idle();
    end
    check(!free_avail, "table full");
    // read from core 2 line 102 -> squash row 2
    in_valid = 1; in_cpu = 2; in_addr = 102; #1;
    check(in_squash, "matching read squashed");
    @(negedge clk);
    in_cpu = 2; in_addr = 102; #1;
    check(!in_squash, "second identical read not squashed");
    in_cpu = 3; in_addr = 102; #1;
    check(!in_squash, "other core not squashed");
    in_cpu = 3; in_addr = 104; #1;
    check(!in_squash, "other line not squashed");
    idle();
    // return row 2 (squashed) and row 3 (not)
    out_valid = 1; out_row = 2; #1;
    check(out_squashed, "row 2 returns squashed");
    @(negedge clk);
    out_row = 3; #1;
    check(!out_squashed, "row 3 returns as prefetch");
    @(negedge clk); idle();
    check(free_avail && free_row == 2, "row 2 freed and lowest free");
    // same-cycle squash and return of row 5
    in_valid = 1; in_cpu = 5; in_addr = 105; out_valid = 1; out_row = 5; #1;
    check(in_squash && out_squashed, "same-cycle squash and return");
    @(negedge clk); idle();
    // reuse row 2 for a new prefetch, then a read for the old contents misses
    alloc = 1; alloc_cpu = 9; alloc_addr = 900;
    @(negedge clk); idle();
    in_valid = 1; in_cpu = 2; in_addr = 102; #1;
    check(!in_squash, "old contents gone");
    in_cpu = 9; in_addr = 900; #1;
    check(in_squash, "new contents match");
    @(negedge clk); idle();
    out_valid = 1; out_row = 2; #1;
    check(out_squashed, "reused row returns squashed");
    @(negedge clk); idle();
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
