// tb_pf_calculator: stream detection and prefetch proposals.
// Checks: a first miss proposes nothing; a miss to the next line proposes the
// line after; a hit on a prefetched line continues the stream; a hit with no
// stream proposes its next line; a repeated line proposes nothing; streams
// of different cores are separate; round-robin replacement evicts the oldest
// of eight streams; nothing is proposed while disabled.
module tb_pf_calculator;
  import bt_pkg::*;
  logic clk = 0, rst_n = 0, enable, ev_valid, ev_hit, cand_valid;
  cpu_t ev_cpu;
  laddr_t ev_addr;
  pf_cand_t cand;
  int checks = 0, failures = 0;

  pf_calculator #(.NSTREAM(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // present one event; expect a proposal (exp) of line pa for core c
  task automatic ev(bit hit, int c, int a, bit exp, int pa = 0);
    @(negedge clk);
    ev_valid = 1; ev_hit = hit; ev_cpu = cpu_t'(c); ev_addr = laddr_t'(a);
    @(negedge clk);
    ev_valid = 0;
    check(cand_valid == exp, $sformatf("event hit=%0d core %0d line %0d: proposal %0d", hit, c, a, cand_valid));
    if (exp) check(cand.cpu == cpu_t'(c) && cand.addr == laddr_t'(pa),
                   $sformatf("proposal core %0d line %0d", cand.cpu, cand.addr));
  endtask

  initial begin
    enable = 1; ev_valid = 0; ev_hit = 0; ev_cpu = '0; ev_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ev(0, 3, 100, 0);
    ev(0, 3, 101, 1, 102);
    ev(1, 3, 102, 1, 103);      // hit continues stream
    ev(0, 3, 103, 1, 104);      // demand miss also continues
    ev(0, 3, 103, 0);           // repeat
    ev(0, 4, 104, 0);           // other core: no stream yet
    ev(1, 5, 200, 1, 201);      // hit without stream
    ev(1, 5, 201, 1, 202);
    // eight new streams on core 7 evict stream starting at 1000
    ev(0, 7, 1000, 0);
    for (int i = 1; i <= 8; i++) ev(0, 7, 1000 + 10 * i, 0);
    ev(0, 7, 1001, 0);          // evicted
    ev(0, 7, 1081, 1, 1082);    // newest still present
    // disabled
    enable = 0;
    ev(0, 9, 50, 0);
    ev(0, 9, 51, 0);
    ev(1, 9, 52, 0);
    enable = 1;
    ev(0, 9, 52, 0);            // nothing was trained while disabled
    ev(0, 9, 53, 1, 54);
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
