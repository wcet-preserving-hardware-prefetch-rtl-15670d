// tb_bt_arbiter: checks the turn sequence of the blocking-factor arbiter
// (M=4) against an independent turn model under random load, the full-load
// pattern (one LP packet per M outputs, at most M-1 HP packets ahead of an
// LP packet), slot creation in place of out-of-turn packets with slot_en
// high, and work-conserving grants with slot_en low.
module tb_bt_arbiter;
  localparam int M = 4;
  logic clk = 0, rst_n = 0;
  logic slot_en, hp_valid, lp_valid, out_ready;
  logic out_valid, grant_hp, grant_lp, grant_slot;
  int checks = 0, failures = 0;
  int turn = 0;           // model turn counter
  int hp_run = 0, max_hp_run = 0, n_slot = 0, n_wc = 0;

  bt_arbiter #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic step(bit se, bit hv, bit lv, bit rdy);
    bit exp_hp, exp_lp, exp_slot, lpt;
    @(negedge clk);
    slot_en = se; hp_valid = hv; lp_valid = lv; out_ready = rdy;
    #1;
    lpt = (turn == 0);
    exp_hp = 0; exp_lp = 0; exp_slot = 0;
    if (lpt && lv) exp_lp = 1;
    else if (!lpt && hv) exp_hp = 1;
    else if (hv || lv) begin
      if (se) exp_slot = 1;
      else if (lpt) exp_hp = 1;
      else exp_lp = 1;
    end
    check(grant_hp == exp_hp && grant_lp == exp_lp && grant_slot == exp_slot,
          $sformatf("grants turn=%0d hv=%0d lv=%0d se=%0d", turn, hv, lv, se));
    check(out_valid == (exp_hp | exp_lp | exp_slot), "out_valid");
    @(posedge clk);
    if (out_valid && out_ready) begin
      turn = (turn + 1) % M;
      if (grant_slot) n_slot++;
      if ((grant_hp && lpt) || (grant_lp && !lpt)) n_wc++;
      if (grant_hp) begin hp_run++; if (hp_run > max_hp_run) max_hp_run = hp_run; end
      if (grant_lp) hp_run = 0;
    end
  endtask

  initial begin
    slot_en = 0; hp_valid = 0; lp_valid = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // full load: both sides always waiting
    hp_run = 0; max_hp_run = 0;
    for (int i = 0; i < 40; i++) step(1, 1, 1, 1);
    check(max_hp_run == M - 1, $sformatf("full load: HP run %0d", max_hp_run));
    check(n_slot == 0, "full load makes no slots");
    // random traffic, both modes, with stalls from above
    for (int i = 0; i < 3000; i++)
      step(i >= 1500, ($urandom % 2) == 1, ($urandom % 3) == 0, ($urandom % 4) != 0);
    check(n_slot > 0, "slots were created");
    check(n_wc > 0, "work-conserving grants happened");
    // only HP traffic, slot_en high: exactly one slot per M outputs
    n_slot = 0;
    while (turn != 1) step(0, 1, 0, 1);
    for (int i = 0; i < 4 * M; i++) step(1, 1, 0, 1);
    check(n_slot == 4, $sformatf("HP only: %0d slots in %0d outputs", n_slot, 4 * M));
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
