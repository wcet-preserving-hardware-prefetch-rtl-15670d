// tb_bt_mux: one Bluetree multiplexer (M=4, steering on core bit 0).
// Checks: order and count of packets under full load (M-1 HP packets per LP
// packet, nothing lost or duplicated), slot creation when only HP traffic
// waits, work-conserving forwarding with slots off, downward steering by
// core bit with one cycle of latency, and the squash detector turning a
// prefetch into a read response and the waiting read into a hit.
module tb_bt_mux;
  import bt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic slot_en;
  logic hp_in_valid, hp_in_ready, lp_in_valid, lp_in_ready;
  bt_pkt_t hp_in_pkt, lp_in_pkt;
  logic up_valid, up_ready;
  bt_pkt_t up_pkt;
  logic down_in_valid;
  bt_pkt_t down_in_pkt;
  logic hp_down_valid, lp_down_valid;
  bt_pkt_t hp_down_pkt, lp_down_pkt;
  logic ev_slot, ev_squash;
  int checks = 0, failures = 0;

  bt_mux #(.M(4), .SEL_BIT(0)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // sources: HP side sends core 0 lines 0,1,2..., LP side core 1 lines 0,1,2...
  int hp_sent, lp_sent, hp_got, lp_got, slots, hp_run, max_hp_run;
  bit hp_on, lp_on;
  always_ff @(posedge clk) begin
    if (hp_in_valid && hp_in_ready) hp_sent <= hp_sent + 1;
    if (lp_in_valid && lp_in_ready) lp_sent <= lp_sent + 1;
  end
  always_comb begin
    hp_in_valid = hp_on;
    lp_in_valid = lp_on;
    hp_in_pkt   = mk_pkt(PK_READ, cpu_t'(0), laddr_t'(hp_sent), '0);
    lp_in_pkt   = mk_pkt(PK_READ, cpu_t'(1), laddr_t'(lp_sent), '0);
  end
  // sink
  always @(posedge clk) if (rst_n && up_valid && up_ready) begin
    if (up_pkt.ptype == PK_SLOT) slots++;
    else if (up_pkt.ptype == PK_HIT) ;
    else if (up_pkt.cpu == 0) begin
      checks++; if (up_pkt.addr != laddr_t'(hp_got)) begin failures++; $display("FAIL HP order"); end
      hp_got++; hp_run++; if (hp_run > max_hp_run) max_hp_run = hp_run;
    end else begin
      checks++; if (up_pkt.addr != laddr_t'(lp_got)) begin failures++; $display("FAIL LP order"); end
      lp_got++; hp_run = 0;
    end
  end

  initial begin
    hp_sent = 0; lp_sent = 0; hp_got = 0; lp_got = 0; slots = 0; hp_run = 0; max_hp_run = 0;
    hp_on = 0; lp_on = 0; slot_en = 1; up_ready = 1; down_in_valid = 0; down_in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // full load for 400 cycles
    hp_on = 1; lp_on = 1;
    repeat (400) @(posedge clk);
    hp_on = 0; lp_on = 0;
    repeat (5) @(posedge clk);
    check(hp_got == hp_sent && lp_got == lp_sent, "full load: every packet delivered once");
    check(max_hp_run == 3, $sformatf("full load: at most M-1 HP in a row (%0d)", max_hp_run));
    check(hp_got >= 3 * lp_got - 3 && hp_got <= 3 * lp_got + 3,
          $sformatf("full load share HP %0d LP %0d", hp_got, lp_got));
    check(slots == 0, "no slots under full load");
    // HP only, slots on: one slot per 4 outputs
    slots = 0; hp_got = 0; hp_sent = 0; hp_run = 0;
    @(negedge clk); hp_on = 1;
    repeat (400) @(posedge clk);
    @(negedge clk); hp_on = 0;
    repeat (5) @(posedge clk);
    check(slots >= 99 && slots <= 101, $sformatf("HP only, slots on: %0d slots", slots));
    check(hp_got == hp_sent && hp_got >= 297, $sformatf("HP only: %0d packets", hp_got));
    // HP only, slots off: HP every cycle, no slots
    slots = 0; hp_got = 0; hp_sent = 0;
    @(negedge clk); slot_en = 0; hp_on = 1;
    repeat (400) @(posedge clk);
    @(negedge clk); hp_on = 0;
    repeat (5) @(posedge clk);
    check(slots == 0 && hp_got >= 398, $sformatf("slots off: %0d packets %0d slots", hp_got, slots));
    // downward steering
    @(negedge clk);
    down_in_valid = 1; down_in_pkt = mk_pkt(PK_RESP, cpu_t'(5), laddr_t'(77), line_t'(123));
    @(negedge clk);
    down_in_valid = 0;
    check(lp_down_valid && !hp_down_valid && lp_down_pkt.addr == 77 && lp_down_pkt.ptype == PK_RESP,
          "odd core goes down the LP side after one cycle");
    down_in_valid = 1; down_in_pkt = mk_pkt(PK_PFDATA, cpu_t'(4), laddr_t'(78), line_t'(9));
    @(negedge clk);
    down_in_valid = 0;
    check(hp_down_valid && !lp_down_valid && hp_down_pkt.ptype == PK_PFDATA, "even core goes down HP");
    // squash: park a read from core 0, line 500, in the HP register
    up_ready = 0; slot_en = 1;
    hp_sent = 500; hp_on = 1;
    @(negedge clk); hp_on = 0;
    @(negedge clk);
    down_in_valid = 1; down_in_pkt = mk_pkt(PK_PFDATA, cpu_t'(0), laddr_t'(500), line_t'(42));
    @(negedge clk);
    down_in_valid = 0;
    check(ev_squash && hp_down_valid && hp_down_pkt.ptype == PK_RESP && hp_down_pkt.data == 42,
          "squash: prefetch goes down as read response");
    check(up_valid && up_pkt.ptype == PK_HIT && up_pkt.addr == 500, "squash: read becomes a hit");
    @(negedge clk);
    check(up_valid && up_pkt.ptype == PK_HIT && !ev_squash, "squash: hit kept in the register");
    // no squash for another core's prefetch
    down_in_valid = 1; down_in_pkt = mk_pkt(PK_PFDATA, cpu_t'(2), laddr_t'(500), line_t'(1));
    @(negedge clk);
    down_in_valid = 0;
    check(!ev_squash && hp_down_pkt.ptype == PK_PFDATA, "no squash for another core");
    up_ready = 1;
    @(negedge clk);
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
