// tb_sync_fifo: random pushes and pops against a queue model, checking
// order, occupancy, full/empty flags and a write accepted into a full queue
// while its head leaves in the same cycle.
module tb_sync_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [7:0] model[$];
  int full_pass = 0;

  sync_fifo #(.T(logic [7:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      out_ready = (cyc < 200) ? (($urandom % 4) == 0) : (($urandom % 2) == 0);
      in_data   = 8'($urandom);
      #1;
      check(out_valid == (model.size() != 0), "out_valid vs model");
      check(count == 3'(model.size()), "count vs model");
      check(in_ready == (model.size() < DEPTH || out_ready), "in_ready");
      if (out_valid) check(out_data == model[0], "head data");
      if (model.size() == DEPTH && in_valid && out_ready) full_pass++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(full_pass > 0, "write into full queue while popping was exercised");
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
