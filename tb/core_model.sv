// core_model: behavioural stand-in for a processor tile, for testbenches.
//
// gen=0: a software traffic generator. It reads n_lines consecutive lines
// starting at line base. After each read is taken and after each response
// it computes for delay cycles before issuing again, and it keeps at most max_out reads
// outstanding (max_out=1 waits for every response). Every response is
// checked: its line must be one that was issued and not yet answered, and
// its data must equal tb_pkg::exp_line; errors counts violations. done rises
// when all lines are answered and finish_cycle records the cycle.
// gen=1: a hardware traffic generator that requests line 0 in every cycle
// its request is accepted and ignores responses, keeping its path to memory
// fully loaded.
module core_model
  import bt_pkg::*;
  import tb_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   gen,       // 1: hardware traffic generator
  input  int     base,      // first line read
  input  int     n_lines,   // lines read (at most 1024)
  input  int     delay,     // computation cycles between reads
  input  int     max_out,   // reads outstanding at most
  input  logic   start,
  output logic   req_valid,
  input  logic   req_ready,
  output laddr_t req_addr,
  input  logic   rsp_valid,
  input  laddr_t rsp_addr,
  input  line_t  rsp_data,
  output logic   done,
  output int     errors,
  output int     finish_cycle
);
  int  n_iss, n_rcv, wait_cnt, cyc, idx;
  bit  rcv [1024];

  assign req_valid = gen ? start
                         : (start && n_iss < n_lines && wait_cnt == 0 && (n_iss - n_rcv) < max_out);
  assign req_addr  = gen ? '0 : laddr_t'(base + n_iss);
  assign idx       = int'(rsp_addr) - base;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_iss <= 0; n_rcv <= 0; wait_cnt <= 0; done <= 1'b0; errors <= 0;
      cyc <= 0; finish_cycle <= 0;
      for (int i = 0; i < 1024; i++) rcv[i] <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      if (!gen) begin
        if (wait_cnt > 0) wait_cnt <= wait_cnt - 1;
        if (req_valid && req_ready) begin
          n_iss    <= n_iss + 1;
          wait_cnt <= delay;
        end
        if (rsp_valid) begin
          if (idx < 0 || idx >= n_iss || rcv[idx] || rsp_data != exp_line(rsp_addr)) begin
            errors <= errors + 1;
          end else begin
            rcv[idx] <= 1'b1;
            n_rcv    <= n_rcv + 1;
            wait_cnt <= delay;
            if (n_rcv + 1 == n_lines) begin
              done         <= 1'b1;
              finish_cycle <= cyc;
            end
          end
        end
      end
    end
  end
endmodule
