// mem_model: behavioural model of the DDR3 memory and its controller as seen
// by the prefetcher, for testbenches only.
//
// Closed-page behaviour: every access takes the same T_MEM cycles and the
// memory serves one access at a time. A request is accepted when the model
// is idle; T_MEM cycles later its response (line contents from
// tb_pkg::exp_line, with the request's pf flag, row, core and line) is
// offered until accepted. Counters report demand and prefetch accesses.
module mem_model
  import bt_pkg::*;
  import tb_pkg::*;
#(
  parameter int unsigned T_MEM = 10
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  input  logic     rsp_ready,
  output mem_rsp_t rsp,
  output int       n_demand,
  output int       n_prefetch
);
  logic     busy;
  int       cnt;
  mem_req_t cur;

  assign req_ready = !busy;
  assign rsp_valid = busy && cnt == 0;
  always_comb begin
    rsp.pf   = cur.pf;
    rsp.row  = cur.row;
    rsp.cpu  = cur.cpu;
    rsp.addr = cur.addr;
    rsp.data = exp_line(cur.addr);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= 0;
      n_demand   <= 0;
      n_prefetch <= 0;
    end else begin
      if (!busy && req_valid) begin
        busy <= 1'b1;
        cur  <= req;
        cnt  <= int'(T_MEM) - 1;
        if (req.pf) n_prefetch <= n_prefetch + 1;
        else        n_demand   <= n_demand + 1;
      end else if (busy && cnt > 0) begin
        cnt <= cnt - 1;
      end else if (rsp_valid && rsp_ready) begin
        busy <= 1'b0;
      end
    end
  end
endmodule
