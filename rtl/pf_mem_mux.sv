// pf_mem_mux: multiplexes the demand memory queue and the prefetch queue
// onto the single memory request port.
//
// Round robin: when both queues wait, they take turns, starting with the
// demand queue after reset; when only one waits it goes. A prefetch
// therefore waits behind at most one demand read. This matters because a
// demand read absorbed by the incoming squash filter is answered by its
// prefetch: with demand-first priority a steady demand stream could hold
// that prefetch, and so the absorbed read, back forever. The order is this
// design's choice; the document only says that the two queues are
// multiplexed onto memory. Decision combinational, turn flag registered.
module pf_mem_mux
  import bt_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     dq_valid,
  input  mem_req_t dq_req,
  output logic     dq_pop,
  input  logic     pq_valid,
  input  mem_req_t pq_req,
  output logic     pq_pop,
  output logic     mem_valid,
  input  logic     mem_ready,
  output mem_req_t mem_req
);
  logic pf_turn;   // prefetch queue wins a tie
  logic sel_pf;

  assign sel_pf    = pq_valid && (!dq_valid || pf_turn);
  assign mem_valid = dq_valid || pq_valid;
  assign mem_req   = sel_pf ? pq_req : dq_req;
  assign dq_pop    = mem_ready && dq_valid && !sel_pf;
  assign pq_pop    = mem_ready && sel_pf;

  always_ff @(posedge clk) begin
    if (!rst_n)                        pf_turn <= 1'b0;
    else if (dq_pop && pq_valid)       pf_turn <= 1'b1;
    else if (pq_pop && dq_valid)       pf_turn <= 1'b0;
  end
endmodule
