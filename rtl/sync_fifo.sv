// sync_fifo: synchronous first-in first-out queue, used for every queue of the
// prefetcher (demand queue, hit/slot queue, demand memory queue, prefetch
// buffer, prefetch queue and output queue).
//
// A circular buffer of DEPTH entries of type T with a read and a write
// pointer and an occupancy count. in_valid/in_ready and out_valid/out_ready
// are valid/ready handshakes; a transfer happens on a clock edge where both
// are high. The head is shown combinationally on out_data. A write is
// accepted while the queue is full if the head leaves in the same cycle,
// so a full queue still moves one entry per cycle (simultaneous read and
// write, as the multiplexer input buffers do). Latency from write to the
// head is one cycle. Queue depths are this design's choice.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                 mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic             do_wr, do_rd;

  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign do_rd     = out_valid && out_ready;
  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]) || do_rd;
  assign do_wr     = in_valid && in_ready;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_data;
  end

  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= DEPTH[$clog2(DEPTH+1)-1:0]);
endmodule
