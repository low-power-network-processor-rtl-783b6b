// thread_queue: first-in first-out queue of idle threads.
//
// A thread that has finished with its packet asks for a new one; its global
// number is pushed here and waits until the port scheduler pops it and hands it
// a ready port. The number of entries is therefore the number of idle threads,
// which the clock-gating monitor watches. Depth 24 holds every thread of six
// four-thread PEs, so a push can never find the queue full in normal use.
//
// Interface: push_i/push_id_i enqueue, pop_i dequeues the head shown on
// head_o. Both take one cycle and may happen in the same cycle. count_o,
// empty_o and full_o are registered state. A pop of an empty queue or a push
// into a full one (without a simultaneous pop) is a protocol error and is
// asserted against.
module thread_queue #(
  parameter int unsigned DEPTH = np_pkg::NUM_THREADS,
  parameter int unsigned ID_W  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push_i,
  input  logic [ID_W-1:0]          push_id_i,
  input  logic                     pop_i,
  output logic [ID_W-1:0]          head_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o,
  output logic                     empty_o,
  output logic                     full_o
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ID_W-1:0]  mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;

  logic do_push, do_pop;
  assign do_pop  = pop_i && !empty_o;
  assign do_push = push_i && (!full_o || do_pop);

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr  <= '0;
      wr_ptr  <= '0;
      count_o <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      if (do_push && !do_pop)      count_o <= count_o + 1'b1;
      else if (do_pop && !do_push) count_o <= count_o - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_id_i;
  end

  assign head_o  = mem[rd_ptr];
  assign empty_o = (count_o == '0);
  assign full_o  = (count_o == ($clog2(DEPTH+1))'(DEPTH));

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop_i |-> !empty_o);
  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) (push_i && !pop_i) |-> !full_o);

endmodule
