// port_scheduler: dynamic thread-to-port mapping.
//
// Instead of binding each port to fixed threads, the scheduler hands the next
// ready port to whichever thread has waited longest, so packets keep flowing
// when some PEs are clock-gated. It scans the port_rdy_status bits one bit per
// cycle, round-robin from the port after the last one served. When the bit
// under the pointer is set and a thread waits in the thread queue, it pops the
// head thread (one cycle), asks the receive buffer for that port's oldest
// mpacket, and one cycle later presents the grant (thread, port, data). The
// pointer then moves past the served port. With no thread waiting the scan
// holds still. A thread whose PE is being shut down (pe_accept_i low) is not
// granted: it is reported on park_o and the same port is tried again.
//
// Timing per granted packet, as the paper charges it: one cycle per status
// bit tested (m bits, m cycles), one cycle for the dequeue, and the grant in
// the cycle after the dequeue. The thread enqueue, also one cycle, happens in
// the thread queue. The paper gives the scan, its cost and the round-robin
// order; the state machine and the parking path are this design's choices.
module port_scheduler #(
  parameter int unsigned NUM_PORTS      = np_pkg::NUM_PORTS,
  parameter int unsigned NUM_PE         = np_pkg::NUM_PE,
  parameter int unsigned THREADS_PER_PE = np_pkg::THREADS_PER_PE,
  parameter int unsigned NUM_THREADS    = NUM_PE * THREADS_PER_PE,
  parameter int unsigned PORT_W         = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  parameter int unsigned TID_W          = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // port_rdy_status register
  input  logic [NUM_PORTS-1:0] port_rdy_i,
  // thread queue
  input  logic                 q_empty_i,
  input  logic [TID_W-1:0]     q_head_i,
  output logic                 q_pop_o,
  // PE power state: threads of PEs not accepting work are parked
  input  logic [NUM_PE-1:0]    pe_accept_i,
  output logic                 park_o,
  output logic [TID_W-1:0]     park_tid_o,
  // receive buffer read
  output logic                 rd_req_o,
  output logic [PORT_W-1:0]    rd_port_o,
  input  logic                 rd_valid_i,
  input  logic                 rd_miss_i,
  // grant of a port to a thread (data comes with rd_valid_i)
  output logic                 grant_o,
  output logic [TID_W-1:0]     grant_tid_o,
  output logic [PORT_W-1:0]    grant_port_o,
  // status
  output logic [PORT_W-1:0]    scan_ptr_o
);

  typedef enum logic [1:0] {S_SCAN, S_DEQ, S_READ} state_e;

  state_e            state;
  logic [PORT_W-1:0] ptr;
  logic [TID_W-1:0]  tid_q;

  function automatic logic [PORT_W-1:0] next_port(logic [PORT_W-1:0] p);
    return (p == PORT_W'(NUM_PORTS - 1)) ? '0 : p + 1'b1;
  endfunction

  // PE that owns the thread at the head of the queue.
  localparam int unsigned PE_W = (NUM_PE > 1) ? $clog2(NUM_PE) : 1;
  logic [PE_W-1:0] head_pe;
  logic            head_accepted;
  assign head_pe       = PE_W'(q_head_i / TID_W'(THREADS_PER_PE));
  assign head_accepted = pe_accept_i[head_pe];

  always_comb begin
    q_pop_o    = 1'b0;
    park_o     = 1'b0;
    park_tid_o = q_head_i;
    rd_req_o   = 1'b0;
    rd_port_o  = ptr;
    if (state == S_DEQ && !q_empty_i) begin
      q_pop_o  = 1'b1;
      park_o   = !head_accepted;
      rd_req_o = head_accepted;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_SCAN;
      ptr   <= '0;
      tid_q <= '0;
    end else begin
      unique case (state)
        S_SCAN: begin
          // One status bit tested per cycle.
          if (!q_empty_i) begin
            if (port_rdy_i[ptr]) state <= S_DEQ;
            else                 ptr   <= next_port(ptr);
          end
        end
        S_DEQ: begin
          if (q_empty_i) begin
            state <= S_SCAN;
          end else if (head_accepted) begin
            tid_q <= q_head_i;
            state <= S_READ;
          end else begin
            state <= S_SCAN;     // parked a thread, test the same port again
          end
        end
        S_READ: begin
          if (rd_valid_i || rd_miss_i) begin
            ptr   <= next_port(ptr);
            state <= S_SCAN;
          end
        end
        default: state <= S_SCAN;
      endcase
    end
  end

  // A miss would leave a dequeued thread without a packet: the buffer only
  // loses entries through this scheduler, so it must not happen.
  a_no_miss: assert property (@(posedge clk) disable iff (!rst_n) !rd_miss_i);

  assign grant_o      = (state == S_READ) && rd_valid_i;
  assign grant_tid_o  = tid_q;
  assign grant_port_o = ptr;
  assign scan_ptr_o   = ptr;

endmodule
