// interface_controller: receive side of the network processor with dynamic
// thread-to-port mapping.
//
// Packets from the network ports land in the receive buffer (rx_buffer), which
// sets a port's bit in port_rdy_status while it holds an mpacket of that port.
// A PE thread that wants work issues a receive request; the request is placed
// in the thread queue (thread_queue), one enqueue per cycle. The scheduler
// (port_scheduler) scans port_rdy_status round-robin and gives the first ready
// port to the thread at the head of the queue, delivering the mpacket with the
// grant. Any thread can serve any port, so the set of running PEs can shrink
// and grow without leaving ports unserved.
//
// Receive requests: rcv_req_i[p] with rcv_tid_i[p] (thread number inside PE p)
// is held until rcv_ack_o[p]. Requests from the PEs are taken round-robin;
// threads handed back by the PE on/off controller (reenq_*) go first. The
// grant (grant_o, thread, port, data) is a one-cycle pulse. idle_threads_o is
// the thread queue occupancy and buf_full_o the full flag of the regular
// buffer entries. The arrangement follows the paper's interface controller
// figure; the request handshake and the arbitration order are this design's.
module interface_controller #(
  parameter int unsigned NUM_PORTS      = np_pkg::NUM_PORTS,
  parameter int unsigned NUM_PE         = np_pkg::NUM_PE,
  parameter int unsigned THREADS_PER_PE = np_pkg::THREADS_PER_PE,
  parameter int unsigned RFIFO_DEPTH    = np_pkg::RFIFO_DEPTH,
  parameter int unsigned EXTRA          = np_pkg::EXTRA_ENTRIES,
  parameter int unsigned DATA_W         = np_pkg::MPKT_W,
  parameter int unsigned NUM_THREADS    = NUM_PE * THREADS_PER_PE,
  parameter int unsigned PORT_W         = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  parameter int unsigned TID_W          = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  parameter int unsigned LT_W           = (THREADS_PER_PE > 1) ? $clog2(THREADS_PER_PE) : 1,
  parameter int unsigned QC_W           = $clog2(NUM_THREADS + 1),
  parameter int unsigned BC_W           = $clog2(RFIFO_DEPTH + EXTRA + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // packets from the network interfaces
  input  logic                 in_valid_i,
  input  logic [PORT_W-1:0]    in_port_i,
  input  logic [DATA_W-1:0]    in_data_i,
  output logic                 in_drop_o,
  // receive requests of the PE threads
  input  logic [NUM_PE-1:0]    rcv_req_i,
  input  logic [LT_W-1:0]      rcv_tid_i [NUM_PE],
  output logic [NUM_PE-1:0]    rcv_ack_o,
  // parked threads handed back by the on/off controller
  input  logic                 reenq_valid_i,
  input  logic [TID_W-1:0]     reenq_tid_i,
  output logic                 reenq_ack_o,
  // PE power state
  input  logic [NUM_PE-1:0]    pe_accept_i,
  output logic                 park_o,
  output logic [TID_W-1:0]     park_tid_o,
  // grant of an mpacket to a thread
  output logic                 grant_o,
  output logic [TID_W-1:0]     grant_tid_o,
  output logic [PORT_W-1:0]    grant_port_o,
  output logic [DATA_W-1:0]    grant_data_o,
  // status
  output logic [QC_W-1:0]      idle_threads_o,
  output logic [BC_W-1:0]      buf_count_o,
  output logic                 buf_full_o,
  output logic                 extra_used_o,
  output logic [NUM_PORTS-1:0] port_rdy_o
);

  localparam int unsigned PE_W = (NUM_PE > 1) ? $clog2(NUM_PE) : 1;

  // --- enqueue arbitration -------------------------------------------------
  logic [PE_W-1:0] rr;          // PE with first claim next time
  logic            push;
  logic [TID_W-1:0] push_id;
  logic [PE_W-1:0] win_pe;
  logic            win;

  always_comb begin
    win    = 1'b0;
    win_pe = '0;
    for (int k = NUM_PE - 1; k >= 0; k--) begin
      if (rcv_req_i[(int'(rr) + k) % NUM_PE]) begin
        win    = 1'b1;
        win_pe = PE_W'((int'(rr) + k) % NUM_PE);
      end
    end
  end

  always_comb begin
    rcv_ack_o   = '0;
    reenq_ack_o = 1'b0;
    push        = 1'b0;
    push_id     = '0;
    if (reenq_valid_i) begin
      push        = 1'b1;
      push_id     = reenq_tid_i;
      reenq_ack_o = 1'b1;
    end else if (win) begin
      push            = 1'b1;
      push_id         = TID_W'(win_pe) * TID_W'(THREADS_PER_PE) + TID_W'(rcv_tid_i[win_pe]);
      rcv_ack_o[win_pe] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (!reenq_valid_i && win)
      rr <= (win_pe == PE_W'(NUM_PE - 1)) ? '0 : win_pe + 1'b1;
  end

  // --- thread queue ------------------------------------------------------
  logic             q_pop, q_empty, q_full;
  logic [TID_W-1:0] q_head;

  thread_queue #(.DEPTH(NUM_THREADS), .ID_W(TID_W)) u_tq (
    .clk, .rst_n,
    .push_i(push), .push_id_i(push_id), .pop_i(q_pop),
    .head_o(q_head), .count_o(idle_threads_o), .empty_o(q_empty), .full_o(q_full)
  );

  // --- receive buffer ----------------------------------------------------
  logic              rd_req, rd_valid, rd_miss;
  logic [PORT_W-1:0] rd_port, rd_port_q;

  rx_buffer #(.NUM_PORTS(NUM_PORTS), .DEPTH(RFIFO_DEPTH), .EXTRA(EXTRA),
              .DATA_W(DATA_W), .PORT_W(PORT_W)) u_buf (
    .clk, .rst_n,
    .in_valid_i, .in_port_i, .in_data_i, .in_drop_o,
    .rd_req_i(rd_req), .rd_port_i(rd_port),
    .rd_valid_o(rd_valid), .rd_miss_o(rd_miss), .rd_port_o(rd_port_q), .rd_data_o(grant_data_o),
    .port_rdy_o, .count_o(buf_count_o), .main_full_o(buf_full_o), .extra_used_o
  );

  // --- scheduler ---------------------------------------------------------

  port_scheduler #(.NUM_PORTS(NUM_PORTS), .NUM_PE(NUM_PE), .THREADS_PER_PE(THREADS_PER_PE),
                   .NUM_THREADS(NUM_THREADS), .PORT_W(PORT_W), .TID_W(TID_W)) u_sched (
    .clk, .rst_n,
    .port_rdy_i(port_rdy_o),
    .q_empty_i(q_empty), .q_head_i(q_head), .q_pop_o(q_pop),
    .pe_accept_i, .park_o, .park_tid_o,
    .rd_req_o(rd_req), .rd_port_o(rd_port), .rd_valid_i(rd_valid), .rd_miss_i(rd_miss),
    .grant_o, .grant_tid_o, .grant_port_o, .scan_ptr_o()
  );

  // Every thread has one queue slot, so the queue never overflows.
  a_queue_room: assert property (@(posedge clk) disable iff (!rst_n) push |-> (!q_full || q_pop));
  a_grant_port: assert property (@(posedge clk) disable iff (!rst_n) grant_o |-> rd_port_q == grant_port_o);

endmodule
