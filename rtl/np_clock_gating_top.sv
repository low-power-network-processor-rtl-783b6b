// np_clock_gating_top: traffic-driven clock gating of the processing elements
// (PEs) of a multi-threaded network processor.
//
// Under light traffic most PE threads sit idle yet their clock networks keep
// switching. This block watches how many threads are idle over a long window
// and gates off the clock of whole PEs while the rest can carry the load,
// waking one again the moment the receive buffer fills. It contains
//   - interface_controller: receive buffer with one spare entry, thread queue
//     and the round-robin port scheduler that maps any ready port to the
//     oldest waiting thread;
//   - idle_window_monitor: 20-bit idle-cycle counter, window counter and the
//     adaptive threshold register;
//   - pe_gating_fsm: the PE on/off state machine, which drains a PE's threads
//     before its clock stops and re-queues them after it restarts;
//   - one clock_gate cell per PE.
// The PEs themselves (the micro-engines, which run the packet programs) are
// outside: each PE p is clocked by pe_gclk_o[p], issues receive requests for
// its threads on rcv_req_i/rcv_tid_i and takes mpackets from the grant bus.
//
// Timing: everything here runs on clk. A PE's gated clock stops at most a few
// cycles after its last thread is parked and restarts at the clock edge after a
// wake-up decision. Defaults are those of an IXP1200-class processor: six PEs
// of four threads, sixteen ports, 64-byte mpackets, a 16+1 entry buffer, a
// one-million-cycle window with initial threshold 500K and step 20K.
module np_clock_gating_top
  import np_pkg::pe_state_e;
#(
  parameter int unsigned NUM_PORTS      = np_pkg::NUM_PORTS,
  parameter int unsigned NUM_PE         = np_pkg::NUM_PE,
  parameter int unsigned THREADS_PER_PE = np_pkg::THREADS_PER_PE,
  parameter int unsigned RFIFO_DEPTH    = np_pkg::RFIFO_DEPTH,
  parameter int unsigned EXTRA          = np_pkg::EXTRA_ENTRIES,
  parameter int unsigned DATA_W         = np_pkg::MPKT_W,
  parameter int unsigned CNT_W          = np_pkg::CNT_W,
  parameter int unsigned WINDOW_P       = np_pkg::WINDOW_P,
  parameter int unsigned TH_INIT        = np_pkg::TH_INIT,
  parameter int unsigned ALPHA          = np_pkg::ALPHA,
  parameter int unsigned WAKE_CYCLES    = np_pkg::WAKE_CYCLES,
  parameter int unsigned WAKE_HOLDOFF   = np_pkg::WAKE_HOLDOFF,
  parameter int unsigned MIN_ACTIVE     = np_pkg::MIN_ACTIVE_PE,
  parameter int unsigned NUM_THREADS    = NUM_PE * THREADS_PER_PE,
  parameter int unsigned PORT_W         = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1,
  parameter int unsigned TID_W          = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  parameter int unsigned LT_W           = (THREADS_PER_PE > 1) ? $clog2(THREADS_PER_PE) : 1,
  parameter int unsigned QC_W           = $clog2(NUM_THREADS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // packets from the network interfaces
  input  logic                 in_valid_i,
  input  logic [PORT_W-1:0]    in_port_i,
  input  logic [DATA_W-1:0]    in_data_i,
  output logic                 in_drop_o,
  // PE side
  output logic [NUM_PE-1:0]    pe_gclk_o,
  input  logic [NUM_PE-1:0]    rcv_req_i,
  input  logic [LT_W-1:0]      rcv_tid_i [NUM_PE],
  output logic [NUM_PE-1:0]    rcv_ack_o,
  output logic                 grant_o,
  output logic [TID_W-1:0]     grant_tid_o,
  output logic [PORT_W-1:0]    grant_port_o,
  output logic [DATA_W-1:0]    grant_data_o,
  // status and events
  output pe_state_e            pe_state_o [NUM_PE],
  output logic [$clog2(NUM_PE+1)-1:0] active_pes_o,
  output logic [QC_W-1:0]      idle_threads_o,
  output logic                 buf_full_o,
  output logic                 extra_used_o,
  output logic [CNT_W-1:0]     threshold_o,
  output logic [CNT_W-1:0]     last_idle_o,
  output logic                 window_end_o,
  output logic                 shutdown_req_o,
  output logic                 th_up_o,
  output logic                 th_down_o,
  output logic                 wake_event_o,
  output logic                 drain_start_o,
  output logic                 gated_off_o,
  output logic                 drain_cancel_o,
  output logic                 park_o
);

  logic [NUM_PE-1:0] pe_accept, pe_clk_en;
  logic              reenq_valid, reenq_ack;
  logic [TID_W-1:0]  reenq_tid, park_tid;

  interface_controller #(
    .NUM_PORTS(NUM_PORTS), .NUM_PE(NUM_PE), .THREADS_PER_PE(THREADS_PER_PE),
    .RFIFO_DEPTH(RFIFO_DEPTH), .EXTRA(EXTRA), .DATA_W(DATA_W),
    .NUM_THREADS(NUM_THREADS), .PORT_W(PORT_W), .TID_W(TID_W), .LT_W(LT_W), .QC_W(QC_W)
  ) u_ifc (
    .clk, .rst_n,
    .in_valid_i, .in_port_i, .in_data_i, .in_drop_o,
    .rcv_req_i, .rcv_tid_i, .rcv_ack_o,
    .reenq_valid_i(reenq_valid), .reenq_tid_i(reenq_tid), .reenq_ack_o(reenq_ack),
    .pe_accept_i(pe_accept), .park_o, .park_tid_o(park_tid),
    .grant_o, .grant_tid_o, .grant_port_o, .grant_data_o,
    .idle_threads_o, .buf_count_o(), .buf_full_o, .extra_used_o, .port_rdy_o()
  );

  idle_window_monitor #(
    .CNT_W(CNT_W), .WINDOW_P(WINDOW_P), .TH_INIT(TH_INIT), .ALPHA(ALPHA),
    .THREADS_PER_PE(THREADS_PER_PE), .IDLE_W(QC_W)
  ) u_mon (
    .clk, .rst_n,
    .idle_threads_i(idle_threads_o), .wake_event_i(wake_event_o),
    .window_end_o, .shutdown_req_o, .th_up_o, .th_down_o, .threshold_o, .last_idle_o
  );

  pe_gating_fsm #(
    .NUM_PE(NUM_PE), .THREADS_PER_PE(THREADS_PER_PE), .NUM_THREADS(NUM_THREADS),
    .TID_W(TID_W), .WAKE_CYCLES(WAKE_CYCLES), .WAKE_HOLDOFF(WAKE_HOLDOFF), .MIN_ACTIVE(MIN_ACTIVE)
  ) u_fsm (
    .clk, .rst_n,
    .shutdown_req_i(shutdown_req_o), .buf_full_i(buf_full_o),
    .park_i(park_o), .park_tid_i(park_tid),
    .reenq_valid_o(reenq_valid), .reenq_tid_o(reenq_tid), .reenq_ack_i(reenq_ack),
    .pe_clk_en_o(pe_clk_en), .pe_accept_o(pe_accept), .pe_state_o, .active_pes_o,
    .wake_event_o, .drain_start_o, .gated_off_o, .drain_cancel_o
  );

  for (genvar p = 0; p < NUM_PE; p++) begin : g_cg
    clock_gate u_cg (.clk_i(clk), .en_i(pe_clk_en[p]), .gclk_o(pe_gclk_o[p]));
  end

endmodule
