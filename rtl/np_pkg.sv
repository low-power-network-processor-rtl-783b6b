// np_pkg: shared constants and types of the clock-gated network processor.
//
// The numbers follow the IXP1200-class processor the design targets: six
// multi-threaded processing elements (PEs, the micro-engines), a 24-entry
// thread queue, sixteen input ports, 64-byte mpackets, a monitoring window of
// one million cycles with a 20-bit counter, an initial threshold of half the
// window and a threshold step of 2 % of the window. Four threads per PE follows
// from 24 queue entries over six PEs. The receive buffer depth of 16 entries,
// the wake-up settle time and the minimum number of active PEs are this
// design's own choices.
package np_pkg;

  localparam int unsigned NUM_PE         = 6;
  localparam int unsigned THREADS_PER_PE = 4;
  localparam int unsigned NUM_THREADS    = NUM_PE * THREADS_PER_PE;  // 24
  localparam int unsigned NUM_PORTS      = 16;
  localparam int unsigned MPKT_BYTES     = 64;
  localparam int unsigned MPKT_W         = MPKT_BYTES * 8;           // 512
  localparam int unsigned RFIFO_DEPTH    = 16;
  localparam int unsigned EXTRA_ENTRIES  = 1;

  localparam int unsigned CNT_W          = 20;
  localparam int unsigned WINDOW_P       = 1_000_000;
  localparam int unsigned TH_INIT        = 500_000;
  localparam int unsigned ALPHA          = 20_000;                   // 2 % of P

  localparam int unsigned WAKE_CYCLES    = 4;   // clock restart settle time
  localparam int unsigned WAKE_HOLDOFF   = 50;  // thread ready delay after a wake-up
  localparam int unsigned MIN_ACTIVE_PE  = 1;

  // Power state of one PE.
  typedef enum logic [1:0] {
    PE_ON    = 2'd0,   // clock running, threads served
    PE_DRAIN = 2'd1,   // clock running, threads parked as they return to the queue
    PE_OFF   = 2'd2,   // clock gated off
    PE_WAKE  = 2'd3    // clock re-enabled, settling before its threads are re-queued
  } pe_state_e;

endpackage
