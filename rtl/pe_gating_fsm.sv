// pe_gating_fsm: turns PEs off and on.
//
// Each PE is in one of four states (np_pkg::pe_state_e). When the idle-thread
// monitor asks for one PE fewer (shutdown_req_i), the highest-numbered running
// PE enters DRAIN, provided more than MIN_ACTIVE PEs run, no other PE is
// draining and the receive buffer is not under pressure. A draining PE keeps
// its clock so that its threads can finish the packets they hold; each of its
// threads that comes back to the head of the thread queue is parked here
// (park_i) instead of being given a port. Once all its threads are parked the
// PE goes OFF and its clock enable drops.
//
// When the regular part of the receive buffer is full (buf_full_i) a PE is
// woken at once: a draining PE is simply kept (back to ON), otherwise the
// lowest-numbered OFF PE gets its clock back, settles for WAKE_CYCLES and
// turns ON. The parked threads of every running PE are then put back into the
// thread queue, one per cycle, through reenq_valid_o/reenq_ack_i. After a
// wake-up the next one waits WAKE_HOLDOFF cycles, the time a restarted PE
// needs before its threads take packets (the spare buffer entry covers this
// gap); without the hold-off one full buffer would wake every PE.
//
// The paper gives the policy (one PE fewer when idle threads allow, wake on
// a full buffer, no gating under saturation) and the ~50-cycle ready delay;
// the four states, the drain-by-parking mechanism, the PE order and
// WAKE_CYCLES are this design's choices.
module pe_gating_fsm
  import np_pkg::pe_state_e, np_pkg::PE_ON, np_pkg::PE_DRAIN, np_pkg::PE_OFF, np_pkg::PE_WAKE;
#(
  parameter int unsigned NUM_PE         = np_pkg::NUM_PE,
  parameter int unsigned THREADS_PER_PE = np_pkg::THREADS_PER_PE,
  parameter int unsigned NUM_THREADS    = NUM_PE * THREADS_PER_PE,
  parameter int unsigned TID_W          = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  parameter int unsigned WAKE_CYCLES    = np_pkg::WAKE_CYCLES,
  parameter int unsigned WAKE_HOLDOFF   = np_pkg::WAKE_HOLDOFF,
  parameter int unsigned MIN_ACTIVE     = np_pkg::MIN_ACTIVE_PE
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    shutdown_req_i,
  input  logic                    buf_full_i,
  // threads parked by the scheduler
  input  logic                    park_i,
  input  logic [TID_W-1:0]        park_tid_i,
  // parked threads returned to the thread queue
  output logic                    reenq_valid_o,
  output logic [TID_W-1:0]        reenq_tid_o,
  input  logic                    reenq_ack_i,
  // per-PE controls
  output logic [NUM_PE-1:0]       pe_clk_en_o,
  output logic [NUM_PE-1:0]       pe_accept_o,
  output pe_state_e               pe_state_o [NUM_PE],
  output logic [$clog2(NUM_PE+1)-1:0] active_pes_o,   // PEs with their clock running
  // events
  output logic                    wake_event_o,     // a PE woken or a drain cancelled
  output logic                    drain_start_o,
  output logic                    gated_off_o,
  output logic                    drain_cancel_o
);

  localparam int unsigned PE_W  = (NUM_PE > 1) ? $clog2(NUM_PE) : 1;
  localparam int unsigned WC_W  = $clog2(WAKE_CYCLES + 2);
  localparam int unsigned HO_W  = $clog2(WAKE_HOLDOFF + 2);
  localparam int unsigned ACT_W = $clog2(NUM_PE + 1);

  pe_state_e              state [NUM_PE];
  logic [WC_W-1:0]        wake_cnt [NUM_PE];
  logic [NUM_THREADS-1:0] parked;
  logic [HO_W-1:0]        holdoff;

  // --- decisions ---------------------------------------------------------
  logic            any_drain, any_off, can_shut;
  logic [PE_W-1:0] drain_pe, off_pe, shut_pe;
  logic [ACT_W-1:0] n_run;     // ON or WAKE

  always_comb begin
    any_drain = 1'b0; drain_pe = '0;
    any_off   = 1'b0; off_pe   = '0;
    can_shut  = 1'b0; shut_pe  = '0;
    n_run     = '0;
    for (int p = NUM_PE - 1; p >= 0; p--) begin
      if (state[p] == PE_OFF) begin any_off = 1'b1; off_pe = PE_W'(p); end  // lowest
      if (state[p] == PE_DRAIN) begin any_drain = 1'b1; drain_pe = PE_W'(p); end
      if (state[p] == PE_ON || state[p] == PE_WAKE) n_run = n_run + 1'b1;
    end
    for (int p = 0; p < NUM_PE; p++) begin
      if (state[p] == PE_ON) begin can_shut = 1'b1; shut_pe = PE_W'(p); end   // highest
    end
  end

  logic do_wake, do_cancel, do_shut;
  assign do_cancel = buf_full_i && (holdoff == '0) && any_drain;
  assign do_wake   = buf_full_i && (holdoff == '0) && !any_drain && any_off;
  assign do_shut   = shutdown_req_i && !buf_full_i && !any_drain && can_shut &&
                     (n_run > ACT_W'(MIN_ACTIVE));

  // All threads of a PE parked?
  function automatic logic all_parked(logic [NUM_THREADS-1:0] pk, int unsigned pe);
    logic r;
    r = 1'b1;
    for (int t = 0; t < THREADS_PER_PE; t++) r &= pk[pe * THREADS_PER_PE + t];
    return r;
  endfunction

  // Re-enqueue: lowest parked thread of a running PE.
  always_comb begin
    reenq_valid_o = 1'b0;
    reenq_tid_o   = '0;
    for (int t = NUM_THREADS - 1; t >= 0; t--) begin
      if (parked[t] && state[t / THREADS_PER_PE] == PE_ON) begin
        reenq_valid_o = 1'b1;
        reenq_tid_o   = TID_W'(t);
      end
    end
  end

  logic [PE_W-1:0] park_pe;
  assign park_pe = PE_W'(park_tid_i / TID_W'(THREADS_PER_PE));

  // --- state --------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PE; p++) begin
        state[p]    <= PE_ON;
        wake_cnt[p] <= '0;
      end
      parked  <= '0;
      holdoff <= '0;
    end else begin
      if (holdoff != '0) holdoff <= holdoff - 1'b1;
      if (do_wake || do_cancel) holdoff <= HO_W'(WAKE_HOLDOFF);

      // parked threads
      if (park_i) parked[park_tid_i] <= 1'b1;
      if (reenq_valid_o && reenq_ack_i) parked[reenq_tid_o] <= 1'b0;

      for (int p = 0; p < NUM_PE; p++) begin
        unique case (state[p])
          PE_ON: begin
            if (do_shut && shut_pe == PE_W'(p)) state[p] <= PE_DRAIN;
          end
          PE_DRAIN: begin
            if (do_cancel && drain_pe == PE_W'(p))
              state[p] <= PE_ON;
            else if (all_parked(parked | ((park_i && park_pe == PE_W'(p)) ?
                                          (NUM_THREADS'(1) << park_tid_i) : '0), p))
              state[p] <= PE_OFF;
          end
          PE_OFF: begin
            if (do_wake && off_pe == PE_W'(p)) begin
              state[p]    <= PE_WAKE;
              wake_cnt[p] <= WC_W'(WAKE_CYCLES);
            end
          end
          PE_WAKE: begin
            if (wake_cnt[p] == '0) state[p] <= PE_ON;
            else                   wake_cnt[p] <= wake_cnt[p] - 1'b1;
          end
          default: state[p] <= PE_ON;
        endcase
      end
    end
  end

  // --- outputs ------------------------------------------------------------
  always_comb begin
    active_pes_o = '0;
    for (int p = 0; p < NUM_PE; p++) begin
      pe_clk_en_o[p] = (state[p] != PE_OFF);
      pe_accept_o[p] = (state[p] == PE_ON) || (state[p] == PE_WAKE);
      pe_state_o[p]  = state[p];
      if (state[p] != PE_OFF) active_pes_o = active_pes_o + 1'b1;
    end
  end

  assign wake_event_o   = do_wake || do_cancel;
  assign drain_start_o  = do_shut;
  assign drain_cancel_o = do_cancel;
  always_comb begin
    gated_off_o = 1'b0;
    for (int p = 0; p < NUM_PE; p++)
      if (state[p] == PE_DRAIN && !(do_cancel && drain_pe == PE_W'(p)) &&
          all_parked(parked | ((park_i && park_pe == PE_W'(p)) ?
                               (NUM_THREADS'(1) << park_tid_i) : '0), p))
        gated_off_o = 1'b1;
  end

  // Only threads of PEs that are not taking work are parked.
  a_park_only_idle_pe: assert property (@(posedge clk) disable iff (!rst_n)
                                        park_i |-> !pe_accept_o[park_pe]);

endmodule
