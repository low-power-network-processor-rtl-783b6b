// tb_np_clock_gating_top: end-to-end run of the clock-gated network processor
// at its full default size (six PEs of four threads, 16 ports, 16+1 buffer
// entries, one-million-cycle windows), with six behavioural PEs on the gated
// clocks and traffic in five phases:
//   1. light load (one mpacket per ~400 cycles, 600 cycles of work each):
//      PEs are drained and gated off one per window down to one;
//   2. load near 1 Gb/s at 232 MHz (one mpacket per ~120 cycles on average):
//      the single PE cannot keep up, the buffer fills and PEs are woken; no
//      mpacket may be lost;
//   3. light load again until a PE starts draining, then a short burst that
//      fills the buffer while it drains: the drain is cancelled;
//   4. saturation (one mpacket per 10 cycles): every PE runs, nothing is
//      drained under pressure, the spare entry is used and overflow drops;
//   5. quiet: every stored mpacket is delivered.
// Checks: each grant carries the oldest mpacket of its port; no drops outside
// phase 4; a PE's gated clock pulses exactly in the cycles its enable allowed;
// the number of running PEs reaches 1 and 6; every mechanism happened.
module tb_np_clock_gating_top;
  import np_pkg::*;
  localparam int unsigned NPE = NUM_PE, TPP = THREADS_PER_PE, NPORT = NUM_PORTS;
  localparam int unsigned DW = MPKT_W, PW = 4, TW = 5, LW = 2, P = WINDOW_P;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [PW-1:0] in_port = '0;
  logic [DW-1:0] in_data = '0;
  logic in_drop;
  logic [NPE-1:0] gclk, rcv_req, rcv_ack;
  logic [LW-1:0] rcv_tid [NPE];
  logic grant;
  logic [TW-1:0] grant_tid;
  logic [PW-1:0] grant_port;
  logic [DW-1:0] grant_data;
  pe_state_e pe_state [NPE];
  logic [2:0] active;
  logic [4:0] idle_threads;
  logic buf_full, extra_used, window_end, shut_req, th_up, th_down;
  logic wake_ev, drain_start, gated_off, drain_cancel, park;
  logic [CNT_W-1:0] threshold, last_idle;
  int unsigned proc_cycles = 600;
  int unsigned busy [NPE], done [NPE];

  np_clock_gating_top dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_port_i(in_port), .in_data_i(in_data),
    .in_drop_o(in_drop), .pe_gclk_o(gclk), .rcv_req_i(rcv_req), .rcv_tid_i(rcv_tid),
    .rcv_ack_o(rcv_ack), .grant_o(grant), .grant_tid_o(grant_tid), .grant_port_o(grant_port),
    .grant_data_o(grant_data), .pe_state_o(pe_state), .active_pes_o(active),
    .idle_threads_o(idle_threads), .buf_full_o(buf_full), .extra_used_o(extra_used),
    .threshold_o(threshold), .last_idle_o(last_idle), .window_end_o(window_end),
    .shutdown_req_o(shut_req), .th_up_o(th_up), .th_down_o(th_down), .wake_event_o(wake_ev),
    .drain_start_o(drain_start), .gated_off_o(gated_off), .drain_cancel_o(drain_cancel),
    .park_o(park));

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    pe_model #(.PE_ID(p), .TPP(TPP), .TID_W(TW), .LT_W(LW)) u_pe (
      .gclk(gclk[p]), .rst_n, .proc_cycles_i(proc_cycles),
      .rcv_req_o(rcv_req[p]), .rcv_tid_o(rcv_tid[p]), .rcv_ack_i(rcv_ack[p]),
      .grant_i(grant), .grant_tid_i(grant_tid), .busy_o(busy[p]), .done_o(done[p]));
  end

  always #2 clk = ~clk;   // ~232 MHz would be 4.3 ns; the period only sets the time axis

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  // ---- counters and scoreboard -----------------------------------------
  longint cycle = 0;
  int n_in = 0, n_grant = 0, n_drop = 0, n_drop_allowed = 0;
  int n_window = 0, n_shut_req = 0, n_th_up = 0, n_th_down = 0, n_wake = 0, n_drain = 0;
  int n_gated = 0, n_cancel = 0, n_park = 0, n_extra = 0, n_full = 0;
  int min_active = NPE, max_active = 0;
  bit drops_allowed = 1'b0;
  longint gclk_edges [NPE], en_cycles [NPE];
  logic [DW-1:0] port_q [NPORT][$];

  for (genvar p = 0; p < NPE; p++) begin : g_cnt
    always @(posedge gclk[p]) if (rst_n) gclk_edges[p]++;
  end
  initial for (int p = 0; p < NPE; p++) begin gclk_edges[p] = 0; en_cycles[p] = 0; end

  always @(negedge clk) if (rst_n) begin
    // the latch is transparent now: the next rising edge passes if enabled
    for (int p = 0; p < NPE; p++) if (pe_state[p] != PE_OFF) en_cycles[p]++;
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (grant) begin
      n_grant++;
      check(port_q[grant_port].size() > 0 && grant_data == port_q[grant_port][0],
            "grant carries the oldest mpacket of its port");
      if (port_q[grant_port].size() > 0) void'(port_q[grant_port].pop_front());
    end
    if (in_valid) begin
      n_in++;
      if (in_drop) begin
        n_drop++;
        if (drops_allowed) n_drop_allowed++;
        else check(1'b0, "no mpacket lost below saturation");
      end else port_q[in_port].push_back(in_data);
    end
    if (window_end) n_window++;
    if (shut_req) n_shut_req++;
    if (th_up) n_th_up++;
    if (th_down) n_th_down++;
    if (wake_ev && !drain_cancel) n_wake++;
    if (drain_start) begin
      n_drain++;
      check(!buf_full, "no drain while the buffer is full");
    end
    if (gated_off) n_gated++;
    if (drain_cancel) n_cancel++;
    if (park) n_park++;
    if (extra_used) n_extra++;
    if (buf_full) n_full++;
    if (int'(active) < min_active) min_active = int'(active);
    if (int'(active) > max_active) max_active = int'(active);
  end

  // ---- traffic ------------------------------------------------------------
  int unsigned seq = 0;
  task automatic send();
    in_valid = 1'b1;
    in_port  = PW'($urandom_range(0, NPORT - 1));
    for (int w = 0; w < DW / 32; w++) in_data[w*32 +: 32] = $urandom;
    in_data[31:0] = seq++;
  endtask

  // run n cycles with a random gap of mean `mean` cycles between arrivals
  task automatic traffic(longint n, int unsigned mean);
    longint next = $urandom_range(1, 2 * mean - 1);
    for (longint c = 0; c < n; c++) begin
      if (c == next) begin send(); next = c + $urandom_range(1, 2 * mean - 1); end
      @(posedge clk); #1 in_valid = 1'b0;
    end
  endtask

  int act_after_light, wake_before;
  initial begin
    repeat (5) @(posedge clk);
    #1 rst_n = 1'b1;
    // 1. light load for seven windows
    traffic(7 * longint'(P), 400);
    act_after_light = int'(active);
    check(active == 1, "light load leaves a single PE running");
    $display("phase 1: running PEs %0d, threshold %0d, last idle cycles %0d", active, threshold, last_idle);
    // 2. ~1 Gb/s for three windows
    wake_before = n_wake;
    traffic(3 * longint'(P), 120);
    check(n_wake > wake_before, "full buffer wakes a PE");
    $display("phase 2: running PEs %0d, wake-ups %0d, threshold %0d", active, n_wake, threshold);
    // 3. light load until a drain starts, then a burst until the buffer is full
    begin
      longint c = 0;
      while (!drain_start && c < 4 * longint'(P)) begin
        if ($urandom_range(0, 399) == 0) send();
        @(posedge clk); #1 in_valid = 1'b0; c++;
      end
      check(drain_start, "a drain started under light load");
      repeat (20) @(posedge clk);
      #1 c = 0;
      while (!buf_full && c < 200) begin send(); @(posedge clk); #1 in_valid = 1'b0; c++; end
      repeat (5) @(posedge clk);
      check(n_cancel > 0, "full buffer during a drain cancels it");
    end
    // 4. saturation
    drops_allowed = 1'b1;
    traffic(200_000, 10);
    check(max_active == NPE, "saturation brings every PE back");
    drops_allowed = 1'b0;
    // 5. quiet: everything delivered
    traffic(20_000, 1_000_000_000);
    begin
      int left = 0;
      for (int p = 0; p < NPORT; p++) left += port_q[p].size();
      check(left == 0, "every stored mpacket delivered");
    end
    for (int p = 0; p < NPE; p++)
      check(gclk_edges[p] == en_cycles[p], "gated clock pulses exactly in enabled cycles");
    check(n_window > 0 && n_shut_req > 0 && n_th_up > 0 && n_th_down > 0, "window, request and both threshold steps seen");
    check(n_drain > 0 && n_gated > 0 && n_park > 0, "drain, park and gate-off seen");
    check(n_wake > 0 && n_cancel > 0, "wake-up and drain cancel seen");
    check(n_extra > 0 && n_full > 0 && n_drop_allowed > 0, "spare entry, full buffer and overflow seen");
    check(min_active == 1, "down to one running PE");
    $display("cycles %0d arrivals %0d grants %0d drops %0d (saturation) windows %0d requests %0d",
             cycle, n_in, n_grant, n_drop, n_window, n_shut_req);
    $display("drains %0d gated %0d parks %0d wakes %0d cancels %0d th_up %0d th_down %0d spare %0d full %0d",
             n_drain, n_gated, n_park, n_wake, n_cancel, n_th_up, n_th_down, n_extra, n_full);
    for (int p = 0; p < NPE; p++)
      $display("PE%0d: %0d of %0d cycles clocked, %0d packets", p, gclk_edges[p], cycle, done[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(4 * 16 * longint'(P));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
