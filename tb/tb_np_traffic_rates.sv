// tb_np_traffic_rates: the evaluation traffic on the clock-gated processor.
// Arrival rates of ~90, ~180, ~360 and ~480 Mb/s at a 232 MHz core clock (one
// 64-byte mpacket per ~1320, ~660, ~330 and ~248 cycles, random gaps, random
// ports among 16) are run against four packet programs that differ only in
// their processing time per mpacket (shortest for nat, then ipfwdr, md4 and
// url; the cycle counts are illustrative). Each case starts from reset and
// runs ten windows; the window is scaled to 100K cycles (th0 = 50K, step 2K)
// to keep the run short. For each case the fraction of PE clock cycles that
// were gated off is reported as the clock-power saving opportunity.
// Checks: no mpacket lost and all delivered in order per port; some PE gated
// at the lowest rate for every program; the gated fraction at ~90 Mb/s is not
// below that at ~480 Mb/s; the shortest program gates at least as much as the
// longest at both ends of the rate range.
module tb_np_traffic_rates;
  import np_pkg::*;
  localparam int unsigned NPE = NUM_PE, TPP = THREADS_PER_PE, NPORT = NUM_PORTS;
  localparam int unsigned DW = MPKT_W, PW = 4, TW = 5, LW = 2;
  localparam int unsigned P = 100_000, TH0 = 50_000, STEP = 2_000;
  localparam int unsigned WINDOWS = 10, MEASURED = 6;
  localparam int NRATE = 4, NPROG = 4;
  localparam int unsigned RATE_MBPS [NRATE] = '{90, 180, 360, 480};
  localparam int unsigned GAP [NRATE]       = '{1320, 660, 330, 248};   // 512 bit * 232 MHz / rate
  localparam int unsigned PROC [NPROG]      = '{1500, 2000, 3000, 4000}; // nat, ipfwdr, md4, url
  localparam string       PROG_NAME [NPROG] = '{"nat", "ipfwdr", "md4", "url"};

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
  int unsigned proc_cycles = 300;
  int unsigned busy [NPE], done [NPE];

  np_clock_gating_top #(.WINDOW_P(P), .TH_INIT(TH0), .ALPHA(STEP)) dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_port_i(in_port), .in_data_i(in_data),
    .in_drop_o(in_drop), .pe_gclk_o(gclk), .rcv_req_i(rcv_req), .rcv_tid_i(rcv_tid),
    .rcv_ack_o(rcv_ack), .grant_o(grant), .grant_tid_o(grant_tid), .grant_port_o(grant_port),
    .grant_data_o(grant_data), .pe_state_o(pe_state), .active_pes_o(active),
    .idle_threads_o(), .buf_full_o(), .extra_used_o(), .threshold_o(), .last_idle_o(),
    .window_end_o(), .shutdown_req_o(), .th_up_o(), .th_down_o(), .wake_event_o(),
    .drain_start_o(), .gated_off_o(), .drain_cancel_o(), .park_o());

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    pe_model #(.PE_ID(p), .TPP(TPP), .TID_W(TW), .LT_W(LW)) u_pe (
      .gclk(gclk[p]), .rst_n, .proc_cycles_i(proc_cycles),
      .rcv_req_o(rcv_req[p]), .rcv_tid_o(rcv_tid[p]), .rcv_ack_i(rcv_ack[p]),
      .grant_i(grant), .grant_tid_i(grant_tid), .busy_o(busy[p]), .done_o(done[p]));
  end

  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [DW-1:0] port_q [NPORT][$];
  bit measuring = 1'b0;
  longint gated_cycles = 0, meas_cycles = 0;
  int n_drop = 0, n_bad = 0;

  always @(posedge clk) if (rst_n) begin
    if (grant) begin
      if (port_q[grant_port].size() == 0 || grant_data != port_q[grant_port][0]) n_bad++;
      if (port_q[grant_port].size() > 0) void'(port_q[grant_port].pop_front());
    end
    if (in_valid) begin
      if (in_drop) n_drop++; else port_q[in_port].push_back(in_data);
    end
    if (measuring) begin
      meas_cycles++;
      for (int p = 0; p < NPE; p++) if (pe_state[p] == PE_OFF) gated_cycles++;
    end
  end

  real frac [NPROG][NRATE];

  task automatic run_case(int g, int r);
    longint next;
    proc_cycles = PROC[g];
    rst_n = 1'b0;
    for (int p = 0; p < NPORT; p++) port_q[p].delete();
    n_drop = 0; n_bad = 0; gated_cycles = 0; meas_cycles = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    next = $urandom_range(1, 2 * GAP[r] - 1);
    for (longint c = 0; c < longint'(WINDOWS) * P; c++) begin
      measuring = (c >= longint'(WINDOWS - MEASURED) * P);
      if (c == next) begin
        in_valid = 1'b1;
        in_port  = PW'($urandom_range(0, NPORT - 1));
        for (int w = 0; w < DW / 32; w++) in_data[w*32 +: 32] = $urandom;
        next = c + $urandom_range(1, 2 * GAP[r] - 1);
      end
      @(posedge clk); #1 in_valid = 1'b0;
    end
    measuring = 1'b0;
    repeat (5000) @(posedge clk);
    frac[g][r] = real'(gated_cycles) / real'(meas_cycles * NPE);
    begin
      int left = 0;
      for (int p = 0; p < NPORT; p++) left += port_q[p].size();
      check(n_drop == 0, $sformatf("%s at %0d Mb/s: no mpacket lost", PROG_NAME[g], RATE_MBPS[r]));
      check(n_bad == 0 && left == 0, $sformatf("%s at %0d Mb/s: all delivered in port order", PROG_NAME[g], RATE_MBPS[r]));
    end
    $display("%-7s %4d Mb/s  PE clock cycles gated: %5.1f %%", PROG_NAME[g], RATE_MBPS[r], 100.0 * frac[g][r]);
  endtask

  initial begin
    for (int g = 0; g < NPROG; g++)
      for (int r = 0; r < NRATE; r++) run_case(g, r);
    for (int g = 0; g < NPROG; g++) begin
      check(frac[g][0] > 0.0, $sformatf("%s: PEs gated at the lowest rate", PROG_NAME[g]));
      check(frac[g][0] >= frac[g][NRATE-1], $sformatf("%s: less gating at the highest rate", PROG_NAME[g]));
    end
    check(frac[0][0] >= frac[NPROG-1][0] && frac[0][NRATE-1] >= frac[NPROG-1][NRATE-1],
          "shortest program gates at least as much as the longest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(4 * 20 * longint'(NPROG * NRATE) * longint'(P));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
