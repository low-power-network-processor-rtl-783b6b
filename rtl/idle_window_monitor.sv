// idle_window_monitor: decides, once per time window, whether one PE fewer
// would do.
//
// The number of threads waiting in the thread queue is the number of idle
// threads. In every cycle where at least one PE's worth of threads
// (THREADS_PER_PE) sits idle, the remaining PEs could have carried the load
// without one of them, and a 20-bit counter counts that cycle. At the end of
// every window of WINDOW_P cycles the count is compared with the threshold
// register th: a count above th raises shutdown_req_o for one cycle, asking the
// on/off state machine to gate one more PE. The threshold then adapts by ALPHA
// through one adder: if any PE had to be woken during the window (the buffer
// ran full, so gating had been too eager) th rises by ALPHA, up to WINDOW_P;
// after a window without a wake-up it falls by ALPHA, down to ALPHA. The counter
// then restarts.
//
// The window P = 1M cycles, initial th = 500K, ALPHA = 2 % of P and the 20-bit
// counter and threshold register are the paper's numbers. The idle-cycle
// criterion and the direction of the threshold steps are this design's
// reading of the idle-thread policy.
//
// Interface: idle_threads_i is the thread queue occupancy, wake_event_i a
// one-cycle pulse per PE wake-up. window_end_o pulses in the last cycle of a
// window together with shutdown_req_o; threshold_o and last_idle_o hold the
// current threshold and the previous window's idle-cycle count.
module idle_window_monitor #(
  parameter int unsigned CNT_W          = np_pkg::CNT_W,
  parameter int unsigned WINDOW_P       = np_pkg::WINDOW_P,
  parameter int unsigned TH_INIT        = np_pkg::TH_INIT,
  parameter int unsigned ALPHA          = np_pkg::ALPHA,
  parameter int unsigned THREADS_PER_PE = np_pkg::THREADS_PER_PE,
  parameter int unsigned IDLE_W         = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [IDLE_W-1:0] idle_threads_i,
  input  logic              wake_event_i,
  output logic              window_end_o,
  output logic              shutdown_req_o,
  output logic              th_up_o,
  output logic              th_down_o,
  output logic [CNT_W-1:0]  threshold_o,
  output logic [CNT_W-1:0]  last_idle_o
);

  // The window counter must reach WINDOW_P - 1 and the threshold WINDOW_P.
  initial begin
    assert (64'(WINDOW_P) < (64'd1 << CNT_W)) else $error("WINDOW_P does not fit in CNT_W bits");
    assert (TH_INIT <= WINDOW_P && ALPHA <= WINDOW_P) else $error("threshold settings exceed the window");
  end

  logic [CNT_W-1:0] win_cnt, idle_cnt;
  logic             wake_seen;
  logic             idle_now;
  logic [CNT_W-1:0] idle_total;
  logic [CNT_W:0]   th_sum, th_dif;

  assign idle_now     = (idle_threads_i >= IDLE_W'(THREADS_PER_PE));
  assign window_end_o = (win_cnt == CNT_W'(WINDOW_P - 1));
  assign idle_total   = idle_cnt + CNT_W'(idle_now);
  assign shutdown_req_o = window_end_o && (idle_total > threshold_o);
  assign th_up_o      = window_end_o &&  (wake_seen || wake_event_i);
  assign th_down_o    = window_end_o && !(wake_seen || wake_event_i);

  // Single adder/subtractor pair for the threshold step, with saturation.
  assign th_sum = {1'b0, threshold_o} + (CNT_W+1)'(ALPHA);
  assign th_dif = {1'b0, threshold_o} - (CNT_W+1)'(ALPHA);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_cnt     <= '0;
      idle_cnt    <= '0;
      wake_seen   <= 1'b0;
      threshold_o <= CNT_W'(TH_INIT);
      last_idle_o <= '0;
    end else if (window_end_o) begin
      win_cnt     <= '0;
      idle_cnt    <= '0;
      wake_seen   <= 1'b0;
      last_idle_o <= idle_total;
      if (th_up_o)
        threshold_o <= (th_sum > (CNT_W+1)'(WINDOW_P)) ? CNT_W'(WINDOW_P) : th_sum[CNT_W-1:0];
      else
        threshold_o <= (th_dif < (CNT_W+1)'(ALPHA) || th_dif[CNT_W]) ? CNT_W'(ALPHA) : th_dif[CNT_W-1:0];
    end else begin
      win_cnt  <= win_cnt + 1'b1;
      idle_cnt <= idle_total;
      if (wake_event_i) wake_seen <= 1'b1;
    end
  end

endmodule
