// tb_idle_window_monitor: feeds windows with a known number of idle cycles
// (cycles with at least one PE's worth of threads in the queue) and wake-up
// events, and checks the window length, the shutdown request, the recorded
// idle count and the threshold steps (up after a window with a wake-up, down
// otherwise, clamped to [ALPHA, P]) against a reference computation. The
// window is scaled down to P = 200 cycles, th0 = 100, ALPHA = 4 (2 % of P).
module tb_idle_window_monitor;
  localparam int unsigned P = 200, TH0 = 100, ALPHA = 4, CNT_W = 20, TPP = 4, IDLE_W = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [IDLE_W-1:0] idle = '0;
  logic wake = 1'b0;
  logic window_end, shut, th_up, th_down;
  logic [CNT_W-1:0] th, last_idle;
  int checks = 0, failures = 0, shut_seen = 0, up_seen = 0, down_seen = 0, floor_seen = 0;

  idle_window_monitor #(.CNT_W(CNT_W), .WINDOW_P(P), .TH_INIT(TH0), .ALPHA(ALPHA),
                        .THREADS_PER_PE(TPP), .IDLE_W(IDLE_W)) dut (
    .clk, .rst_n, .idle_threads_i(idle), .wake_event_i(wake), .window_end_o(window_end),
    .shutdown_req_o(shut), .th_up_o(th_up), .th_down_o(th_down), .threshold_o(th),
    .last_idle_o(last_idle));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int th_model = TH0;

  // One window with n_idle idle cycles at random places and wake-ups or not.
  task automatic window(int n_idle, bit with_wake);
    bit is_idle [P];
    int placed, exp_shut, wake_at;
    foreach (is_idle[i]) is_idle[i] = 1'b0;
    placed = 0;
    while (placed < n_idle) begin
      int k = $urandom_range(0, P - 1);
      if (!is_idle[k]) begin is_idle[k] = 1'b1; placed++; end
    end
    wake_at = with_wake ? $urandom_range(0, P - 1) : -1;
    for (int c = 0; c < P; c++) begin
      // idle means at least TPP threads waiting; non-idle 0..TPP-1
      idle = is_idle[c] ? IDLE_W'($urandom_range(TPP, 24)) : IDLE_W'($urandom_range(0, TPP - 1));
      wake = (c == wake_at);
      #1;
      check(window_end == (c == P - 1), "window end only in the last cycle");
      if (c == P - 1) begin
        exp_shut = (n_idle > th_model);
        check(shut == exp_shut, "shutdown request when idle cycles exceed th");
        check(th_up == with_wake && th_down == !with_wake, "threshold step direction");
        if (shut) shut_seen++;
      end else begin
        check(!shut, "no request inside the window");
      end
      @(posedge clk);
      #1;
    end
    wake = 1'b0;
    if (with_wake) begin th_model += ALPHA; if (th_model > P) th_model = P; up_seen++; end
    else begin
      th_model -= ALPHA; if (th_model < ALPHA) begin th_model = ALPHA; floor_seen++; end
      down_seen++;
    end
    check(th == th_model, "threshold after the window");
    check(last_idle == n_idle, "idle cycles counted");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1 check(th == TH0, "initial threshold");
    @(negedge clk);
    // synchronise: the monitor window starts at reset release
    // (the first window has already begun, so run the rest of it idle-free)
    while (!window_end) begin idle = '0; @(posedge clk); #1; end
    @(posedge clk); #1;
    th_model = TH0 - ALPHA;   // first (empty) window stepped the threshold down
    check(th == th_model, "threshold after the first window");
    window(TH0 + 10, 1'b0);          // above threshold: request
    window(10, 1'b0);                // far below: none
    window(th_model, 1'b0);          // equal: none
    window(th_model + 1, 1'b1);      // just above, with a wake-up: th up
    for (int n = 0; n < 40; n++) window($urandom_range(0, P), 1'b0);  // reach the floor
    for (int n = 0; n < 60; n++) window($urandom_range(0, P), 1'b1);  // reach the ceiling
    check(th == P, "threshold ceiling at P");
    for (int n = 0; n < 30; n++) window($urandom_range(0, P), $urandom_range(0, 1) == 1);
    check(shut_seen > 0 && up_seen > 0 && down_seen > 0 && floor_seen > 0, "all cases seen");
    $display("requests %0d up %0d down %0d", shut_seen, up_seen, down_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
