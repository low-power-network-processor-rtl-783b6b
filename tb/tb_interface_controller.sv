// tb_interface_controller: the receive path with its thread queue and
// scheduler, driven by 24 modelled threads and random packet arrivals.
// Every grant must hand the oldest waiting thread (queue order, with the
// re-queued threads of the on/off controller taking precedence) the oldest
// mpacket of the granted port; no mpacket may be lost unless all 17 buffer
// entries were taken; the idle-thread count must equal the number of queued
// threads. Part of the run makes PE 5 refuse work, so its threads are parked
// and later handed back through the re-queue port.
module tb_interface_controller;
  localparam int unsigned NPORT = 16, NPE = 6, TPP = 4, NT = 24, DW = 512, PW = 4, TW = 5, LW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [PW-1:0] in_port = '0;
  logic [DW-1:0] in_data = '0;
  logic in_drop;
  logic [NPE-1:0] rcv_req = '0, rcv_ack;
  logic [LW-1:0] rcv_tid [NPE];
  logic reenq_valid = 1'b0, reenq_ack;
  logic [TW-1:0] reenq_tid = '0;
  logic [NPE-1:0] pe_accept = '1;
  logic park, grant, buf_full, extra_used;
  logic [TW-1:0] park_tid, grant_tid;
  logic [PW-1:0] grant_port;
  logic [DW-1:0] grant_data;
  logic [4:0] idle_threads;
  logic [4:0] buf_count;
  logic [NPORT-1:0] port_rdy;
  int checks = 0, failures = 0;
  int n_grant = 0, n_park = 0, n_drop = 0, n_reenq = 0, n_extra = 0, n_in = 0;

  interface_controller dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_port_i(in_port), .in_data_i(in_data),
    .in_drop_o(in_drop), .rcv_req_i(rcv_req), .rcv_tid_i(rcv_tid), .rcv_ack_o(rcv_ack),
    .reenq_valid_i(reenq_valid), .reenq_tid_i(reenq_tid), .reenq_ack_o(reenq_ack),
    .pe_accept_i(pe_accept), .park_o(park), .park_tid_o(park_tid),
    .grant_o(grant), .grant_tid_o(grant_tid), .grant_port_o(grant_port), .grant_data_o(grant_data),
    .idle_threads_o(idle_threads), .buf_count_o(buf_count), .buf_full_o(buf_full),
    .extra_used_o(extra_used), .port_rdy_o(port_rdy));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- models -----------------------------------------------------------
  typedef enum { T_WANT, T_QUEUED, T_BUSY, T_PARKED } tstate_e;
  tstate_e tst [NT];
  int      busy_left [NT];
  logic [DW-1:0] port_q [NPORT][$];
  logic [TW-1:0] thr_q [$];
  int buf_model = 0;
  logic [TW-1:0] parked_list [$];
  int proc_min = 20, proc_max = 200;
  int arr_pct = 10;

  // request selection: per PE the lowest thread that wants work
  always_comb begin
    for (int p = 0; p < NPE; p++) begin
      rcv_req[p] = 1'b0;
      rcv_tid[p] = '0;
      for (int t = TPP - 1; t >= 0; t--)
        if (tst[p * TPP + t] == T_WANT) begin rcv_req[p] = 1'b1; rcv_tid[p] = LW'(t); end
    end
  end

  initial for (int t = 0; t < NT; t++) begin tst[t] = T_WANT; busy_left[t] = 0; end

  // checks and model updates at each clock edge (pre-edge values)
  always @(posedge clk) if (rst_n) begin
    // grant
    if (grant) begin
      n_grant++;
      check(thr_q.size() > 0 && grant_tid == thr_q[0], "grant goes to the oldest waiting thread");
      check(port_q[grant_port].size() > 0 && grant_data == port_q[grant_port][0],
            "grant carries the oldest mpacket of the port");
      if (thr_q.size() > 0) void'(thr_q.pop_front());
      if (port_q[grant_port].size() > 0) void'(port_q[grant_port].pop_front());
      buf_model--;
      tst[grant_tid] <= T_BUSY;
      busy_left[grant_tid] <= $urandom_range(proc_min, proc_max);
    end
    if (park) begin
      n_park++;
      check(thr_q.size() > 0 && park_tid == thr_q[0], "parked thread is the queue head");
      check(!pe_accept[park_tid / TPP], "only threads of a refusing PE are parked");
      if (thr_q.size() > 0) void'(thr_q.pop_front());
      tst[park_tid] <= T_PARKED;
      parked_list.push_back(park_tid);
    end
    // enqueue: re-queue first, else one PE request
    if (reenq_valid) begin
      check(reenq_ack && rcv_ack == '0, "re-queue has precedence");
      thr_q.push_back(reenq_tid);
      tst[reenq_tid] <= T_QUEUED;
      n_reenq++;
    end else begin
      check($countones(rcv_ack) == (rcv_req != '0), "one request taken per cycle when any");
      for (int p = 0; p < NPE; p++) if (rcv_ack[p]) begin
        check(rcv_req[p], "ack only with a request");
        thr_q.push_back(TW'(p * TPP + rcv_tid[p]));
        tst[p * TPP + rcv_tid[p]] <= T_QUEUED;
      end
    end
    // arrivals
    if (in_valid) begin
      n_in++;
      check(in_drop == (buf_model == 17), "drop only when all 17 entries are taken");
      if (!in_drop) begin port_q[in_port].push_back(in_data); buf_model++; end
      else n_drop++;
    end
    if (extra_used) n_extra++;
    // processing
    for (int t = 0; t < NT; t++)
      if (tst[t] == T_BUSY) begin
        if (busy_left[t] == 0) tst[t] <= T_WANT; else busy_left[t] <= busy_left[t] - 1;
      end
  end

  // status comparison after the edge
  always @(negedge clk) if (rst_n) begin
    // a grant on display was dequeued and read out one edge earlier
    check(idle_threads == thr_q.size() - (grant ? 1 : 0), "idle threads equal queued threads");
    check(buf_count == buf_model - (grant ? 1 : 0), "buffer occupancy");
  end

  // stimulus, applied after each edge
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      #1;
      // phases: light, heavy (overflow), PE5 refusing, re-queue
      if (cyc == 8000)  begin arr_pct = 60; proc_min = 200; proc_max = 400; end
      if (cyc == 12000) begin arr_pct = 10; proc_min = 20; proc_max = 200; pe_accept[5] = 1'b0; end
      if (cyc == 20000) pe_accept[5] = 1'b1;
      in_valid = ($urandom_range(0, 99) < arr_pct);
      in_port  = PW'($urandom_range(0, NPORT - 1));
      for (int w = 0; w < DW / 32; w++) in_data[w*32 +: 32] = $urandom;
      reenq_valid = pe_accept[5] && parked_list.size() > 0;
      reenq_tid   = reenq_valid ? parked_list[0] : '0;
      @(posedge clk);
      if (reenq_valid) void'(parked_list.pop_front());
    end
    in_valid = 1'b0; reenq_valid = 1'b0;
    repeat (2000) @(posedge clk);
    check(buf_model == 0, "every stored mpacket delivered");
    check(n_grant > 0 && n_park == TPP && n_reenq == TPP && n_drop > 0 && n_extra > 0,
          "grants, parking, re-queue, spare entry and overflow all exercised");
    $display("arrivals %0d grants %0d drops %0d parks %0d reenq %0d spare-entry cycles %0d",
             n_in, n_grant, n_drop, n_park, n_reenq, n_extra);
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
