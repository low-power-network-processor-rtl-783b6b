// tb_pe_gating_fsm: directed walk through the PE power states.
// Shuts PEs down one per request (highest first) down to the minimum of one,
// parks their threads and checks that the clock stops only when the last
// thread is parked; wakes PEs on a full buffer (lowest off PE first), checks
// the settle time, the re-queuing of every parked thread, the hold-off
// between wake-ups, the cancelling of a drain and that no PE is drained while
// the buffer is full.
module tb_pe_gating_fsm;
  import np_pkg::*;
  localparam int unsigned NPE = 6, TPP = 4, NT = 24, TID_W = 5, WC = 4, HO = 50;

  logic clk = 1'b0, rst_n = 1'b0;
  logic shut = 1'b0, full = 1'b0, park = 1'b0, reenq_ack = 1'b0;
  logic [TID_W-1:0] park_tid = '0, reenq_tid;
  logic reenq_valid;
  logic [NPE-1:0] clk_en, accept;
  pe_state_e st [NPE];
  logic [2:0] active;
  logic wake_ev, drain_start, gated_off, cancel;
  int checks = 0, failures = 0;

  pe_gating_fsm #(.NUM_PE(NPE), .THREADS_PER_PE(TPP), .WAKE_CYCLES(WC), .WAKE_HOLDOFF(HO),
                  .MIN_ACTIVE(1)) dut (
    .clk, .rst_n, .shutdown_req_i(shut), .buf_full_i(full), .park_i(park), .park_tid_i(park_tid),
    .reenq_valid_o(reenq_valid), .reenq_tid_o(reenq_tid), .reenq_ack_i(reenq_ack),
    .pe_clk_en_o(clk_en), .pe_accept_o(accept), .pe_state_o(st), .active_pes_o(active),
    .wake_event_o(wake_ev), .drain_start_o(drain_start), .gated_off_o(gated_off),
    .drain_cancel_o(cancel));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic request_shutdown(int exp_pe);   // exp_pe < 0: must be refused
    shut = 1'b1; #1;
    check(drain_start == (exp_pe >= 0), "drain start decision");
    tick(); shut = 1'b0;
    if (exp_pe >= 0) begin
      check(st[exp_pe] == PE_DRAIN, "chosen PE drains");
      check(!accept[exp_pe] && clk_en[exp_pe], "draining PE keeps clock, takes no work");
    end
  endtask

  task automatic park_thread(int t, bit last);
    park = 1'b1; park_tid = TID_W'(t); #1;
    check(gated_off == last, "gated-off pulse exactly with the last thread");
    tick(); park = 1'b0;
    check(clk_en[t / TPP] == !last, "clock stops only after the last thread is parked");
  endtask

  task automatic drain_fully(int pe);
    request_shutdown(pe);
    for (int t = 0; t < TPP; t++) park_thread(pe * TPP + t, t == TPP - 1);
    check(st[pe] == PE_OFF, "PE off");
  endtask

  // wake by a full buffer; returns after the PE is ON and its threads re-queued
  task automatic wake_expect(int pe);
    full = 1'b1; #1;
    check(wake_ev, "wake event on full buffer");
    tick(); full = 1'b0;
    check(st[pe] == PE_WAKE && clk_en[pe], "lowest off PE restarts its clock");
    check(accept[pe], "waking PE accepts work");
    for (int c = 0; c < WC; c++) begin check(st[pe] == PE_WAKE, "settling"); tick(); end
    tick();
    check(st[pe] == PE_ON, "PE on after settle time");
    for (int t = 0; t < TPP; t++) begin
      check(reenq_valid && reenq_tid == TID_W'(pe * TPP + t), "parked thread re-queued in order");
      reenq_ack = 1'b1; tick(); reenq_ack = 1'b0;
    end
    check(!reenq_valid, "all parked threads re-queued");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1; #1;
    check(clk_en == '1 && accept == '1 && active == 6, "all PEs on after reset");
    // shut down five PEs, highest first; a request during a drain is ignored
    request_shutdown(5);
    request_shutdown(-1);
    for (int t = 0; t < TPP; t++) park_thread(20 + t, t == TPP - 1);
    check(st[5] == PE_OFF && active == 5, "PE5 off");
    for (int pe = 4; pe >= 1; pe--) drain_fully(pe);
    check(active == 1 && clk_en == 6'b000001, "only PE0 running");
    request_shutdown(-1);            // minimum reached
    // wake: lowest off PE is PE1
    wake_expect(1);
    // hold-off: a second full right after is ignored until HO cycles passed
    full = 1'b1; #1;
    check(!wake_ev, "no second wake inside the hold-off");
    repeat (HO - WC - TPP - 4) begin tick(); check(!wake_ev, "hold-off"); end
    while (!wake_ev) tick();
    check(1'b1, "second wake after hold-off");
    tick(); full = 1'b0;
    check(st[2] == PE_WAKE, "PE2 waking");
    repeat (WC + 1) tick();
    repeat (TPP) begin check(reenq_valid, "re-queue PE2"); reenq_ack = 1'b1; tick(); reenq_ack = 1'b0; end
    // no drain while the buffer is full
    repeat (HO) tick();
    full = 1'b1; shut = 1'b1; #1;
    check(!drain_start, "no drain under buffer pressure");
    tick(); shut = 1'b0; full = 1'b0;
    repeat (HO) tick();            // lets the wake that full caused settle
    while (reenq_valid) begin reenq_ack = 1'b1; tick(); reenq_ack = 1'b0; end
    // cancel a drain: PE with highest on number drains, two threads parked
    begin
      int d;
      d = -1;
      for (int p = 0; p < NPE; p++) if (st[p] == PE_ON) d = p;
      request_shutdown(d);
      park_thread(d * TPP + 0, 1'b0);
      park_thread(d * TPP + 2, 1'b0);
      repeat (HO) tick();
      full = 1'b1; #1;
      check(cancel && wake_ev, "full buffer cancels the drain");
      tick(); full = 1'b0;
      check(st[d] == PE_ON && clk_en[d], "drained PE back on");
      check(reenq_valid && reenq_tid == TID_W'(d * TPP + 0), "first parked thread back");
      reenq_ack = 1'b1; tick();
      check(reenq_valid && reenq_tid == TID_W'(d * TPP + 2), "second parked thread back");
      tick(); reenq_ack = 1'b0;
      check(!reenq_valid, "nothing else parked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
