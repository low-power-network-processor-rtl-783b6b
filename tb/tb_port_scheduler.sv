// tb_port_scheduler: checks the dynamic thread-port mapping cycle by cycle.
// For random port_rdy_status patterns and scan positions it predicts the port
// the round-robin scan must find and the cycle cost the mapping is charged:
// one cycle per status bit tested, one for the dequeue, grant right after. It
// also checks that a thread of a PE that is not accepting work is parked
// instead of granted, that the same port is then tried again, and that the
// scan holds while no thread waits.
module tb_port_scheduler;
  localparam int unsigned NUM_PORTS = 16, NUM_PE = 6, TPP = 4, NT = 24, PORT_W = 4, TID_W = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_PORTS-1:0] port_rdy = '0;
  logic q_empty;
  logic [TID_W-1:0] q_head;
  logic q_pop, park, rd_req, rd_valid, grant;
  logic [TID_W-1:0] park_tid, grant_tid;
  logic [PORT_W-1:0] rd_port, grant_port, scan_ptr;
  logic [NUM_PE-1:0] pe_accept = '1;
  int checks = 0, failures = 0, parks = 0, grants = 0, wraps = 0;
  logic [TID_W-1:0] tq [$];

  assign q_empty = (tq.size() == 0);
  assign q_head  = q_empty ? '0 : tq[0];

  port_scheduler #(.NUM_PORTS(NUM_PORTS), .NUM_PE(NUM_PE), .THREADS_PER_PE(TPP)) dut (
    .clk, .rst_n, .port_rdy_i(port_rdy), .q_empty_i(q_empty), .q_head_i(q_head), .q_pop_o(q_pop),
    .pe_accept_i(pe_accept), .park_o(park), .park_tid_o(park_tid),
    .rd_req_o(rd_req), .rd_port_o(rd_port), .rd_valid_i(rd_valid), .rd_miss_i(1'b0),
    .grant_o(grant), .grant_tid_o(grant_tid), .grant_port_o(grant_port), .scan_ptr_o(scan_ptr));

  always #5 clk = ~clk;

  // receive buffer stand-in: data one cycle after the request
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rd_valid <= 1'b0; else rd_valid <= rd_req;
  always @(posedge clk) if (rst_n && q_pop) begin #1; if (tq.size() != 0) void'(tq.pop_front()); end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int ptr_model = 0;

  // One mapping: a single thread tid waits; ports rdy are ready.
  task automatic one(logic [NUM_PORTS-1:0] rdy, logic [TID_W-1:0] tid, bit accepted);
    int m, found;
    port_rdy = rdy;
    pe_accept = '1;
    if (!accepted) pe_accept[tid / TPP] = 1'b0;
    // find expected port and number of bits tested
    m = 0; found = -1;
    for (int k = 0; k < NUM_PORTS && found < 0; k++) begin
      m++;
      if (rdy[(ptr_model + k) % NUM_PORTS]) found = (ptr_model + k) % NUM_PORTS;
    end
    #2 tq.push_back(tid);
    for (int e = 1; e <= m + 1; e++) begin
      @(posedge clk); #1;
      if (e < m) begin
        check(!q_pop && !grant, "nothing before the ready bit is reached");
      end else if (e == m) begin
        check(q_pop, "dequeue right after the ready bit is tested");
        check(park == !accepted, "park only a non-accepting PE's thread");
        check(rd_req == accepted && rd_port == PORT_W'(found), "buffer read of the found port");
        if (park) check(park_tid == tid, "parked thread id");
      end else begin
        if (accepted) begin
          check(grant, "grant one cycle after the dequeue");
          check(grant_tid == tid && grant_port == PORT_W'(found), "grant thread and port");
          if (found < ptr_model) wraps++;
        end else begin
          check(!grant, "no grant for a parked thread");
        end
      end
    end
    if (accepted) begin
      grants++;
      ptr_model = (found + 1) % NUM_PORTS;
    end else begin
      parks++;
      ptr_model = found;
    end
    @(posedge clk); #1;
    check(scan_ptr == PORT_W'(ptr_model), "scan pointer after mapping");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // no thread: scan holds
    port_rdy = 16'h0100;
    repeat (20) @(posedge clk);
    #1 check(scan_ptr == 0 && !q_pop, "scan holds while the thread queue is empty");
    // worst case: a single ready bit just behind the pointer
    one(16'h0001 << 15, 5'd3, 1'b1);    // 16 bits tested
    one(16'h0001, 5'd7, 1'b1);          // wraps to port 0
    one(16'h0001 << 1, 5'd20, 1'b0);    // parked, then same port again
    one(16'h0001 << 1, 5'd21, 1'b1);
    for (int n = 0; n < 500; n++) begin
      logic [NUM_PORTS-1:0] r;
      r = NUM_PORTS'($urandom) & NUM_PORTS'($urandom);
      if (r == '0) r = 16'h0001 << $urandom_range(0, 15);
      one(r, TID_W'($urandom_range(0, NT - 1)), $urandom_range(0, 4) != 0);
    end
    check(grants > 0 && parks > 0 && wraps > 0, "grants, parks and scan wrap-around all seen");
    $display("grants %0d parks %0d wraps %0d", grants, parks, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
