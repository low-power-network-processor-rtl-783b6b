// tb_rx_buffer: random arrivals and per-port reads against a reference list.
// Checks that a read returns the oldest mpacket of the named port one cycle
// later, that a port with nothing stored reports a miss, the port ready bits,
// the occupancy, the full flag of the 16 regular entries, the use of the spare
// entry and that an arrival is dropped only when all 17 entries are taken.
module tb_rx_buffer;
  localparam int unsigned NUM_PORTS = 16, DEPTH = 16, EXTRA = 1, DATA_W = 512, PORT_W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, rd_req = 1'b0;
  logic [PORT_W-1:0] in_port = '0, rd_port = '0, rd_port_o;
  logic [DATA_W-1:0] in_data = '0, rd_data;
  logic in_drop, rd_valid, rd_miss, main_full, extra_used;
  logic [NUM_PORTS-1:0] port_rdy;
  logic [$clog2(DEPTH+EXTRA+1)-1:0] count;
  int checks = 0, failures = 0;
  int drops_seen = 0, extra_seen = 0, miss_seen = 0, full_seen = 0;

  typedef struct { logic [PORT_W-1:0] port; logic [DATA_W-1:0] data; } ent_t;
  ent_t model [$];

  rx_buffer #(.NUM_PORTS(NUM_PORTS), .DEPTH(DEPTH), .EXTRA(EXTRA), .DATA_W(DATA_W)) dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_port_i(in_port), .in_data_i(in_data),
    .in_drop_o(in_drop), .rd_req_i(rd_req), .rd_port_i(rd_port), .rd_valid_o(rd_valid),
    .rd_miss_o(rd_miss), .rd_port_o(rd_port_o), .rd_data_o(rd_data), .port_rdy_o(port_rdy),
    .count_o(count), .main_full_o(main_full), .extra_used_o(extra_used));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [DATA_W-1:0] rand_data();
    logic [DATA_W-1:0] d;
    for (int i = 0; i < DATA_W / 32; i++) d[i*32 +: 32] = $urandom;
    return d;
  endfunction

  task automatic compare_status();
    logic [NUM_PORTS-1:0] rdy;
    rdy = '0;
    foreach (model[i]) rdy[model[i].port] = 1'b1;
    check(port_rdy == rdy, "port_rdy_status");
    check(count == model.size(), "count");
    check(main_full == (model.size() >= DEPTH), "main_full");
    check(extra_used == (model.size() > DEPTH), "extra_used");
  endtask

  // One cycle: optional arrival and optional read; checks read result after.
  task automatic step(bit arr, logic [PORT_W-1:0] ap, bit rd, logic [PORT_W-1:0] rp);
    int idx;
    bit exp_drop;
    logic [DATA_W-1:0] exp_data, d;
    d = rand_data();
    in_valid = arr; in_port = ap; in_data = d;
    rd_req = rd; rd_port = rp;
    idx = -1;
    foreach (model[i]) if (idx < 0 && model[i].port == rp) idx = i;
    exp_drop = arr && (model.size() == DEPTH + EXTRA);
    #1 if (arr) check(in_drop == exp_drop, "drop flag");
    if (in_drop) drops_seen++;
    @(posedge clk);
    exp_data = '0;
    if (rd && idx >= 0) begin exp_data = model[idx].data; model.delete(idx); end
    if (arr && !exp_drop) model.push_back('{ap, d});
    #1 in_valid = 1'b0; rd_req = 1'b0;
    if (rd) begin
      check(rd_valid == (idx >= 0), "rd_valid");
      check(rd_miss == (idx < 0), "rd_miss");
      if (idx >= 0) begin
        check(rd_data == exp_data, "rd_data oldest of port");
        check(rd_port_o == rp, "rd_port");
      end else miss_seen++;
    end else check(!rd_valid && !rd_miss, "no read result without request");
    if (extra_used) extra_seen++;
    if (main_full) full_seen++;
    compare_status();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1 compare_status();
    // fill past the regular entries into the spare one, then overflow
    for (int i = 0; i < DEPTH + EXTRA + 3; i++) step(1'b1, PORT_W'(i % 3), 1'b0, '0);
    check(drops_seen == 3, "exactly the three arrivals beyond 17 entries dropped");
    // arrival and read in the same cycle while completely full
    step(1'b1, 4'd9, 1'b1, 4'd1);
    // read everything back port by port (port 2 first)
    for (int i = 0; i < 8; i++) step(1'b0, '0, 1'b1, 4'd2);
    for (int i = 0; i < 12; i++) step(1'b0, '0, 1'b1, PORT_W'(i % 2 == 0 ? 0 : 1));
    step(1'b0, '0, 1'b1, 4'd9);
    // random traffic
    for (int n = 0; n < 4000; n++)
      step($urandom_range(0, 2) != 0, PORT_W'($urandom_range(0, 5)),
           $urandom_range(0, 1) == 1, PORT_W'($urandom_range(0, 6)));
    check(extra_seen > 0 && miss_seen > 0 && full_seen > 0, "spare entry, miss and full all exercised");
    $display("spare-entry cycles %0d, misses %0d, drops %0d", extra_seen, miss_seen, drops_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
