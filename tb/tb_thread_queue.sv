// tb_thread_queue: random pushes and pops against a reference queue.
// Checks the head, the occupancy and the empty/full flags every cycle, fills
// the queue to its 24 entries and empties it again.
module tb_thread_queue;
  localparam int unsigned DEPTH = 24;
  localparam int unsigned ID_W  = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  logic [ID_W-1:0] push_id = '0, head;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic empty, full;
  int checks = 0, failures = 0;
  logic [ID_W-1:0] model [$];

  thread_queue #(.DEPTH(DEPTH), .ID_W(ID_W)) dut (
    .clk, .rst_n, .push_i(push), .push_id_i(push_id), .pop_i(pop),
    .head_o(head), .count_o(count), .empty_o(empty), .full_o(full));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic compare();
    check(count == model.size(), "count");
    check(empty == (model.size() == 0), "empty");
    check(full == (model.size() == DEPTH), "full");
    if (model.size() != 0) check(head == model[0], "head");
  endtask

  task automatic step(bit do_push, bit do_pop, logic [ID_W-1:0] id);
    push = do_push; pop = do_pop; push_id = id;
    @(posedge clk);
    if (do_pop && model.size() != 0) void'(model.pop_front());
    if (do_push) model.push_back(id);
    #1 push = 1'b0; pop = 1'b0;
    compare();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1 compare();
    // fill completely
    for (int i = 0; i < DEPTH; i++) step(1'b1, 1'b0, ID_W'(i));
    check(full, "full after 24 pushes");
    // push and pop together while full
    step(1'b1, 1'b1, ID_W'(7));
    // drain completely
    for (int i = 0; i < DEPTH; i++) step(1'b0, 1'b1, '0);
    check(empty, "empty after drain");
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      bit pu, po;
      pu = ($urandom_range(0, 1) == 1) && (model.size() < DEPTH);
      po = ($urandom_range(0, 1) == 1) && (model.size() > 0);
      step(pu, po, ID_W'($urandom_range(0, DEPTH - 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
