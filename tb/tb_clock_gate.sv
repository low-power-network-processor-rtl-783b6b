// tb_clock_gate: checks that the gated clock follows the clock while enabled,
// stays low while disabled, and that an enable change made during the high
// phase only takes effect at the next rising edge (no shortened pulses).
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int gedges = 0;

  clock_gate dut (.clk_i(clk), .en_i(en), .gclk_o(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    // disabled: no edges
    repeat (5) @(posedge clk);
    check(gedges == 0, "no gated edges while disabled");
    // enable in the low phase: the next edges pass
    @(negedge clk); en = 1'b1;
    @(posedge clk); #1;
    check(gclk == 1'b1, "gated clock high with clock");
    repeat (9) @(posedge clk);
    #1 check(gedges == 10, "ten gated edges in ten cycles");
    // drop the enable in the high phase: the high phase completes intact
    en = 1'b0;
    #1 check(gclk == 1'b1, "high phase not cut short");
    @(negedge clk); #1 check(gclk == 1'b0, "low with clock");
    @(posedge clk); #1 check(gclk == 1'b0, "stopped at next edge");
    repeat (5) @(posedge clk);
    check(gedges == 10, "no more edges once disabled");
    // raise the enable in the high phase: nothing until the next low phase
    #1 en = 1'b1;
    #1 check(gclk == 1'b0, "no pulse from an enable raised in the high phase");
    @(posedge clk); #1 check(gclk == 1'b1, "restarted at following edge");
    check(gedges == 11, "one more edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
