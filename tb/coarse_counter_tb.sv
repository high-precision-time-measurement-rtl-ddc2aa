// coarse_counter_tb: checks that the count equals the number of clock edges
// between the start strobe and the stop strobe (0 when both come in the same
// cycle), that done pulses one cycle after stop, that a stop without a start
// does nothing, and that a run longer than the counter ends in an overflow
// pulse (4-bit counter here).
`timescale 1ps/1ps
module coarse_counter_tb;
  localparam int unsigned CW = 4;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, stop = 1'b0;
  logic running, done, overflow;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;

  coarse_counter #(.CNT_W(CW)) dut (.*);

  always #1250 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // start in one cycle, stop gap cycles later
  task automatic run(int unsigned gap);
    @(negedge clk);
    start = 1'b1; stop = (gap == 0);
    @(negedge clk);
    start = 1'b0; stop = 1'b0;
    if (gap > 0) begin
      check(running && !done, "running after start");
      repeat (gap - 1) @(negedge clk);
      stop = 1'b1;
      @(negedge clk);
      stop = 1'b0;
    end
    check(done && !running && !overflow, $sformatf("done after gap %0d", gap));
    check(count == CW'(gap), $sformatf("count %0d for gap %0d", count, gap));
    @(negedge clk);
    check(!done && count == CW'(gap), "done is a pulse, count holds");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    stop = 1'b1; @(negedge clk); stop = 1'b0;
    check(!done && !running, "stop alone ignored");
    for (int unsigned g = 0; g < 15; g++) run(g);
    for (int k = 0; k < 30; k++) run($urandom_range(14, 0));
    // overflow
    @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    repeat (16) begin  // counts 0..15, the 16th edge overflows
      check(running && !overflow, "running before overflow");
      @(negedge clk);
    end
    check(overflow && !running && !done, "overflow pulse");
    @(negedge clk);
    check(!overflow, "overflow is a pulse");
    run(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
