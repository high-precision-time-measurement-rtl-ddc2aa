// tapped_delay_line_tb: checks the behavioural delay line against the tap
// delays of tdc_pkg. For start levels applied at many phases before a clock
// edge, the number of ones sampled must equal the number of taps whose
// cumulative delay is below the time from start to edge; without bubbles
// the code must be thermometric, with bubbles it must keep the same count
// and bubbles must appear. It also checks that the full line saturates
// after about 2.8 ns and drains when start falls.
`timescale 1ps/100fs
module tapped_delay_line_tb;
  import tdc_pkg::*;
  localparam int unsigned N = N_TAPS;
  logic clk = 1'b0, start_a = 1'b0, start_b = 1'b0;
  logic [N-1:0] therm_a, therm_b;
  int checks = 0, failures = 0, bubbles = 0;
  int unsigned cum [N+1];

  tapped_delay_line #(.N_TAPS(N), .BUBBLE_SPAN(0)) u_clean  (.clk, .start(start_a), .therm(therm_a));
  tapped_delay_line #(.N_TAPS(N), .BUBBLE_SPAN(4)) u_bubbly (.clk, .start(start_b), .therm(therm_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  function automatic logic [N-1:0] thermo(int unsigned n);
    logic [N-1:0] t = '0;
    for (int unsigned i = 0; i < n; i++) t[i] = 1'b1;
    return t;
  endfunction

  function automatic int unsigned expect_ones(int unsigned dt);
    int unsigned n = 0;
    while (n < N && cum[n+1] <= dt) n++;
    return n;
  endfunction

  initial begin
    int unsigned dt, e;
    cum[0] = 0;
    for (int unsigned i = 0; i < N; i++) cum[i+1] = cum[i] + model_tap_delay_ps(i);
    check(cum[N] > 2700 && cum[N] < 2900, $sformatf("line length %0d ps near 2.8 ns", cum[N]));
    #1000;
    for (int k = 0; k < 200; k++) begin
      dt = (k < 100) ? 25 * k + 1 : $urandom_range(2999, 1);
      // start dt ps before the next edge at 5000.5 ps from now
      // start at an integer time, the edge dt + 0.5 ps later
      #(5000 - dt);
      start_a = 1'b1; start_b = 1'b1;
      #(real'(dt) + 0.5); clk = 1'b1;
      #1;
      e = expect_ones(dt);
      check(therm_a == thermo(e), $sformatf("clean code for dt=%0d: %0d ones, expected %0d", dt, $countones(therm_a), e));
      check($countones(therm_b) == e, $sformatf("bubbled count for dt=%0d", dt));
      if (therm_b != thermo(e)) bubbles++;
      #1249 clk = 1'b0;
      #1250 clk = 1'b1;
      #1 check(dt + 2500 < cum[N] ? $countones(therm_a) == expect_ones(dt + 2500) : therm_a == '1,
               "second edge sample");
      start_a = 1'b0; start_b = 1'b0;
      #1249 clk = 1'b0;
      #3000 clk = 1'b1;
      #1 check(therm_a == '0 && therm_b == '0, "drained");
      #1249 clk = 1'b0;
      #0.5;
    end
    check(bubbles > 0, "bubbles modelled");
    $display("bubbled samples: %0d", bubbles);
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
