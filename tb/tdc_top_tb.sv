// tdc_top_tb: end-to-end test of the two-channel TDC at its default size
// (464-tap lines, 400 MHz clock, 16-bit counter, 64-word result memory).
//
// The behavioural delay lines use tdc_pkg::model_tap_delay_ps, so the test
// first loads both Maps with the calibration a perfect characterisation
// would give: entry c = delay of taps 0..c-1 plus half the delay of tap c.
// It then drives S1/S2 pulse pairs (2 ns wide) at random phases to the
// clock and compares every result with the interval it applied; the error
// allowed is 20 ps (half a bin on each line plus one bin of margin).
//
// Phases: the interval sweep 150..4000 ps in 50 ps steps; S1 and S2 caught
// by the same clock edge (T2 = 0); S2 slightly before S1 (negative T); an S2
// without S1 (ignored); an S1 without S2 (counter overflow, abort); the
// result memory filled past its 64 words (drop). It also counts samples with
// bubbles. Each mechanism must occur at least once. The write latency, 12
// clock edges after the edge that caught S2, is checked on every pair.
// Clock edges sit at half-picosecond times so that no tap switches exactly
// on an edge.
`timescale 1ps/100fs
module tdc_top_tb;
  import tdc_pkg::*;

  localparam int unsigned AW  = $clog2(N_TAPS + 1);
  localparam real         TCLK = 2500.0;
  localparam real         T0   = 1250.5;     // first rising edge
  localparam int          TOL  = 20;

  logic clk = 1'b0, rst = 1'b0, s1 = 1'b0, s2 = 1'b0;
  logic map_we = 1'b0, map_ch = 1'b0;
  logic [AW-1:0] map_addr = '0;
  logic [MAP_W-1:0] map_wdata = '0;
  logic rd_en = 1'b0;
  logic signed [TIME_W-1:0] rd_data;
  logic rd_empty, rd_full, meas_done, meas_abort, s2_ignored, mem_drop, armed, counting;
  logic [6:0] rd_count;
  logic cal_valid1, cal_valid2;
  logic [AW-1:0] cal_ones1, cal_ones2;

  tdc_top dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0, done_cyc = 0;
  int n_pairs = 0, n_same_edge = 0, n_negative = 0, n_multi = 0, n_ignored = 0;
  int n_abort = 0, n_drop = 0, n_bubble = 0, n_cal = 0;
  int err_sum = 0;
  int err_max = 0;

  initial begin
    #(T0);
    forever begin clk = 1'b1; #(TCLK/2); clk = 1'b0; #(TCLK/2); end
  end

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge meas_done) done_cyc = cyc;
  always @(posedge s2_ignored) n_ignored++;
  always @(posedge meas_abort) n_abort++;
  always @(posedge mem_drop) n_drop++;

  // A sample is bubbled when it is not the thermometer code of its ones.
  function automatic bit bubbled(logic [N_TAPS-1:0] c);
    int unsigned n = $countones(c);
    logic [N_TAPS-1:0] th = '0;
    for (int unsigned i = 0; i < n; i++) th[i] = 1'b1;
    return c != th;
  endfunction
  always @(posedge clk) if (bubbled(dut.u_dl1.therm) || bubbled(dut.u_dl2.therm)) n_bubble++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // Index (count of rising edges) of the edge that first sees a pulse that
  // starts at time t: the entry tap must have switched before that edge.
  function automatic int unsigned catch_edge(real t);
    real tf = t + real'(model_tap_delay_ps(0));
    int unsigned n = 1;
    while (T0 + TCLK * (n - 1) <= tf) n++;
    return n;
  endfunction

  task automatic pulse1(real at);
    #(at - $realtime) s1 = 1'b1;
    #2000 s1 = 1'b0;
  endtask
  task automatic pulse2(real at);
    #(at - $realtime) s2 = 1'b1;
    #2000 s2 = 1'b0;
  endtask

  task automatic wait_armed();
    do @(posedge clk); while (!armed);
  endtask

  // Apply one pair with S2 - S1 = t_ps, S1..S2 starting phase_ps after an edge.
  // With readout = 1 the result is popped and checked.
  task automatic pair(int t_ps, int unsigned phase_ps, bit readout);
    real base, ts1, ts2;
    int unsigned e1, e2, n0;
    int res, err;
    wait_armed();
    n0 = cyc;
    base = $realtime + real'(phase_ps) + 0.5;
    ts1 = (t_ps < 0) ? base - real'(t_ps) : base;
    ts2 = (t_ps < 0) ? base : base + real'(t_ps);
    e1 = catch_edge(ts1);
    e2 = catch_edge(ts2);
    fork
      pulse1(ts1);
      pulse2(ts2);
    join
    while (done_cyc <= n0) @(posedge clk);
    n_pairs++;
    if (e1 == e2) n_same_edge++;
    if (e2 > e1 + 1) n_multi++;
    if (t_ps < 0) n_negative++;
    check(done_cyc == ((e2 > e1) ? e2 : e1) + 12, $sformatf("latency T=%0d: %0d edges", t_ps, done_cyc - e2));
    if (readout) begin
      @(negedge clk);
      check(!rd_empty, "result written");
      res = rd_data;
      err = res - t_ps;
      if (err < 0) err = -err;
      err_sum += err;
      if (err > err_max) err_max = err;
      check(err <= TOL, $sformatf("T=%0d phase=%0d measured %0d", t_ps, phase_ps, res));
      rd_en = 1'b1;
      @(negedge clk);
      rd_en = 1'b0;
    end
  endtask

  always @(posedge clk) if (!rst) n_cal += int'(cal_valid1) + int'(cal_valid2);

  initial begin : main
    int unsigned cum;
    int k;
    #1 rst = 1'b1;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    // Calibration load: the ideal Map of the model line, for both encoders.
    for (int ch = 0; ch < 2; ch++) begin
      cum = 0;
      for (int unsigned c = 0; c < (1 << AW); c++) begin
        map_we    = 1'b1;
        map_ch    = ch[0];
        map_addr  = AW'(c);
        map_wdata = (c < N_TAPS) ? MAP_W'(cum + model_tap_delay_ps(c) / 2) : MAP_W'(cum);
        if (c < N_TAPS) cum += model_tap_delay_ps(c);
        @(negedge clk);
      end
    end
    map_we = 1'b0;

    // Interval sweep of the characterisation: 150 ps to 4000 ps, 50 ps steps.
    for (int t = 150; t <= 4000; t += 50)
      for (int r = 0; r < 2; r++) pair(t, $urandom_range(2499, 0), 1'b1);
    $display("sweep: %0d pairs, mean |error| %0d ps, max |error| %0d ps",
             n_pairs, int'(err_sum / n_pairs), err_max);
    // Same clock edge, and S2 before S1 within one edge.
    pair(150, 100, 1'b1);
    pair(-60, 200, 1'b1);
    // Longer intervals (several clock periods).
    pair(12345, 7, 1'b1);
    pair(250000, 1234, 1'b1);

    // S2 alone: ignored, nothing written.
    wait_armed();
    k = n_ignored;
    pulse2($realtime + 777.0);
    repeat (20) @(posedge clk);
    check(n_ignored == k + 1, "lone S2 ignored");
    check(rd_empty, "lone S2 writes nothing");

    // S1 alone: the counter overflows and the pair is abandoned.
    wait_armed();
    k = n_abort;
    pulse1($realtime + 333.0);
    repeat ((1 << CNT_W) + 20) @(posedge clk);
    check(n_abort == k + 1, "lone S1 aborted on overflow");
    check(rd_empty, "abort writes nothing");
    check(armed, "re-armed after abort");
    pair(1000, 500, 1'b1);

    // Fill the result memory and one more: that one is dropped.
    for (int i = 0; i < 65; i++) pair(1000 + 10 * i, $urandom_range(2499, 0), 1'b0);
    repeat (3) @(posedge clk);
    check(rd_full && rd_count == 64, "memory full");
    check(n_drop == 1, "65th result dropped");
    for (int i = 0; i < 64; i++) begin
      int e;
      @(negedge clk);
      e = rd_data - (1000 + 10 * i);
      check(e <= TOL && e >= -TOL, $sformatf("stored result %0d: %0d", i, rd_data));
      rd_en = 1'b1;
      @(negedge clk);
      rd_en = 1'b0;
    end
    @(negedge clk);
    check(rd_empty, "memory drained");

    $display("mechanisms: pairs=%0d same_edge=%0d multi_cycle=%0d negative=%0d ignored_s2=%0d abort=%0d drop=%0d bubbled_samples=%0d cal_outputs=%0d",
             n_pairs, n_same_edge, n_multi, n_negative, n_ignored, n_abort, n_drop, n_bubble, n_cal);
    check(n_same_edge > 0, "same-edge pair happened");
    check(n_multi > 0, "multi-cycle pair happened");
    check(n_negative > 0, "negative interval happened");
    check(n_ignored > 0, "ignored S2 happened");
    check(n_abort > 0, "overflow abort happened");
    check(n_drop > 0, "memory drop happened");
    check(n_bubble > 0, "bubbles happened");
    check(n_cal == 2 * n_pairs + 1, "raw counts reported for every accepted hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(TCLK * 400000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
