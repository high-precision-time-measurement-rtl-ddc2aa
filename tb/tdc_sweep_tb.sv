// tdc_sweep_tb: the characterisation workloads of the TDC, at the default
// size. For every interval from 150 ps to 4000 ps in 50 ps steps it applies
// 40 S1/S2 pairs at random phases to the clock (the hardware
// characterisation used 100,000 pairs per step), and then 1000 pairs of
// 2200 ps (the single-interval histogram). Per step it computes the mean and
// the median of the measured values and checks that each lies within 5 ps
// of the applied interval and that no single result is off by more than
// 20 ps. The Maps are loaded with the exact calibration of the model lines,
// so the spread seen here is the quantisation of the two lines only.
`timescale 1ps/100fs
module tdc_sweep_tb;
  import tdc_pkg::*;

  localparam int unsigned AW    = $clog2(N_TAPS + 1);
  localparam real         TCLK  = 2500.0;
  localparam real         T0    = 1250.5;
  localparam int          PAIRS = 40;

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

  initial begin
    #(T0);
    forever begin clk = 1'b1; #(TCLK/2); clk = 1'b0; #(TCLK/2); end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  task automatic pulse1(real at);
    #(at - $realtime) s1 = 1'b1;
    #2000 s1 = 1'b0;
  endtask
  task automatic pulse2(real at);
    #(at - $realtime) s2 = 1'b1;
    #2000 s2 = 1'b0;
  endtask

  // One pair, S2 t_ps after S1, S1 phase_ps after a clock edge; returns T.
  task automatic pair(int t_ps, int unsigned phase_ps, output int res);
    real ts1;
    do @(posedge clk); while (!armed);
    ts1 = $realtime + real'(phase_ps) + 0.5;
    fork
      pulse1(ts1);
      pulse2(ts1 + real'(t_ps));
    join
    while (rd_empty) @(negedge clk);
    res = rd_data;
    rd_en = 1'b1;
    @(negedge clk);
    rd_en = 1'b0;
  endtask

  // Run n pairs of t_ps; check mean and median; return the extremes.
  task automatic step(int t_ps, int n, output int mean_err, output int med_err,
                      output int lo, output int hi);
    int v [$];
    longint sum = 0;
    int r;
    lo = 32'h7fffffff; hi = -32'h7fffffff;
    for (int i = 0; i < n; i++) begin
      pair(t_ps, $urandom_range(2499, 0), r);
      v.push_back(r);
      sum += longint'(r);
      if (r < lo) lo = r;
      if (r > hi) hi = r;
    end
    v.sort();
    mean_err = int'(sum / longint'(n)) - t_ps;
    med_err  = v[n / 2] - t_ps;
    check(mean_err <= 5 && mean_err >= -5, $sformatf("mean at %0d ps: error %0d", t_ps, mean_err));
    check(med_err <= 5 && med_err >= -5, $sformatf("median at %0d ps: error %0d", t_ps, med_err));
    check(lo >= t_ps - 20 && hi <= t_ps + 20, $sformatf("range at %0d ps: %0d..%0d", t_ps, lo, hi));
  endtask

  initial begin : main
    int unsigned cum;
    int me, md, lo, hi, worst_mean = 0, worst_med = 0, steps = 0;
    longint abs_mean = 0, abs_med = 0;
    #1 rst = 1'b1;
    repeat (5) @(negedge clk);
    rst = 1'b0;
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

    for (int t = 150; t <= 4000; t += 50) begin
      step(t, PAIRS, me, md, lo, hi);
      steps++;
      abs_mean += longint'((me < 0) ? -me : me);
      abs_med  += longint'((md < 0) ? -md : md);
      if ((me < 0 ? -me : me) > worst_mean) worst_mean = (me < 0) ? -me : me;
      if ((md < 0 ? -md : md) > worst_med) worst_med = (md < 0) ? -md : md;
    end
    $display("sweep 150..4000 ps, %0d steps x %0d pairs: mean error avg %0d ps max %0d ps, median error avg %0d ps max %0d ps",
             steps, PAIRS, int'(abs_mean / steps), worst_mean, int'(abs_med / steps), worst_med);
    step(2200, 1000, me, md, lo, hi);
    $display("2200 ps x 1000: mean error %0d ps, median error %0d ps, range %0d..%0d ps", me, md, lo, hi);
    check(!meas_abort && !mem_drop, "no abort or drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(TCLK * 2000000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
