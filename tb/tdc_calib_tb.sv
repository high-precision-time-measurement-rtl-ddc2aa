// tdc_calib_tb: runs the calibration procedure of the TDC through its own
// ports and then measures with the result.
//
// Calibration: both lines receive their signal at a time before a clock
// edge that is stepped from 5 ps to 2495 ps in 10 ps steps, as in a
// characterisation with precisely offset signal pairs. For every step the raw
// ones count of each line (cal_ones1, cal_ones2) is recorded with the known
// time to the edge. The Map entry for count c is the mean of the times that
// gave c; counts never seen (bins narrower than a step) are interpolated
// linearly between their neighbours, with count 0 anchored at 0 ps. The
// tables are written through the Map write port.
// Measurement: 200 pairs with random intervals from 150 ps to 4000 ps at
// random phases. Every result must be within 25 ps of the interval, and the
// mean absolute error must be below 10 ps. Nothing here uses the model's
// tap delays directly.
`timescale 1ps/100fs
module tdc_calib_tb;
  import tdc_pkg::*;

  localparam int unsigned AW   = $clog2(N_TAPS + 1);
  localparam int unsigned NC   = 1 << AW;
  localparam real         TCLK = 2500.0;
  localparam real         T0   = 1250.5;

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
  int unsigned last_ones1 = 0, last_ones2 = 0, n_cal1 = 0, n_cal2 = 0;

  initial begin
    #(T0);
    forever begin clk = 1'b1; #(TCLK/2); clk = 1'b0; #(TCLK/2); end
  end

  always @(posedge clk) begin
    if (!rst && cal_valid1) begin last_ones1 = cal_ones1; n_cal1++; end
    if (!rst && cal_valid2) begin last_ones2 = cal_ones2; n_cal2++; end
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

  task automatic pop(output int res);
    while (rd_empty) @(negedge clk);
    res = rd_data;
    rd_en = 1'b1;
    @(negedge clk);
    rd_en = 1'b0;
  endtask

  // Linear interpolation over the counts that were seen.
  task automatic build(ref real sum [NC], ref int unsigned n [NC], ref int unsigned tab [NC]);
    int lo_c = 0;
    real lo_t = 0.0;
    for (int c = 1; c < NC; c++) begin
      if (n[c] > 0) begin
        real t = sum[c] / real'(n[c]);
        for (int k = lo_c + 1; k < c; k++)
          tab[k] = int'(lo_t + (t - lo_t) * real'(k - lo_c) / real'(c - lo_c));
        tab[c] = int'(t);
        lo_c = c;
        lo_t = t;
      end
    end
    for (int k = lo_c + 1; k < NC; k++) tab[k] = int'(lo_t);
    tab[0] = 0;
  endtask

  initial begin : main
    real sum1 [NC], sum2 [NC];
    int unsigned n1 [NC], n2 [NC], tab1 [NC], tab2 [NC];
    int unsigned seen1, seen2;
    int res, err, t_ps;
    longint abs_sum = 0;
    real te, ts;
    for (int c = 0; c < NC; c++) begin sum1[c] = 0.0; sum2[c] = 0.0; n1[c] = 0; n2[c] = 0; end
    #1 rst = 1'b1;
    repeat (5) @(negedge clk);
    rst = 1'b0;

    // Calibration sweep: time to the edge 5, 15, ..., 2495 ps on both lines.
    for (int tte = 5; tte < 2500; tte += 10) begin
      do @(posedge clk); while (!armed);
      te = $realtime;
      ts = te + TCLK - real'(tte);
      fork
        pulse1(ts);
        pulse2(ts);
      join
      pop(res);
      check(n_cal1 == n_cal2, "one raw count per line");
      sum1[last_ones1] += real'(tte); n1[last_ones1]++;
      sum2[last_ones2] += real'(tte); n2[last_ones2]++;
    end
    seen1 = 0; seen2 = 0;
    for (int c = 0; c < NC; c++) begin
      if (n1[c] > 0) seen1++;
      if (n2[c] > 0) seen2++;
    end
    $display("calibration: 250 offsets, %0d counts seen on line 1, %0d on line 2", seen1, seen2);
    check(seen1 > 150 && seen2 > 150, "calibration covers the line");
    build(sum1, n1, tab1);
    build(sum2, n2, tab2);
    for (int ch = 0; ch < 2; ch++)
      for (int c = 0; c < NC; c++) begin
        @(negedge clk);
        map_we = 1'b1; map_ch = ch[0]; map_addr = AW'(c);
        map_wdata = MAP_W'((ch == 0) ? tab1[c] : tab2[c]);
      end
    @(negedge clk);
    map_we = 1'b0;

    // Measurement with the calibrated Maps.
    for (int i = 0; i < 200; i++) begin
      t_ps = $urandom_range(4000, 150);
      do @(posedge clk); while (!armed);
      ts = $realtime + real'($urandom_range(2499, 0)) + 0.5;
      fork
        pulse1(ts);
        pulse2(ts + real'(t_ps));
      join
      pop(res);
      err = res - t_ps;
      if (err < 0) err = -err;
      abs_sum += longint'(err);
      check(err <= 25, $sformatf("T=%0d measured %0d", t_ps, res));
    end
    $display("200 pairs with the calibrated Maps: mean |error| %0d ps", int'(abs_sum / 200));
    check(abs_sum / 200 < 10, "mean error below 10 ps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(TCLK * 500000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
