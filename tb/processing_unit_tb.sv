// processing_unit_tb: drives the processing unit with hit strobes and with
// fine times and coarse counts that the test itself produces with the
// timing of the real encoders (9 cycles) and counter (1 cycle), then checks:
// the result T = T1 + N * 2500 - T3 for random pairs (including N = 0 and
// negative results), the write and done pulses, that acc1/acc2 accept only
// the pairing hits, that a lone S2 is reported and cleared without a write,
// that a counter overflow aborts without a write, and that both clears are
// held for exactly DEAD_CYCLES = 3 cycles before the unit is armed again.
`timescale 1ps/1ps
module processing_unit_tb;
  import tdc_pkg::pu_state_e, tdc_pkg::PU_ARMED;
  localparam int unsigned DEAD = 3, ENC_LAT = 9;
  logic clk = 1'b0, rst = 1'b1, hit1 = 1'b0, hit2 = 1'b0, acc1, acc2;
  logic cnt_done = 1'b0, cnt_overflow = 1'b0;
  logic [15:0] cnt_value = '0;
  logic t1_valid = 1'b0, t3_valid = 1'b0;
  logic [15:0] t1_ps = '0, t3_ps = '0;
  logic clr1, clr2, mem_wr, meas_done, meas_abort, s2_ignored;
  logic signed [31:0] mem_wdata;
  pu_state_e state;
  int checks = 0, failures = 0;

  processing_unit #(.CLK_PS(2500), .DEAD_CYCLES(DEAD)) dut (.*);

  always #1250 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Encoder and counter stand-ins.
  int unsigned cyc = 0, acc1_cyc = 0;
  int unsigned f1 = 0, f3 = 0;
  int unsigned t1_due = 0, t3_due = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    t1_valid <= (cyc + 1 == t1_due);
    t3_valid <= (cyc + 1 == t3_due);
    cnt_done <= acc2;
    if (cyc + 1 == t1_due) t1_ps <= 16'(f1);
    if (cyc + 1 == t3_due) t3_ps <= 16'(f3);
    if (acc1) begin acc1_cyc = cyc; t1_due = cyc + ENC_LAT; end
    if (acc2) cnt_value <= 16'(cyc - acc1_cyc);
    if (acc2) t3_due = cyc + ENC_LAT;
  end

  task automatic wait_armed();
    while (state != PU_ARMED) @(negedge clk);
  endtask

  // One pair: hit1, then hit2 gap cycles later; returns after the write.
  task automatic pair(int unsigned gap, int unsigned a, int unsigned b);
    int expected, w;
    wait_armed();
    f1 = a; f3 = b;
    hit1 = 1'b1; hit2 = (gap == 0);
    #1 check(acc1 && (acc2 == (gap == 0)), "hit1 accepted");
    @(negedge clk);
    hit1 = 1'b0; hit2 = 1'b0;
    if (gap > 0) begin
      repeat (gap - 1) @(negedge clk);
      hit1 = 1'b1;  // a second S1 hit while running is not accepted
      hit2 = 1'b1;
      #1 check(acc2 && !acc1, "hit2 accepted, extra hit1 not");
      @(negedge clk);
      hit1 = 1'b0; hit2 = 1'b0;
    end
    expected = int'(a) + int'(gap) * 2500 - int'(b);
    w = 0;
    while (!mem_wr && w < 40) begin @(negedge clk); w++; end
    check(w == ENC_LAT + 2, $sformatf("write %0d cycles after S2", w + 1));
    check(mem_wr && meas_done && mem_wdata == expected,
          $sformatf("T for gap %0d, %0d, %0d: %0d expected %0d", gap, a, b, mem_wdata, expected));
    // dead time: clears held DEAD cycles, then armed
    for (int unsigned d = 0; d < DEAD; d++) begin
      check(clr1 && clr2 && state != PU_ARMED, $sformatf("clear held, cycle %0d", d));
      @(negedge clk);
    end
    check(!clr1 && !clr2 && state == PU_ARMED, "armed after dead time");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(clr1 && clr2, "clear during reset");
    rst = 1'b0;
    pair(1, 1000, 200);
    pair(0, 100, 900);     // same edge, negative result
    pair(0, 1500, 1200);
    pair(7, 0, 2500);
    for (int k = 0; k < 40; k++) pair($urandom_range(30, 0), $urandom_range(2800, 0), $urandom_range(2800, 0));
    // lone S2
    wait_armed();
    hit2 = 1'b1;
    #1 check(!acc1 && !acc2, "lone S2 not accepted");
    @(negedge clk); hit2 = 1'b0;
    check(s2_ignored && clr2 && !clr1 && state == PU_ARMED, "lone S2 reported, only line 2 cleared");
    repeat (DEAD) @(negedge clk);
    check(!clr2, "line 2 re-armed");
    // overflow abort
    hit1 = 1'b1; @(negedge clk); hit1 = 1'b0;
    repeat (20) @(negedge clk);
    cnt_overflow = 1'b1; @(negedge clk); cnt_overflow = 1'b0;
    check(meas_abort && !mem_wr && clr1 && clr2, "overflow aborts");
    repeat (DEAD) @(negedge clk);
    check(state == PU_ARMED, "armed after abort");
    pair(2, 10, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (mem_wr) check(meas_done, "done with write");

  initial begin : watchdog
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
