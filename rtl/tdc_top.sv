// tdc_top: two-channel tapped-delay-line time-to-digital converter.
//
// Measures the interval T from the rising edge of S1 to the rising edge of
// S2 as T = T1 + T2 - T3. Delay line 1 measures T1, the time from S1 to the
// next rising edge of clk; delay line 2 measures T3, the time from S2 to the
// rising edge after it; the coarse counter measures T2, the whole clock
// periods between those two edges. Each channel is
//   pin -> input_capture (2 stages) -> tapped_delay_line (464 taps)
//       -> hit_detect -> tdc_encoder (bit counter + Map)
// and both channels and the counter meet in the processing unit, which
// writes T (signed ps) into result_mem. This structure, the 464-tap lines,
// the 400 MHz clock and the block-RAM Maps follow the design description;
// the hit detectors, the sequencing, the dead time and the memory form are
// this design's choices (see the modules).
//
// Interface: clk/rst (synchronous, active high; reset also clears the input
// captures and runs one dead time); s1/s2 asynchronous pulses; a Map write
// port (map_ch selects the encoder) for loading calibration; a FIFO read
// port for results; status pulses.
// Timing: meas_done and the write into result_mem come 12 clock edges after
// the edge that caught S2 (bit counter 8, Map 1, hand-over 1, calculation 2)
// and the TDC is armed again DEAD_CYCLES cycles later.
`timescale 1ps/1ps
module tdc_top
  import tdc_pkg::pu_state_e, tdc_pkg::PU_ARMED;
#(
  parameter int unsigned N_TAPS         = tdc_pkg::N_TAPS,
  parameter int unsigned CLK_PS         = tdc_pkg::CLK_PS,
  parameter int unsigned CAPTURE_STAGES = 2,
  parameter int unsigned CNT_W          = tdc_pkg::CNT_W,
  parameter int unsigned MAP_W          = tdc_pkg::MAP_W,
  parameter int unsigned TIME_W         = tdc_pkg::TIME_W,
  parameter int unsigned MEM_DEPTH      = 64,
  parameter int unsigned DEAD_CYCLES    = 3,
  parameter int unsigned HIT_TAPS       = tdc_pkg::TAPS_PER_CARRY8,
  parameter int unsigned BUBBLE_SPAN    = 4,
  localparam int unsigned AW  = $clog2(N_TAPS + 1),
  localparam int unsigned MAW = (MEM_DEPTH > 1) ? $clog2(MEM_DEPTH) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     s1,
  input  logic                     s2,
  // calibration Map loading
  input  logic                     map_we,
  input  logic                     map_ch,
  input  logic [AW-1:0]            map_addr,
  input  logic [MAP_W-1:0]         map_wdata,
  // result read-out
  input  logic                     rd_en,
  output logic signed [TIME_W-1:0] rd_data,
  output logic                     rd_empty,
  output logic [MAW:0]             rd_count,
  // status
  output logic                     meas_done,
  output logic                     meas_abort,
  output logic                     s2_ignored,
  output logic                     mem_drop,
  output logic                     rd_full,
  output logic                     armed,
  output logic                     counting,
  // raw bit count of every accepted hit, for the off-line calibration
  output logic                     cal_valid1,
  output logic [AW-1:0]            cal_ones1,
  output logic                     cal_valid2,
  output logic [AW-1:0]            cal_ones2
);
  logic                     clr1, clr2, lvl1, lvl2;
  logic [N_TAPS-1:0]        therm1, therm2;
  logic                     hit1, hit2, acc1, acc2;
  logic                     t1_valid, t3_valid;
  logic [MAP_W-1:0]         t1_ps, t3_ps;
  logic [AW-1:0]            ones1, ones2;
  logic                     cnt_running, cnt_done, cnt_overflow;
  logic [CNT_W-1:0]         cnt_value;
  logic                     mem_wr, mem_full;
  logic signed [TIME_W-1:0] mem_wdata;
  pu_state_e                state;

  // Channel 1: S1 -> DL1 -> T1
  input_capture #(.STAGES(CAPTURE_STAGES)) u_cap1 (.sig_in(s1), .clr(clr1), .sig_out(lvl1));
  tapped_delay_line #(.N_TAPS(N_TAPS), .BUBBLE_SPAN(BUBBLE_SPAN)) u_dl1 (.clk, .start(lvl1), .therm(therm1));
  hit_detect #(.HIT_TAPS(HIT_TAPS)) u_hit1 (.clk, .rst, .entry_taps(therm1[HIT_TAPS-1:0]), .hit(hit1));
  tdc_encoder #(.N_TAPS(N_TAPS), .MAP_W(MAP_W)) u_enc1 (
    .clk, .rst, .in_valid(acc1), .therm(therm1),
    .out_valid(t1_valid), .fine_ps(t1_ps), .ones(ones1),
    .map_we(map_we && !map_ch), .map_addr, .map_wdata
  );

  // Channel 2: S2 -> DL2 -> T3
  input_capture #(.STAGES(CAPTURE_STAGES)) u_cap2 (.sig_in(s2), .clr(clr2), .sig_out(lvl2));
  tapped_delay_line #(.N_TAPS(N_TAPS), .BUBBLE_SPAN(BUBBLE_SPAN)) u_dl2 (.clk, .start(lvl2), .therm(therm2));
  hit_detect #(.HIT_TAPS(HIT_TAPS)) u_hit2 (.clk, .rst, .entry_taps(therm2[HIT_TAPS-1:0]), .hit(hit2));
  tdc_encoder #(.N_TAPS(N_TAPS), .MAP_W(MAP_W)) u_enc2 (
    .clk, .rst, .in_valid(acc2), .therm(therm2),
    .out_valid(t3_valid), .fine_ps(t3_ps), .ones(ones2),
    .map_we(map_we && map_ch), .map_addr, .map_wdata
  );

  // Coarse synchronous counter: T2
  coarse_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst, .start(acc1), .stop(acc2),
    .running(cnt_running), .done(cnt_done), .overflow(cnt_overflow), .count(cnt_value)
  );

  // Eq. 1 and sequencing
  processing_unit #(
    .CLK_PS(CLK_PS), .CNT_W(CNT_W), .MAP_W(MAP_W), .TIME_W(TIME_W), .DEAD_CYCLES(DEAD_CYCLES)
  ) u_pu (
    .clk, .rst, .hit1, .hit2, .acc1, .acc2,
    .cnt_done, .cnt_overflow, .cnt_value,
    .t1_valid, .t1_ps, .t3_valid, .t3_ps,
    .clr1, .clr2, .mem_wr, .mem_wdata,
    .meas_done, .meas_abort, .s2_ignored, .state
  );

  // MEM
  result_mem #(.DEPTH(MEM_DEPTH), .W(TIME_W)) u_mem (
    .clk, .rst, .wr_en(mem_wr), .wr_data(mem_wdata),
    .rd_en, .rd_data(rd_data), .empty(rd_empty), .full(mem_full), .count(rd_count), .drop(mem_drop)
  );

  assign armed      = (state == PU_ARMED);
  assign counting   = cnt_running;
  assign rd_full    = mem_full;
  assign cal_valid1 = t1_valid;
  assign cal_ones1  = ones1;
  assign cal_valid2 = t3_valid;
  assign cal_ones2  = ones2;
endmodule
