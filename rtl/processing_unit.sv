// processing_unit: pairs an S1 hit with an S2 hit and computes Eq. 1,
// T = T1 + T2 - T3, inside the FPGA, then writes T to the result memory.
//
// T1 and T3 are the fine times of the two delay lines (signal arrival to the
// next rising clock edge) and T2 = N * Tclk, N being the coarse count between
// the two edges that caught the signals. The product N * CLK_PS is the one
// multiplication of the design (one DSP slice); it is registered together
// with T1 - T3 and the sum is written one cycle later. Results are signed ps.
//
// Sequencing is this design's own, the design description giving only the
// function. In PU_ARMED a hit on line 1 is accepted (acc1 starts the
// counter and tags line 1's code for its encoder); a hit on line 2 is
// accepted in the same cycle or later in PU_RUN (acc2 stops the counter). A
// line-2 hit with no line-1 hit pending is not part of a pair: it is reported
// on s2_ignored and only line 2 is cleared. When the coarse count and both
// fine times are in (PU_WAIT) the result is computed (PU_CALC) and written.
// Afterwards, or after a counter overflow (meas_abort, nothing written), both
// input capture stages are held clear for DEAD_CYCLES cycles (PU_CLEAR) so
// that the lines drain before the next pair: that is the dead time.
//
// Interface: hit strobes in, acc strobes out (combinational, same cycle);
// clr1/clr2 registered; mem_wr/mem_wdata and the status pulses registered.
`timescale 1ps/1ps
module processing_unit
  import tdc_pkg::pu_state_e, tdc_pkg::PU_ARMED, tdc_pkg::PU_RUN, tdc_pkg::PU_WAIT, tdc_pkg::PU_CALC, tdc_pkg::PU_CLEAR;
#(
  parameter int unsigned CLK_PS      = tdc_pkg::CLK_PS,
  parameter int unsigned CNT_W       = tdc_pkg::CNT_W,
  parameter int unsigned MAP_W       = tdc_pkg::MAP_W,
  parameter int unsigned TIME_W      = tdc_pkg::TIME_W,
  parameter int unsigned DEAD_CYCLES = 3
) (
  input  logic                     clk,
  input  logic                     rst,
  // hits found by the two hit detectors
  input  logic                     hit1,
  input  logic                     hit2,
  output logic                     acc1,
  output logic                     acc2,
  // coarse counter
  input  logic                     cnt_done,
  input  logic                     cnt_overflow,
  input  logic [CNT_W-1:0]         cnt_value,
  // fine times from the encoders
  input  logic                     t1_valid,
  input  logic [MAP_W-1:0]         t1_ps,
  input  logic                     t3_valid,
  input  logic [MAP_W-1:0]         t3_ps,
  // input capture clears
  output logic                     clr1,
  output logic                     clr2,
  // result memory
  output logic                     mem_wr,
  output logic signed [TIME_W-1:0] mem_wdata,
  // status
  output logic                     meas_done,
  output logic                     meas_abort,
  output logic                     s2_ignored,
  output pu_state_e                state
);
  localparam int unsigned DW = (DEAD_CYCLES > 1) ? $clog2(DEAD_CYCLES + 1) : 1;

  logic [DW-1:0]            dead1, dead2;
  logic                     got1, got3, gotn;
  logic [MAP_W-1:0]         t1_q, t3_q;
  logic [CNT_W-1:0]         n_q;
  logic signed [TIME_W-1:0] prod_q, diff_q;
  logic                     calc_q;

  assign acc1 = (state == PU_ARMED) && hit1;
  assign acc2 = ((state == PU_ARMED) && hit1 && hit2) || ((state == PU_RUN) && hit2);

  always_ff @(posedge clk) begin
    mem_wr     <= 1'b0;
    meas_done  <= 1'b0;
    meas_abort <= 1'b0;
    s2_ignored <= 1'b0;
    if (dead1 != 0) dead1 <= dead1 - 1'b1;
    if (dead2 != 0) dead2 <= dead2 - 1'b1;
    if (t1_valid) begin t1_q <= t1_ps; got1 <= 1'b1; end
    if (t3_valid) begin t3_q <= t3_ps; got3 <= 1'b1; end
    if (cnt_done) begin n_q <= cnt_value; gotn <= 1'b1; end
    calc_q <= 1'b0;

    if (rst) begin
      state  <= PU_CLEAR;
      dead1  <= DW'(DEAD_CYCLES);
      dead2  <= DW'(DEAD_CYCLES);
      got1   <= 1'b0;
      got3   <= 1'b0;
      gotn   <= 1'b0;
    end else begin
      unique case (state)
        PU_ARMED: begin
          if (hit1)             state <= hit2 ? PU_WAIT : PU_RUN;
          else if (hit2) begin
            s2_ignored <= 1'b1;
            dead2      <= DW'(DEAD_CYCLES);
          end
        end
        PU_RUN: begin
          if (cnt_overflow) begin
            meas_abort <= 1'b1;
            state      <= PU_CLEAR;
            dead1      <= DW'(DEAD_CYCLES);
            dead2      <= DW'(DEAD_CYCLES);
          end else if (hit2) begin
            state <= PU_WAIT;
          end
        end
        PU_WAIT: begin
          if (got1 && got3 && gotn) begin
            prod_q <= TIME_W'(n_q) * TIME_W'(CLK_PS);
            diff_q <= TIME_W'(t1_q) - TIME_W'(t3_q);
            calc_q <= 1'b1;
            state  <= PU_CALC;
          end
        end
        PU_CALC: begin
          if (calc_q) begin
            mem_wr    <= 1'b1;
            mem_wdata <= prod_q + diff_q;
            meas_done <= 1'b1;
            state     <= PU_CLEAR;
            dead1     <= DW'(DEAD_CYCLES);
            dead2     <= DW'(DEAD_CYCLES);
          end
        end
        PU_CLEAR: begin
          got1 <= 1'b0;
          got3 <= 1'b0;
          gotn <= 1'b0;
          if (dead1 <= 1 && dead2 <= 1) state <= PU_ARMED;
        end
        default: state <= PU_CLEAR;
      endcase
    end
  end

  // A clear is held while its dead-time counter runs, and during reset.
  assign clr1 = rst || (dead1 != 0);
  assign clr2 = rst || (dead2 != 0);

  // Only one pair is in flight: acc2 never comes before acc1.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(acc2 && !acc1 && state != PU_RUN))
      else $error("processing_unit: S2 accepted without S1");
  end
endmodule
