// tapped_delay_line: BEHAVIOURAL MODEL of one carry-chain delay line with its
// observation registers. Not synthesizable as a timing element: in the FPGA
// the line is 58 CARRY8 primitives placed by hand in one column of one clock
// region, with a flip-flop on every carry output. This model gives simulation
// the same function.
//
// The start level propagates through N_TAPS delay elements; tap i adds
// tdc_pkg::model_tap_delay_ps(i) picoseconds (2..10 ps, 6 ps on average, so
// 464 taps saturate after about 2.8 ns). On every rising clock edge the taps
// are copied into therm, bit 0 being the entry tap: the number of ones is how
// far the start edge travelled before the edge, i.e. the fraction of a clock
// period between the signal and the next rising edge.
//
// Bubbles: setup/hold violations near the propagating front make the sampled
// code non-thermometric. With BUBBLE_SPAN > 0 the model exchanges one filled
// tap just behind the front with one empty tap just ahead of it (each within
// BUBBLE_SPAN taps), on every sample that catches the front inside the line.
// The number of ones is kept, so an encoder that counts ones is exact while
// one that looks for the last one is not. The rate and shape of the bubbles
// are this model's choice.
//
// Interface: clk (sampling clock, the "stop" of the line), start (held input
// level), therm (registered code). Timing: therm changes only on clk rising.
`timescale 1ps/1ps
module tapped_delay_line #(
  parameter int unsigned N_TAPS      = tdc_pkg::N_TAPS,
  parameter int unsigned BUBBLE_SPAN = 4
) (
  input  logic              clk,
  input  logic              start,
  output logic [N_TAPS-1:0] therm
);
  logic [N_TAPS-1:0] tap;

  for (genvar i = 0; i < N_TAPS; i++) begin : g_tap
    localparam int unsigned D = tdc_pkg::model_tap_delay_ps(i);
    if (i == 0) begin : g_first
      assign #(D) tap[i] = start;
    end else begin : g_next
      assign #(D) tap[i] = tap[i-1];
    end
  end

  initial therm = '0;

  always @(posedge clk) begin : sample
    logic [N_TAPS-1:0] s;
    int unsigned ones, a, b;
    s = tap;
    ones = $countones(s);
    if (BUBBLE_SPAN > 0 && ones > 0 && ones < N_TAPS) begin
      a = $urandom_range(BUBBLE_SPAN - 1, 0);
      b = $urandom_range(BUBBLE_SPAN - 1, 0);
      if (a < ones && ones + b < N_TAPS && s[ones-1-a] && !s[ones+b]) begin
        s[ones-1-a] = 1'b0;
        s[ones+b]   = 1'b1;
      end
    end
    therm <= s;
  end
endmodule
