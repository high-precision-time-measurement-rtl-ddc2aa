// bit_counter: pipelined count of the ones in a delay-line code.
//
// A sampled code is only nearly thermometric: bubbles (isolated zeros behind
// the front or ones ahead of it) are common, so the position of the last one
// is not a reliable measure. This unit counts every one instead, which is
// exact whatever the pattern. As in the design description it is built from
// LUTs and fabric adders in several stages, with many blocks working in
// parallel in each stage, so that one code is accepted every clock cycle.
//
// Stage 0 splits the code into groups of GROUP bits (6, one LUT6 level) and
// registers the ones count of each group. Each further stage adds pairs of
// the previous stage's partial sums and registers them (a binary adder
// tree). The group size and the one-register-per-level pipelining are this
// design's choices.
//
// Interface: in_valid/therm in, out_valid/count out, LATENCY cycles later
// (1 + ceil(log2(number of groups)); 8 for 464 taps). Throughput: one code
// per cycle. No reset: the valid pipeline is reset, the data need none.
`timescale 1ps/1ps
module bit_counter #(
  parameter int unsigned N_TAPS = tdc_pkg::N_TAPS,
  parameter int unsigned GROUP  = 6,
  localparam int unsigned CW      = $clog2(N_TAPS + 1),
  localparam int unsigned NG      = (N_TAPS + GROUP - 1) / GROUP,
  localparam int unsigned LEVELS  = (NG > 1) ? $clog2(NG) : 0,
  localparam int unsigned LATENCY = 1 + LEVELS
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [N_TAPS-1:0] therm,
  output logic              out_valid,
  output logic [CW-1:0]     count
);
  // Number of partial sums held after level l.
  function automatic int unsigned nodes(int unsigned l);
    int unsigned n = NG;
    for (int unsigned k = 0; k < l; k++) n = (n + 1) / 2;
    return n;
  endfunction

  logic [CW-1:0] sum [LEVELS+1][NG];
  logic [LATENCY-1:0] vpipe;

  always_ff @(posedge clk) begin
    // Stage 0: ones count of each group of GROUP taps.
    for (int unsigned g = 0; g < NG; g++) begin
      logic [CW-1:0] c;
      c = '0;
      for (int unsigned b = 0; b < GROUP; b++)
        if (g * GROUP + b < N_TAPS) c = c + CW'(therm[g * GROUP + b]);
      sum[0][g] <= c;
    end
    // Adder tree.
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      for (int unsigned j = 0; j < NG; j++) begin
        if (j < nodes(l)) begin
          if (2 * j + 1 < nodes(l - 1)) sum[l][j] <= sum[l-1][2*j] + sum[l-1][2*j+1];
          else                          sum[l][j] <= sum[l-1][2*j];
        end else begin
          sum[l][j] <= '0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= LATENCY'({vpipe, in_valid});
  end

  assign count     = sum[LEVELS][0];
  assign out_valid = vpipe[LATENCY-1];
endmodule
