// hit_detect: finds the clock edge at which a signal is first seen in a
// delay line.
//
// The entry cells of the line are its first HIT_TAPS observation registers
// (one carry block). hit is high for the one cycle in which the sampled code
// shows a filled entry cell after a sample with all entry cells empty. The
// coarse counter is started and stopped by this strobe and the same strobe
// tags the code for the encoder, so the counter and the delay line always
// agree on which clock edge caught the signal. The design description
// removes the one-clock disagreement between counter and line by placing
// the counter flops next to the line's entry cells; deriving the counter's
// enable from the entry cells themselves is this design's way of getting the
// same agreement in logic.
//
// Interface: entry_taps (the first HIT_TAPS bits of the registered code of
// the line), hit (combinational from entry_taps and one register). Reset
// leaves the detector waiting for an empty sample first, so a line still
// full at reset gives no hit.
`timescale 1ps/1ps
module hit_detect #(
  parameter int unsigned HIT_TAPS = tdc_pkg::TAPS_PER_CARRY8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [HIT_TAPS-1:0] entry_taps,
  output logic                hit
);
  logic entry, entry_q;

  assign entry = |entry_taps;

  always_ff @(posedge clk) begin
    if (rst) entry_q <= 1'b1;
    else     entry_q <= entry;
  end

  assign hit = entry && !entry_q;
endmodule
