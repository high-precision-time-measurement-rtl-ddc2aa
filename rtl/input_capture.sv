// input_capture: holds a short input pulse as a level until it is cleared.
//
// The detector pulses are only 2 ns wide while the sampling clock period is
// 2.5 ns, so the pulse is caught by an edge-triggered element before it
// enters the delay line: stage 1 is set by the rising edge of the pad
// signal, and each further stage is set by the rising edge of the stage
// before it (the design description shows a 1st and a 2nd sampling stage
// between the pin and the delay-line entry; what each stage holds is this
// design's reading). Every stage has D tied high and an asynchronous clear.
//
// Interface: sig_in (pad pulse, asynchronous), clr (active high, from the
// clk domain of the processing unit), sig_out (held level, rises one stage
// delay per stage after sig_in, falls when clr rises).
// Timing: fully asynchronous; sig_out stays high until clr is asserted and
// ignores further edges on sig_in while high or while clr is held.
`timescale 1ps/1ps
module input_capture #(
  parameter int unsigned STAGES = 2
) (
  input  logic sig_in,
  input  logic clr,
  output logic sig_out
);
  logic [STAGES:0] lvl;
  assign lvl[0] = sig_in;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    // Power-up value 0, as the flop has after configuration: the clear is
    // edge-triggered in simulation, so a clear already high at time 0 would
    // otherwise leave a random start value in place.
    logic q = 1'b0;
    always_ff @(posedge lvl[i] or posedge clr) begin
      if (clr) q <= 1'b0;
      else     q <= 1'b1;
    end
    assign lvl[i+1] = q;
  end

  assign sig_out = lvl[STAGES];
endmodule
