// coarse_counter: counts whole clock periods between the S1 and S2 hits (T2).
//
// The counter is not free running: as in the design description it is
// enabled by S1 and disabled by S2. start is the strobe of the cycle in which
// line 1 first shows S1, stop the strobe of the cycle in which line 2 first
// shows S2. The count is the number of rising clock edges from the edge that
// caught S1 to the edge that caught S2, so T2 = count * Tclk; a stop in the
// same cycle as start gives 0. If the count would pass its maximum the run
// ends with an overflow pulse instead of a done pulse (this design's choice,
// so that an S1 without an S2 cannot hold the TDC forever).
//
// Interface: start/stop strobes in; running level, done and overflow
// pulses and count out. done and overflow come one cycle after the strobe
// or edge that causes them; count holds until the next start.
`timescale 1ps/1ps
module coarse_counter #(
  parameter int unsigned CNT_W = tdc_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             stop,
  output logic             running,
  output logic             done,
  output logic             overflow,
  output logic [CNT_W-1:0] count
);
  always_ff @(posedge clk) begin
    done     <= 1'b0;
    overflow <= 1'b0;
    if (rst) begin
      running <= 1'b0;
      count   <= '0;
    end else if (!running) begin
      if (start) begin
        count   <= '0;
        running <= !stop;
        done    <= stop;
      end
    end else if (&count) begin
      running  <= 1'b0;
      overflow <= 1'b1;
    end else if (stop) begin
      count   <= count + 1'b1;
      running <= 1'b0;
      done    <= 1'b1;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
