// tdc_encoder: converts a sampled delay-line code into a fine time in ps.
//
// As in the design description the encoder is a bit counter followed by the
// Map: the bit counter counts the filled taps (bubble tolerant) and the Map
// turns that count into the calibrated time between the signal's arrival at
// the line and the sampling clock edge (T1 for line 1, T3 for line 2).
//
// The encoder runs on every clock cycle; in_valid marks the one code that
// belongs to an accepted hit and travels beside it, so out_valid marks the
// matching fine time. Latency: bit_counter LATENCY + 1 (Map read) cycles,
// 9 at the default size. The Map write port is brought out for loading the
// calibration.
`timescale 1ps/1ps
module tdc_encoder #(
  parameter int unsigned N_TAPS      = tdc_pkg::N_TAPS,
  parameter int unsigned MAP_W       = tdc_pkg::MAP_W,
  parameter int unsigned DL_RANGE_PS = tdc_pkg::DL_RANGE_PS,
  localparam int unsigned AW = $clog2(N_TAPS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [N_TAPS-1:0] therm,
  output logic              out_valid,
  output logic [MAP_W-1:0]  fine_ps,
  output logic [AW-1:0]     ones,
  input  logic              map_we,
  input  logic [AW-1:0]     map_addr,
  input  logic [MAP_W-1:0]  map_wdata
);
  logic          bc_valid;
  logic [AW-1:0] bc_count;

  bit_counter #(.N_TAPS(N_TAPS)) u_bc (
    .clk, .rst, .in_valid, .therm,
    .out_valid(bc_valid), .count(bc_count)
  );

  calib_map #(.N_TAPS(N_TAPS), .MAP_W(MAP_W), .DL_RANGE_PS(DL_RANGE_PS)) u_map (
    .clk, .rd_en(1'b1), .rd_addr(bc_count), .rd_data(fine_ps),
    .we(map_we), .wr_addr(map_addr), .wr_data(map_wdata)
  );

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= bc_valid;
    ones <= bc_count;
  end
endmodule
