// calib_map: the encoder's Map, a block-RAM table from bit count to time.
//
// Entry c holds the time, in ps, that a code with c ones stands for: the
// delay of the first c taps plus half the width of tap c (the middle of the
// bin). The widths differ from tap to tap, so the entries come from a
// calibration of the line and are loaded through the write port. At power
// up the table holds the nominal linear map, entry c = (2c+1) * DL_RANGE_PS /
// (2 * N_TAPS), computed here rather than read from a file. The design
// description places the Map in block RAM; the word width, the nominal
// contents and the separate write port are this design's choices. Two of
// these tables (512 x 16) fill one 36 Kb block RAM tile, as two 18 Kb
// halves.
//
// Interface: read port rd_en/rd_addr, rd_data registered one cycle later;
// write port we/wr_addr/wr_data, written on the clock edge. Reading and
// writing one address in the same cycle returns the old entry.
`timescale 1ps/1ps
module calib_map #(
  parameter int unsigned N_TAPS      = tdc_pkg::N_TAPS,
  parameter int unsigned MAP_W       = tdc_pkg::MAP_W,
  parameter int unsigned DL_RANGE_PS = tdc_pkg::DL_RANGE_PS,
  localparam int unsigned AW    = $clog2(N_TAPS + 1),
  localparam int unsigned DEPTH = 1 << AW
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [MAP_W-1:0] rd_data,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [MAP_W-1:0] wr_data
);
  logic [MAP_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned c = 0; c < DEPTH; c++) begin
      int unsigned cc;
      cc = (c > N_TAPS) ? N_TAPS : c;
      mem[c] = MAP_W'(((2 * cc + 1) * DL_RANGE_PS) / (2 * N_TAPS));
    end
  end

  always_ff @(posedge clk) begin
    if (we)    mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
