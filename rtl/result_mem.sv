// result_mem: the memory that holds finished measurements until they are
// read out (MEM in the TDC block diagram).
//
// The design description only says that results are stored in memory
// elements of the programmable logic; the form is this design's choice: a
// first-word-fall-through FIFO of DEPTH words (distributed RAM at the default
// 64, leaving the single block RAM tile to the two Maps). A write into a full
// FIFO is dropped and reported on drop; a read of an empty FIFO is ignored.
//
// Interface: wr_en/wr_data; rd_en pops, rd_data shows the oldest word while
// empty is low; count is the number of words held. All synchronous to clk.
`timescale 1ps/1ps
module result_mem #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned W     = tdc_pkg::TIME_W,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           wr_en,
  input  logic [W-1:0]   wr_data,
  input  logic           rd_en,
  output logic [W-1:0]   rd_data,
  output logic           empty,
  output logic           full,
  output logic [AW:0]    count,
  output logic           drop
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      drop  <= 1'b0;
    end else begin
      drop <= wr_en && full;
      if (do_wr) wp <= incr(wp);
      if (do_rd) rp <= incr(rp);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) assert (count <= (AW+1)'(DEPTH)) else $error("result_mem: count above DEPTH");
  end
endmodule
