// calib_map_tb: checks the power-up contents of the Map against the nominal
// formula (2c+1) * 2800 / (2 * 464), the one-cycle read latency, writes of
// a calibration table and read-before-write on the same address.
`timescale 1ps/1ps
module calib_map_tb;
  localparam int unsigned N = 464, W = 16, R = 2800;
  localparam int unsigned AW = $clog2(N + 1);
  logic clk = 1'b0, rd_en = 1'b0, we = 1'b0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [W-1:0] rd_data, wr_data = '0;
  int checks = 0, failures = 0;

  calib_map #(.N_TAPS(N), .MAP_W(W), .DL_RANGE_PS(R)) dut (.*);

  always #1250 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int unsigned nominal(int unsigned c);
    int unsigned cc = (c > N) ? N : c;
    return ((2 * cc + 1) * R) / (2 * N);
  endfunction

  task automatic read(int unsigned a, int unsigned exp, string what);
    @(negedge clk);
    rd_en = 1'b1; rd_addr = AW'(a);
    @(negedge clk);
    rd_en = 1'b0;
    check(rd_data == W'(exp), $sformatf("%s addr %0d: %0d expected %0d", what, a, rd_data, exp));
  endtask

  initial begin
    for (int unsigned c = 0; c < (1 << AW); c++) read(c, nominal(c), "nominal");
    // rd_en low holds the output
    @(negedge clk); rd_addr = 5; @(negedge clk);
    check(rd_data == W'(nominal((1 << AW) - 1)), "hold while rd_en low");
    // load a calibration table
    for (int unsigned c = 0; c < (1 << AW); c++) begin
      @(negedge clk);
      we = 1'b1; wr_addr = AW'(c); wr_data = W'(c * 7 + 3);
    end
    @(negedge clk); we = 1'b0;
    for (int unsigned c = 0; c < (1 << AW); c += 3) read(c, c * 7 + 3, "written");
    // read and write of one address in one cycle: old data
    @(negedge clk);
    rd_en = 1'b1; rd_addr = 10; we = 1'b1; wr_addr = 10; wr_data = 16'hBEEF;
    @(negedge clk);
    rd_en = 1'b0; we = 1'b0;
    check(rd_data == W'(73), "read-before-write");
    read(10, 16'hBEEF, "after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
