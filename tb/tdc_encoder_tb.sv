// tdc_encoder_tb: loads the Map with a known table, then feeds one code per
// cycle and checks that every tagged code comes out, 9 cycles later, as the
// table entry of its number of ones, that untagged codes give no valid and
// that the raw ones count is reported alongside.
`timescale 1ps/1ps
module tdc_encoder_tb;
  localparam int unsigned N = 464, W = 16, LAT = 9;
  localparam int unsigned AW = $clog2(N + 1);
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic [N-1:0] therm = '0;
  logic [W-1:0] fine_ps;
  logic [AW-1:0] ones;
  logic map_we = 1'b0;
  logic [AW-1:0] map_addr = '0;
  logic [W-1:0] map_wdata = '0;
  int checks = 0, failures = 0, seen = 0;
  int unsigned cyc = 0;
  int unsigned q_ones [$];
  int unsigned q_cyc [$];

  tdc_encoder #(.N_TAPS(N), .MAP_W(W)) dut (.*);

  always #1250 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int unsigned table_val(int unsigned c);
    return (c * 13 + 5) % 3001;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && in_valid) begin
      q_ones.push_back($countones(therm));
      q_cyc.push_back(cyc + LAT);
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      if (q_cyc.size() > 0 && q_cyc[0] == cyc) begin
        check(out_valid, "valid after 9 cycles");
        check(fine_ps == W'(table_val(q_ones[0])), $sformatf("fine %0d for %0d ones", fine_ps, q_ones[0]));
        check(ones == AW'(q_ones[0]), "raw ones count");
        void'(q_ones.pop_front()); void'(q_cyc.pop_front());
        seen++;
      end else begin
        check(!out_valid, "no valid for an untagged code");
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    for (int unsigned c = 0; c < (1 << AW); c++) begin
      map_we = 1'b1; map_addr = AW'(c); map_wdata = W'(table_val(c));
      @(negedge clk);
    end
    map_we = 1'b0;
    rst = 1'b0;
    for (int k = 0; k < 400; k++) begin
      therm = '0;
      for (int unsigned i = 0; i < $urandom_range(N, 0); i++) therm[i] = 1'b1;
      if (k % 4 == 1) therm[$urandom_range(N - 1, 0)] ^= 1'b1;
      in_valid = ($urandom_range(2, 0) != 0);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    check(seen > 200, "tagged codes encoded");
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
