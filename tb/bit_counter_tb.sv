// bit_counter_tb: feeds one code per cycle (empty, full, thermometric,
// bubbled and random) into the 464-tap bit counter and checks each count
// against $countones of the code, LATENCY = 8 cycles later, with the valid
// tag arriving in the same cycle.
`timescale 1ps/1ps
module bit_counter_tb;
  localparam int unsigned N   = 464;
  localparam int unsigned LAT = 8;
  localparam int unsigned CW  = $clog2(N + 1);
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  logic [N-1:0] therm = '0;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int unsigned exp_cnt [$];
  int unsigned exp_cyc [$];
  bit          exp_val [$];

  bit_counter #(.N_TAPS(N)) dut (.clk, .rst, .in_valid, .therm, .out_valid, .count);

  always #1250 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [N-1:0] thermo(int unsigned n);
    logic [N-1:0] t = '0;
    for (int unsigned i = 0; i < n; i++) t[i] = 1'b1;
    return t;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      exp_cnt.push_back($countones(therm));
      exp_cyc.push_back(cyc + LAT);
      exp_val.push_back(in_valid);
    end
  end

  // Outputs seen just before the edge that ends cycle c belong to the code
  // captured at the edge LAT cycles earlier.
  always @(negedge clk) begin
    if (exp_cyc.size() > 0 && exp_cyc[0] == cyc) begin
      check(count == CW'(exp_cnt[0]), $sformatf("count %0d expected %0d", count, exp_cnt[0]));
      check(out_valid == exp_val[0], "valid latency");
      void'(exp_cnt.pop_front()); void'(exp_cyc.pop_front()); void'(exp_val.pop_front());
    end
  end

  initial begin
    logic [N-1:0] c;
    int unsigned n;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      n = $urandom_range(N, 0);
      case (k % 5)
        0: c = (k % 10 == 0) ? '0 : '1;
        1: c = thermo(n);
        2: begin  // bubbles near the front
          c = thermo(n);
          for (int b = 0; b < 4; b++) begin
            int unsigned p = n + $urandom_range(6, 0);
            if (p >= 3 && p - 3 < N) c[p - 3] = ~c[p - 3];
          end
        end
        default: for (int w = 0; w < N; w += 32) c[w +: 16] = 16'($urandom);
      endcase
      if (k % 5 == 4) for (int w = 16; w < N; w += 32) c[w +: 16] = 16'($urandom);
      therm = c;
      in_valid = (k % 3 == 0);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    check(checks >= 2 * 600, "every code compared");
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
