// hit_detect_tb: checks that hit pulses exactly once, in the cycle of the
// first non-empty entry sample after an empty one, that a line found full
// at reset gives no hit, and that hits re-arm only after an empty sample.
`timescale 1ps/1ps
module hit_detect_tb;
  localparam int unsigned H = 8;
  logic clk = 1'b0, rst = 1'b1, hit;
  logic [H-1:0] entry = '1;
  int checks = 0, failures = 0;

  hit_detect #(.HIT_TAPS(H)) dut (.clk, .rst, .entry_taps(entry), .hit);

  always #1250 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Apply one sample, check hit in its cycle against the model.
  bit prev_nz = 1'b1;
  task automatic sample(logic [H-1:0] v);
    @(negedge clk);
    entry = v;
    #1;
    check(hit == ((v != '0) && !prev_nz), $sformatf("hit for %b after %0d", v, prev_nz));
    prev_nz = (v != '0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // full at reset: no hit until an empty sample
    sample('1); sample('1);
    sample('0); sample(8'b0000_0001); sample(8'b0000_0111); sample('1); sample('1);
    sample('0); sample('0); sample(8'b0000_0100); sample('0); sample(8'b1000_0000);
    for (int i = 0; i < 300; i++) sample(($urandom_range(2, 0) == 0) ? H'($urandom) : '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
