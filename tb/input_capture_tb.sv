// input_capture_tb: checks that a short pulse becomes a held level, that
// further pulses are ignored while held, that clr drops the level at once
// and blocks new pulses while asserted, and that the element re-arms after.
`timescale 1ps/1ps
module input_capture_tb;
  logic sig_in = 1'b0, clr = 1'b1, sig_out;
  int checks = 0, failures = 0;

  input_capture #(.STAGES(2)) dut (.sig_in, .clr, .sig_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic pulse(int width);
    sig_in = 1'b1; #(width); sig_in = 1'b0;
  endtask

  initial begin
    #100 clr = 1'b0;
    #100 check(!sig_out, "low after clear");
    repeat (3) begin
      #100 pulse(2000);
      #10  check(sig_out, "held after pulse");
      #5000 check(sig_out, "still held 5 ns later");
      pulse(300);
      #10 check(sig_out, "second pulse leaves it high");
      clr = 1'b1;
      #1 check(!sig_out, "cleared at once");
      pulse(500);
      #10 check(!sig_out, "pulse ignored while clear held");
      clr = 1'b0;
      #100 check(!sig_out, "stays low after clear released");
    end
    // A pulse that starts while clr is held and ends after release is not caught.
    clr = 1'b1; sig_in = 1'b1; #50 clr = 1'b0; #50 sig_in = 1'b0;
    #10 check(!sig_out, "level without an edge is not caught");
    #100 pulse(20);
    #5 check(sig_out, "a short 20 ps pulse is caught");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
