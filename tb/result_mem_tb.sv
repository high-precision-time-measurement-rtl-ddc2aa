// result_mem_tb: checks the result FIFO against a queue model under random
// writes and reads (DEPTH = 8 here): first-in first-out order, the count,
// empty and full flags, a dropped write into a full FIFO flagged one cycle
// later, and reads of an empty FIFO ignored.
`timescale 1ps/1ps
module result_mem_tb;
  localparam int unsigned D = 8, W = 32;
  logic clk = 1'b0, rst = 1'b1, wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, drop;
  logic [3:0] count;
  int checks = 0, failures = 0, drops = 0, empty_reads = 0;
  logic [W-1:0] model [$];
  bit exp_drop = 1'b0;

  result_mem #(.DEPTH(D), .W(W)) dut (.*);

  always #1250 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int k = 0; k < 2000; k++) begin
      // compare state before this cycle's operations
      check(count == 4'(model.size()), $sformatf("count %0d expected %0d", count, model.size()));
      check(empty == (model.size() == 0) && full == (model.size() == D), "flags");
      check(drop == exp_drop, "drop flag");
      if (model.size() > 0) check(rd_data == model[0], "head of FIFO");
      // phase-dependent bias so that the FIFO both fills and drains
      wr_en = ($urandom_range(99, 0) < ((k / 200) % 2 ? 80 : 25));
      rd_en = ($urandom_range(99, 0) < ((k / 200) % 2 ? 25 : 80));
      wr_data = $urandom;
      exp_drop = wr_en && (model.size() == D);
      if (exp_drop) drops++;
      if (rd_en && model.size() == 0) empty_reads++;
      @(posedge clk);
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en && !exp_drop) model.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 1'b0; rd_en = 1'b0;
    check(drops > 0 && empty_reads > 0, "full and empty both exercised");
    $display("drops=%0d empty_reads=%0d", drops, empty_reads);
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
