// tb_segment_counter: counts stored words and checks the automatic-STOP
// flag against the programmed segment length, including the "0 never
// ends" rule and clearing at a new START.
//
// Interface and timing: a testbench clock, one increment per stored row.
// A watchdog ends the run after 50,000 cycles. The 16-bit count and the
// automatic STOP follow the design; 'zero means no limit' is this
// design's own.
module tb_segment_counter;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [15:0] target, count;
  logic done;
  int checks = 0, failures = 0;

  segment_counter #(.W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    target = 16'd5;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 1; t <= 3; t++) begin
      target = 16'(t * 7);
      @(negedge clk) clr = 1; @(negedge clk) clr = 0;
      for (int i = 0; i < t * 7 + 3; i++) begin
        check(done == (i >= t * 7), $sformatf("done at %0d of %0d", i, t * 7));
        check(count == 16'((i < t * 7) ? i : t * 7), "count");
        @(negedge clk) inc = 1; @(negedge clk) inc = 0;
      end
    end
    target = 0;
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    repeat (20) begin @(negedge clk) inc = 1; end
    @(negedge clk) inc = 0;
    check(!done && count == 20, "target 0 never ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
