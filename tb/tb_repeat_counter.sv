// tb_repeat_counter: advances the repeat counter and checks the end flag
// and that it stops counting at the end value.
//
// Interface and timing: a testbench clock. A watchdog ends the run after
// 50,000 cycles. The 16-bit repeat count follows the design; reading the
// value as the number of re-starts is this design's own.
module tb_repeat_counter;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [15:0] end_value, count;
  logic last;
  int checks = 0, failures = 0;

  repeat_counter #(.W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    end_value = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int e = 0; e < 6; e++) begin
      end_value = 16'(e);
      @(negedge clk) clr = 1; @(negedge clk) clr = 0;
      for (int i = 0; i < e + 3; i++) begin
        check(last == (i >= e), $sformatf("last at %0d end %0d", i, e));
        check(count == 16'((i < e) ? i : e), "count");
        @(negedge clk) inc = 1; @(negedge clk) inc = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
