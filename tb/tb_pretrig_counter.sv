// tb_pretrig_counter: runs the 40-bit counter for random spans and checks
// it holds the number of cycles counted; also checks the carry into the
// upper byte from a preset-like long run is not lost (by counting across
// 2^16 boundaries) and that clear works.
//
// Interface and timing: a testbench clock, one count per cycle of run. A
// watchdog ends the run after 2,500,000 cycles. The 40-bit width follows
// the design.
module tb_pretrig_counter;
  logic clk = 0, rst_n = 0, clr = 0, run = 0;
  logic [39:0] count;
  int checks = 0, failures = 0;
  longint expect_n;

  pretrig_counter #(.W(40)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2500000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      @(negedge clk) clr = 1; @(negedge clk) clr = 0;
      n = (t == 4) ? 70000 : $urandom_range(1, 3000);
      run = 1; repeat (n) @(negedge clk); run = 0;
      repeat (3) @(negedge clk);
      check(count == 40'(n), $sformatf("counted %0d expected %0d", count, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
