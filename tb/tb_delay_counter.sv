// tb_delay_counter: loads several delays and checks that done comes
// exactly `delay` cycles after the load, once.
//
// Interface and timing: a 100 MHz testbench clock (only cycles count). A
// watchdog ends the run after 500,000 cycles. The REPEAT delay follows
// the design; counting in clock cycles is this design's own.
module tb_delay_counter;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] delay;
  logic running, done;
  int checks = 0, failures = 0;

  delay_counter #(.W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int d, n, ndone;
    delay = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      d = (t == 0) ? 1 : (t == 1) ? 2 : 3 + $urandom_range(0, 200);
      @(negedge clk) begin delay = 16'(d); load = 1; end
      @(negedge clk) load = 0;
      n = 1; ndone = 0;
      while (!done && n < 1000) begin @(negedge clk); n++; end
      check(done && n == d, $sformatf("delay %0d gave %0d", d, n));
      repeat (5) begin @(negedge clk); if (done) ndone++; end
      check(ndone == 0 && !running, "single done pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
