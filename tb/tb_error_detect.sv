// tb_error_detect: exhaustively drives the risk conditions and checks the
// stop pulse and the sticky NOMEMORY flag against a reference rule.
//
// Interface and timing: a testbench clock, with all input combinations
// applied at the falling edge. A watchdog ends the run after 50,000
// cycles. Stopping before data loss follows the design; the exact risk
// rule is this design's own.
module tb_error_detect;
  logic clk = 0, rst_n = 0, clr = 0, gate, bypass, fifo_full, fifo_afull, mem_full;
  logic stop, nomem;
  int checks = 0, failures = 0;

  error_detect dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit risk;
    {gate, bypass, fifo_full, fifo_afull, mem_full} = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int v = 0; v < 32; v++) begin
      @(negedge clk) clr = 1; @(negedge clk) clr = 0;
      {gate, bypass, fifo_full, fifo_afull, mem_full} = 5'(v);
      risk = gate && (fifo_full || (!bypass && fifo_afull && mem_full));
      #1 check(stop == risk, $sformatf("stop for %b", v[4:0]));
      @(negedge clk);
      check(nomem == risk, $sformatf("nomem for %b", v[4:0]));
      check(!stop, "stop is a single pulse");
      {gate, bypass, fifo_full, fifo_afull, mem_full} = '0;
      @(negedge clk);
      check(nomem == risk, "nomem sticky");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
