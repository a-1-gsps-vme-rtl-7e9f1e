// tb_clock_gen: counts rising edges of adc_clk over a fixed window for each
// divider setting and for the external clock, and checks the ratios.
//
// Interface and timing: the oscillator is 250 MHz (4 ns) and the external
// clock has a 14 ns period. Edges are counted over a fixed window. A
// watchdog ends the run after 100,000 oscillator periods. The choice of
// source and the division by 2, 4 and 8 follow the design.
module tb_clock_gen;
  logic osc_clk = 0, ext_clk = 0, rst_n = 0, sel_ext = 0;
  logic [1:0] div_sel = 0;
  logic adc_clk;
  int checks = 0, failures = 0, edges = 0;

  clock_gen dut (.*);
  always #2 osc_clk = ~osc_clk;   // 250 MHz in ns
  always #7 ext_clk = ~ext_clk;
  always @(posedge adc_clk) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge osc_clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int e;
    #10 rst_n = 1;
    for (int d = 0; d < 4; d++) begin
      div_sel = 2'(d);
      #101; edges = 0; #3200; e = edges;
      check(e >= (800 >> d) - 1 && e <= (800 >> d) + 1, $sformatf("div %0d edges %0d", 1 << d, e));
    end
    sel_ext = 1; div_sel = 2'd3;
    #101; edges = 0; #1400; e = edges;
    check(e >= 99 && e <= 101, $sformatf("external edges %0d", e));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
