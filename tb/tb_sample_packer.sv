// tb_sample_packer: feeds a counting sample stream, opens and closes the
// gate, and checks every written word holds six (or five) consecutive
// samples, first sample in the low byte, plus the zero-padded last word
// and the idle flag.
//
// Interface and timing: a 250 MHz ADC clock. The gate is driven
// asynchronously and re-timed inside. A watchdog ends the run after
// 50,000 ADC clocks. Six samples per word, or five, follows the design;
// the byte order and the zero padding are this design's own.
module tb_sample_packer;
  import dab_pkg::*;
  logic adc_clk = 0, rst_n = 0, gate = 0, five_mode = 0, fifo_full = 0;
  logic [7:0] sample = 0;
  logic wr_en, idle;
  logic [47:0] wr_data;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];
  logic [7:0] taken [$];

  sample_packer dut (.*);
  always #2 adc_clk = ~adc_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge adc_clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Samples that the packer takes: gate re-timed by two flops.
  logic [1:0] g;
  always @(posedge adc_clk) begin
    g <= {g[0], gate};
    if (g[1]) taken.push_back(sample);
    sample <= sample + 8'd1;
  end

  initial begin
    int nb;
    g = 0;
    for (int m = 0; m < 2; m++) begin
      five_mode = m[0];
      nb = m ? 5 : 6;
      rst_n = 0; #10 rst_n = 1;
      check(idle, "idle before gate");
      @(negedge adc_clk) gate = 1;
      repeat (6 * 10 + 3) @(negedge adc_clk);   // not a multiple of the word
      gate = 0;
      repeat (20) @(negedge adc_clk);
      check(idle, "idle after gate");
      check(taken.size() == 0, "every sample was written");
      check(wi == (m ? 24 : 11), $sformatf("words written %0d", wi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: each word carries the next taken samples, padding at the end.
  int wi = 0;
  always @(posedge adc_clk) if (wr_en) begin
    logic [47:0] exp_w;
    int nb;
    nb = five_mode ? 5 : 6;
    exp_w = '0;
    for (int j = 0; j < nb; j++)
      if (taken.size() > 0) exp_w[8*j +: 8] = taken.pop_front();
    check(wr_data == exp_w, $sformatf("word %0d %h expected %h", wi, wr_data, exp_w));
    wi++;
  end
endmodule
