// tb_dab: the Data Acquisition Block at reduced memory sizes, programmed
// through its register port. The ADC model gives channel k the value
// 4t+k at ADC clock t, so in interleaved order the samples of four
// channels count up by one; every word read from the DATA port is checked
// against that pattern. Runs: START/STOP with 4, 2 and 1 channels,
// SEGMENTED with REPEAT (exact words per segment, restart after the
// delay), PRE-TRIGGER (depth kept, START-to-Trigger-In time), memory
// overflow (NOMEMORY stops the acquisition) and the no-memory bypass.
//
// Interface and timing: a 50 MHz clock, with ADC clocks from the local
// 250 MHz oscillator. The FIFOs, memory and output FIFO are reduced to
// 64, 256 and 64 words so that the pool overflows quickly. A watchdog
// ends the run after 400,000 cycles. The modes and the interleaved data
// order follow the design; the register map used is this design's own.
module tb_dab;
  import dab_pkg::*;
  localparam int N_AC = 4, FIFO_WORDS = 64, MEM_WORDS = 256, OFIFO_WORDS = 64;
  logic clk = 0, rst_n = 0, osc_clk = 0, ext_clk = 0, adc_clk;
  logic [7:0] adc_data [N_AC];
  logic start_in = 0, stop_in = 0, trig_in = 0, trig_out, busy;
  logic wr = 0, rd = 0;
  logic [5:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [N_SRC-1:0] irq_src;
  int checks = 0, failures = 0;

  dab #(.N_AC(N_AC), .FIFO_WORDS(FIFO_WORDS), .MEM_WORDS(MEM_WORDS), .OFIFO_WORDS(OFIFO_WORDS)) dut (.*);
  always #10 clk = ~clk;
  always #2 osc_clk = ~osc_clk;
  always #3 ext_clk = ~ext_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t %s", $time, what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ADC model
  int unsigned t = 0;
  always @(posedge adc_clk) t <= t + 1;
  always_comb for (int k = 0; k < N_AC; k++) adc_data[k] = 8'(4 * t + k);

  task automatic wreg(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk) begin wr = 1; addr = a; wdata = d; end
    @(negedge clk) wr = 0;
  endtask
  task automatic rreg(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk) begin addr = a; rd = (a == REG_DATA); end
    #1 d = rdata;
    @(negedge clk) rd = 0;
  endtask

  // read every word the block has, until it is idle and empty
  logic [7:0] stream [$];
  task automatic drain();
    logic [31:0] st, d;
    int idle_n = 0;
    while (idle_n < 40) begin
      rreg(REG_STATUS, st);
      if (!st[2]) begin
        rreg(REG_DATA, d);
        for (int b = 0; b < 4; b++) stream.push_back(d[8*b +: 8]);
        idle_n = 0;
      end else if (!st[0]) idle_n++;
    end
  endtask

  // check stream[from +: len] is consecutive samples for n channels
  function automatic int pattern_errors(int from, int len, int n);
    int e = 0;
    for (int p = from + 1; p < from + len; p++) begin
      logic [7:0] exp_b;
      exp_b = ((p - from) % n == 0) ? stream[p-1] + 8'(4 - n + 1) : stream[p-1] + 8'd1;
      if (stream[p] != exp_b) begin
        if (e < 3) $display("  byte %0d: %h after %h", p, stream[p], stream[p-1]);
        e++;
      end
    end
    return e;
  endfunction

  ctrl_t c;
  initial begin
    logic [31:0] v, v2;
    int nb, n;
    #45 rst_n = 1;
    #100;
    // 1. START/STOP with 4, 2, 1 channels
    for (int m = 2; m >= 0; m--) begin
      n = 1 << m;
      c = '0; c.nac = 2'(m);
      wreg(REG_CTRL, 32'(c));
      wreg(REG_CMD, 32'h8);                   // clear
      stream.delete();
      wreg(REG_CMD, 32'h1);                   // start
      repeat (30) @(negedge clk);
      check(busy && trig_out, "acquiring");
      wreg(REG_CMD, 32'h2);                   // stop
      drain();
      wreg(REG_CMD, 32'h10);                  // flush a last partial word
      drain();
      nb = stream.size();
      check(nb > 100 && pattern_errors(0, nb - 6 * n - 4, n) == 0, $sformatf("%0d channels: %0d bytes in order", n, nb));
    end
    // 2. SEGMENTED + REPEAT: 3 segments of 7 rows, 4 channels
    c = '0; c.nac = 2'd2; c.segmented = 1; c.repeat_m = 1;
    wreg(REG_CTRL, 32'(c));
    wreg(REG_SEGMENT, 7); wreg(REG_DELAY, 40); wreg(REG_REPEAT, 2);
    wreg(REG_CMD, 32'h8);
    stream.delete();
    wreg(REG_CMD, 32'h1);
    drain();
    check(stream.size() == 3 * 7 * 24, $sformatf("3 segments of 7 rows: %0d bytes", stream.size()));
    for (int s = 0; s < 3; s++) check(pattern_errors(s * 168, 168, 4) == 0, "segment in order");
    check(stream[168] != stream[167] + 8'd1, "gap between segments");
    rreg(REG_CYCLES, v);
    check(v == 2, "two automatic re-starts");
    // 3. PRE-TRIGGER with SEGMENTED: 16 words of depth, 20 words in all
    c = '0; c.nac = 2'd2; c.pretrig = 1;
    wreg(REG_CTRL, 32'(c));
    wreg(REG_PTDEPTH, 16);
    wreg(REG_CMD, 32'h8);
    stream.delete();
    wreg(REG_CMD, 32'h1);
    repeat (200) @(negedge clk);
    rreg(REG_MEMCOUNT, v);
    check(v == 0, "nothing stored before Trigger In");
    @(negedge clk) trig_in = 1; repeat (4) @(negedge clk); trig_in = 0;
    rreg(REG_PTTIME_L, v);
    check(v >= 200 && v <= 215, $sformatf("START to Trigger In %0d cycles", v));
    repeat (10) @(negedge clk);
    wreg(REG_CMD, 32'h2);
    drain();
    nb = stream.size();
    check(nb >= 24 * 16 && pattern_errors(0, nb - 24, 4) == 0, $sformatf("pre-trigger data in order, %0d bytes", nb));
    // 4. overflow: 1 channel, nothing read until the pool is full
    c = '0; c.nac = 2'd2;
    wreg(REG_CTRL, 32'(c));
    wreg(REG_CMD, 32'h8);
    wreg(REG_CMD, 32'h1);
    @(negedge clk);
    n = 0;
    while (busy && n < 20000) begin @(negedge clk); n++; end
    check(!busy && irq_src[SRC_NOMEM], "memory full stops the acquisition with NOMEMORY");
    rreg(REG_STATUS, v);
    check(v[1], $sformatf("status %h shows NOMEMORY", v));
    stream.delete();
    drain();
    nb = stream.size();
    check(nb >= 24 * (MEM_WORDS - 1) && pattern_errors(0, nb, 4) == 0, $sformatf("all %0d stored bytes intact", nb));
    // 5. bypass (no memory pool), 2 channels
    c = '0; c.nac = 2'd1; c.bypass = 1;
    wreg(REG_CTRL, 32'(c));
    wreg(REG_CMD, 32'h8);
    stream.delete();
    wreg(REG_CMD, 32'h1);
    repeat (10) begin rreg(REG_STATUS, v); if (!v[2]) begin rreg(REG_DATA, v2); for (int b = 0; b < 4; b++) stream.push_back(v2[8*b +: 8]); end end
    wreg(REG_CMD, 32'h2);
    drain();
    rreg(REG_MEMCOUNT, v);
    nb = stream.size();
    check(v == 0 && nb > 48 && pattern_errors(0, nb - 12, 2) == 0, $sformatf("bypass: %0d bytes in order, memory unused", nb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
