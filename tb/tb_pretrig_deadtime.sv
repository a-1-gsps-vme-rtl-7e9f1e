// tb_pretrig_deadtime: PRE-TRIGGER dead time of the full-size module.
//
// In PRE-TRIGGER mode the channel FIFOs hold the last `pt_depth` words
// while waiting for Trigger In; those words are moved to the memory pool
// after the STOP, one row per 20 ns cycle, before the module can take a
// new START. The expected dead time is therefore
//     DT = presamples / 6 * 20 ns + a fixed set-up time,
// with presamples the pre-trigger bytes per channel (6 per word) and a
// fixed part of at most 350 ns (17.5 cycles). For depths of 1000 and 4000
// words and the largest the 4096-word (24 KByte) FIFO holds, 4094 words,
// reached by programming 4096 (the module clamps it), this testbench runs the module at its
// default sizes: START, a wait long enough to fill the pre-trigger depth,
// external Trigger In, some post-trigger data, external STOP; it then
// measures the 50 MHz cycles from STOP to BUSY falling and checks
//     pt_depth <= DT_cycles <= pt_depth + 17,
// that no error was raised, that the pool holds at least pt_depth rows
// and that the 40-bit pre-trigger time counter read back matches the
// START-to-Trigger-In time within the input re-timing (+-4 cycles).
// A last case mixes PRE-TRIGGER with SEGMENTED (see run_mixed).
//
// Interface and timing: a 50 MHz clock and a 250 MHz oscillator. The top
// keeps its default parameters, with no DSP fitted. A watchdog ends the
// run after 400,000 cycles. The dead-time formula and the 24 KByte depth
// follow the design; the clamp to 4094 words is this design's own.
module tb_pretrig_deadtime;
  import dab_pkg::*;
  localparam logic [7:0] BASE = 8'h42;
  logic clk = 0, rst_n = 0, osc_clk = 0, ext_clk = 0, adc_clk;
  logic [7:0] adc_data [4];
  logic start_in = 0, stop_in = 0, trig_in = 0, trig_out, busy;
  logic dsp_holda_n = 1, dsp_hold_n;
  logic [31:0] dsp_rdata;
  logic [3:0] dsp_int_n;
  logic ext_req, ext_we;
  logic [22:2] ext_addr;
  logic [31:0] ext_wdata;
  logic vme_iackout_n;
  logic [7:1] vme_irq_n;
  int checks = 0, failures = 0;

  vme_master vme ();

  vme_daq_top dut (
    .clk, .rst_n, .osc_clk, .ext_clk, .adc_clk, .adc_data, .start_in, .stop_in, .trig_in,
    .trig_out, .busy, .dsp_present(1'b0), .dsp_wr(1'b0), .dsp_rd(1'b0), .dsp_addr(6'h0),
    .dsp_wdata(32'h0), .dsp_rdata, .dsp_int_n, .dsp_hold_n, .dsp_holda_n, .ext_req, .ext_we,
    .ext_addr, .ext_wdata, .ext_rdata(32'h0), .ext_ack(1'b0), .board_base(BASE), .bcast_master(1'b1),
    .vme_as_n(vme.as_n), .vme_ds_n(vme.ds_n), .vme_write_n(vme.write_n), .vme_lword_n(vme.lword_n),
    .vme_iack_n(vme.iack_n), .vme_iackin_n(vme.iackin_n), .vme_iackout_n, .vme_am(vme.am),
    .vme_a(vme.a), .vme_d_i(vme.d_i), .vme_d_o(vme.d_o), .vme_d_oe(vme.d_oe),
    .vme_dtack_n(vme.dtack_n), .vme_irq_n
  );

  always #10 clk = ~clk;
  always #2 osc_clk = ~osc_clk;
  always #3 ext_clk = ~ext_clk;

  int unsigned t = 0;
  always @(posedge adc_clk) t <= t + 1;
  always_comb for (int k = 0; k < 4; k++) adc_data[k] = 8'(4 * t + k);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t %s", $time, what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] port(input logic [5:0] a);
    return {BASE, 24'h0} | (32'(a) << 2);
  endfunction

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1; repeat (3) @(negedge clk); s = 0;
  endtask

  task automatic run(input int prog, input int depth);
    ctrl_t c;
    logic [31:0] v, pt_lo, pt_hi;
    bit ok;
    int dt, pre;
    c = '0; c.nac = 2'd2; c.pretrig = 1;
    vme.write(port(REG_CTRL), 32'(c), ok);     check(ok, "CTRL");
    vme.write(port(REG_PTDEPTH), prog, ok);     check(ok, "PTDEPTH");
    vme.write(port(REG_CMD), 32'h8, ok);       check(ok, "clear");
    pulse(start_in);
    // 41.7 M words/s against 50 MHz: 1.3 x depth cycles fill the depth
    pre = depth * 13 / 10 + 500;
    repeat (pre - 4) @(negedge clk);
    pulse(trig_in);
    repeat (300) @(negedge clk);
    @(negedge clk) stop_in = 1;
    dt = 0;
    fork
      begin repeat (3) @(negedge clk); stop_in = 0; end
      begin
        do begin @(negedge clk); dt++; end while (busy);
      end
    join
    $display("  depth %0d words: dead time %0d cycles = %0d ns (formula %0d ns)",
             depth, dt, dt * 20, depth * 20 + 350);
    check(dt >= depth && dt <= depth + 17, $sformatf("dead time %0d cycles for depth %0d", dt, depth));
    vme.read(port(REG_STATUS), v, ok);
    check(ok && !v[1], "no error");
    vme.read(port(REG_MEMCOUNT), v, ok);
    check(ok && v >= depth, $sformatf("pool holds %0d rows, depth %0d", v, depth));
    vme.read(port(REG_PTTIME_L), pt_lo, ok);
    vme.read(port(REG_PTTIME_H), pt_hi, ok);
    check(pt_hi[7:0] == 0 && int'(pt_lo) >= pre - 4 && int'(pt_lo) <= pre + 4,
          $sformatf("pre-trigger time %0d cycles, expected about %0d", pt_lo, pre));
  endtask

  // PRE-TRIGGER mixed with SEGMENTED: storing starts with the `depth`
  // words held before Trigger In and stops automatically after `rows`
  // rows in all; the words still in the FIFO are dropped, so the module is
  // ready again within the segmented dead time (under 10 cycles). The
  // record is read back by block transfer and must be one unbroken run of
  // samples.
  task automatic run_mixed(input int depth, input int rows);
    ctrl_t c;
    logic [31:0] v;
    logic [7:0] stream [$];
    bit ok;
    int dt, errs, words;
    c = '0; c.nac = 2'd2; c.pretrig = 1; c.segmented = 1;
    vme.write(port(REG_CTRL), 32'(c), ok);     check(ok, "CTRL");
    vme.write(port(REG_PTDEPTH), depth, ok);   check(ok, "PTDEPTH");
    vme.write(port(REG_SEGMENT), rows, ok);    check(ok, "SEGMENT");
    vme.write(port(REG_CMD), 32'h8, ok);       check(ok, "clear");
    pulse(start_in);
    repeat (depth * 13 / 10 + 200) @(negedge clk);
    pulse(trig_in);
    while (trig_out) @(negedge clk);
    dt = 0;
    do begin @(negedge clk); dt++; end while (busy);
    $display("  pre-trigger %0d + segmented %0d: ready %0d cycles after the automatic STOP", depth, rows, dt);
    check(dt < 10, $sformatf("mixed-mode dead time %0d cycles", dt));
    vme.read(port(REG_STATUS), v, ok);
    check(ok && !v[1], "no error");
    // rows are stored in the pool or already moved on to the output FIFO
    // (24 bytes = 6 words per row), up to five rows inside the output path (aligner and buffer)
    vme.read(port(REG_STATUS), v, ok);
    words = int'(v[31:16]);
    vme.read(port(REG_MEMCOUNT), v, ok);
    check(ok && int'(v) + words / 6 <= rows && int'(v) + words / 6 >= rows - 5,
          $sformatf("%0d rows in the pool, %0d words in the output FIFO, segment %0d", v, words, rows));
    words = 0;
    while (words < rows * 6) begin
      vme.read(port(REG_STATUS), v, ok);
      if (v[31:16] != 0) begin
        vme.start_cycle({BASE, 24'h40_0000}, 6'h0B, 0);
        for (int i = 0; i < int'(v[31:16]); i++) begin
          logic [31:0] d;
          vme.strobe(0, d, ok);
          for (int b = 0; b < 4; b++) stream.push_back(d[8*b +: 8]);
          words++;
        end
        vme.end_cycle();
      end
    end
    errs = 0;
    for (int p = 1; p < stream.size(); p++) if (stream[p] != stream[p-1] + 8'd1) errs++;
    check(stream.size() == rows * 24 && errs == 0,
          $sformatf("%0d bytes read, %0d out of order", stream.size(), errs));
  endtask

  initial begin
    #45 rst_n = 1;
    #200;
    run(1000, 1000);
    run(4000, 4000);
    run(4096, 4094);
    run_mixed(500, 1500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
