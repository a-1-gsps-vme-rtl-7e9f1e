// tb_vme_daq_top_full: one complete acquisition on the module at its full
// size (four channels, 24 KByte FIFOs, 3 MByte memory pools, defaults of
// vme_daq_top). The host programs a SEGMENTED acquisition of 2000 rows
// (48,000 samples, 48 us at 1 GSPS), starts it with the external START,
// waits for the automatic STOP, reads the 12,000 words back by block
// transfers and checks every byte against the ADC model (channel k gives
// 4t+k at ADC clock t). The memory keeps all of it while the host reads
// nothing, so the test also shows the pool absorbing the full rate. The
// same acquisition is then repeated on a 300 MHz external clock, the
// fastest ADC rate six-sample words allow: 50 M words/s per channel, one
// memory write in every 20 ns cycle.
//
// Interface and timing: a 50 MHz clock and a 250 MHz oscillator. The top
// keeps every default parameter. A watchdog ends the run after 4,000,000
// cycles. The sizes follow the design; the register and address maps used
// are this design's own.
module tb_vme_daq_top_full;
  import dab_pkg::*;
  localparam logic [7:0] BASE = 8'h42;
  localparam int ROWS = 2000;
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
    .trig_out, .busy, .dsp_present(1'b1), .dsp_wr(1'b0), .dsp_rd(1'b0), .dsp_addr(6'h0),
    .dsp_wdata(32'h0), .dsp_rdata, .dsp_int_n, .dsp_hold_n, .dsp_holda_n, .ext_req, .ext_we,
    .ext_addr, .ext_wdata, .ext_rdata(32'h0), .ext_ack(1'b0), .board_base(BASE), .bcast_master(1'b1),
    .vme_as_n(vme.as_n), .vme_ds_n(vme.ds_n), .vme_write_n(vme.write_n), .vme_lword_n(vme.lword_n),
    .vme_iack_n(vme.iack_n), .vme_iackin_n(vme.iackin_n), .vme_iackout_n, .vme_am(vme.am),
    .vme_a(vme.a), .vme_d_i(vme.d_i), .vme_d_o(vme.d_o), .vme_d_oe(vme.d_oe),
    .vme_dtack_n(vme.dtack_n), .vme_irq_n
  );

  always #10 clk = ~clk;
  always #2 osc_clk = ~osc_clk;
  always #1.667 ext_clk = ~ext_clk;   // 300 MHz
  always @(posedge clk) dsp_holda_n <= dsp_hold_n;

  int unsigned t = 0;
  always @(posedge adc_clk) t <= t + 1;
  always_comb for (int k = 0; k < 4; k++) adc_data[k] = 8'(4 * t + k);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t %s", $time, what); end
  endtask

  initial begin
    repeat (4000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] port(input logic [5:0] a);
    return {BASE, 24'h0} | (32'(a) << 2);
  endfunction

  // One SEGMENTED acquisition of ROWS rows on four channels, started by
  // the external START, read back by block transfers and checked.
  task automatic acquire(input bit ext, input string name);
    ctrl_t c;
    logic [7:0] stream [$];
    logic [31:0] v;
    bit ok;
    int errs = 0, words;
    c = '0; c.nac = 2'd2; c.segmented = 1; c.sel_ext = ext;
    vme.write(port(REG_CTRL), 32'(c), ok);    check(ok, "CTRL");
    vme.write(port(REG_SEGMENT), ROWS, ok);   check(ok, "SEGMENT");
    vme.write(port(REG_CMD), 32'h8, ok);      check(ok, "clear");
    @(negedge clk) start_in = 1; repeat (3) @(negedge clk); start_in = 0;
    repeat (10) @(negedge clk);
    check(busy, {name, ": started"});
    while (busy) @(negedge clk);
    vme.read(port(REG_STATUS), v, ok);
    check(ok && !v[1], {name, ": no error"});
    words = 0;
    while (words < ROWS * 6) begin
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
    check(stream.size() == ROWS * 24, $sformatf("%s: %0d bytes read", name, stream.size()));
    for (int p = 1; p < stream.size(); p++) if (stream[p] != stream[p-1] + 8'd1) errs++;
    check(errs == 0, $sformatf("%s: %0d bytes out of order", name, errs));
    vme.read(port(REG_MEMCOUNT), v, ok);
    check(v == 0, {name, ": pool empty after reading"});
  endtask

  initial begin
    #45 rst_n = 1;
    #200;
    acquire(0, "250 MHz");
    acquire(1, "300 MHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
