// tb_vme_daq_top: the whole module end to end, at reduced memory sizes.
//
// A VMEbus host model (vme_master) and a DSP model (port accesses, HOLD /
// HOLDA, interrupt pins, local memory) work the module as a system would:
// the DSP sets up the interrupt routing, the host loads the DSP memory by
// block transfer and a broadcast write, acquisitions are started by the
// external inputs, by the host and by the clock-synchronised mode, and the
// data are read back by host block transfers and by the DSP. The ADC model
// gives channel k the value 4t+k at ADC clock t, so every byte read can be
// checked. Each mechanism of the design is counted; one that never
// happened is a failure.
//
// Interface and timing: a 50 MHz clock and a 250 MHz oscillator. The VME
// master model is tb/vme_master.sv. The top is set to 64-word FIFOs,
// 256-row pools and a 64-word output FIFO. A watchdog ends the run after
// 2,000,000 cycles. The mechanisms counted follow the design; the
// programming sequence uses this design's own register and address maps.
module tb_vme_daq_top;
  import dab_pkg::*;
  localparam int N_AC = 4, FIFO_WORDS = 64, MEM_WORDS = 256, OFIFO_WORDS = 64;
  localparam logic [7:0] BASE = 8'h42;
  logic clk = 0, rst_n = 0, osc_clk = 0, ext_clk = 0, adc_clk;
  logic [7:0] adc_data [N_AC];
  logic start_in = 0, stop_in = 0, trig_in = 0, trig_out, busy;
  logic dsp_present = 1, dsp_wr = 0, dsp_rd = 0, dsp_holda_n = 1, dsp_hold_n;
  logic [5:0] dsp_addr = 0;
  logic [31:0] dsp_wdata = 0, dsp_rdata;
  logic [3:0] dsp_int_n;
  logic ext_req, ext_we, ext_ack;
  logic [22:2] ext_addr;
  logic [31:0] ext_wdata, ext_rdata;
  logic [7:0] board_base = BASE;
  logic bcast_master = 1, vme_iackout_n;
  logic [7:1] vme_irq_n;
  int checks = 0, failures = 0;

  vme_master vme ();

  vme_daq_top #(.N_AC(N_AC), .FIFO_WORDS(FIFO_WORDS), .MEM_WORDS(MEM_WORDS), .OFIFO_WORDS(OFIFO_WORDS)) dut (
    .clk, .rst_n, .osc_clk, .ext_clk, .adc_clk, .adc_data, .start_in, .stop_in, .trig_in,
    .trig_out, .busy, .dsp_present, .dsp_wr, .dsp_rd, .dsp_addr, .dsp_wdata, .dsp_rdata,
    .dsp_int_n, .dsp_hold_n, .dsp_holda_n, .ext_req, .ext_we, .ext_addr, .ext_wdata,
    .ext_rdata, .ext_ack, .board_base, .bcast_master,
    .vme_as_n(vme.as_n), .vme_ds_n(vme.ds_n), .vme_write_n(vme.write_n), .vme_lword_n(vme.lword_n),
    .vme_iack_n(vme.iack_n), .vme_iackin_n(vme.iackin_n), .vme_iackout_n, .vme_am(vme.am),
    .vme_a(vme.a), .vme_d_i(vme.d_i), .vme_d_o(vme.d_o), .vme_d_oe(vme.d_oe),
    .vme_dtack_n(vme.dtack_n), .vme_irq_n
  );

  always #10 clk = ~clk;
  always #2 osc_clk = ~osc_clk;
  always #3 ext_clk = ~ext_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t %s", $time, what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ADC model
  int unsigned t = 0;
  always @(posedge adc_clk) t <= t + 1;
  always_comb for (int k = 0; k < N_AC; k++) adc_data[k] = 8'(4 * t + k);

  // DSP model: gives up its bus on HOLD; local memory on the ext port
  logic [31:0] dspmem [64];
  always @(posedge clk) dsp_holda_n <= dsp_hold_n;
  always @(posedge clk) if (ext_req && ext_we && !ext_ack) dspmem[ext_addr[7:2]] <= ext_wdata;
  always @(posedge clk) ext_ack <= ext_req && !ext_ack;
  assign ext_rdata = dspmem[ext_addr[7:2]];

  task automatic dsp_write(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk); while (!dsp_hold_n) @(negedge clk);
    dsp_wr = 1; dsp_addr = a; dsp_wdata = d;
    @(negedge clk) dsp_wr = 0;
  endtask
  task automatic dsp_read(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk); while (!dsp_hold_n) @(negedge clk);
    dsp_addr = a; dsp_rd = 1; #1 d = dsp_rdata;
    @(negedge clk) dsp_rd = 0;
  endtask

  // mechanism counters
  int m_ext_start = 0, m_ext_stop = 0, m_trig_out = 0, m_host_start = 0, m_segment = 0;
  int m_repeat = 0, m_pretrig = 0, m_nomem = 0, m_bypass = 0, m_blt = 0, m_bcast = 0;
  int m_addr_only = 0, m_dsp_irq = 0, m_host_irq = 0, m_hold = 0, m_ext_clk = 0, m_div = 0;
  int m_five = 0, m_nac [3] = '{0, 0, 0}, m_ofifo_full = 0, m_clksync = 0, m_dsp_prog = 0;
  int m_dsp_read = 0;

  always @(posedge clk) if (rst_n) begin
    if (trig_out) m_trig_out++;
    if (!dsp_hold_n && !dsp_holda_n) m_hold++;
    if (dut.u_dab.of_full) m_ofifo_full++;
  end
  logic pin1_d = 1;
  always @(posedge clk) begin
    pin1_d <= dsp_int_n[1];
    if (rst_n && pin1_d && !dsp_int_n[1]) m_addr_only++;
  end

  localparam logic [31:0] PORTS = {BASE, 24'h0};
  localparam logic [31:0] FIFO_WIN = {BASE, 24'h40_0000};
  function automatic logic [31:0] port(input logic [5:0] a);
    return PORTS | (32'(a) << 2);
  endfunction

  task automatic host_write(input logic [5:0] a, input logic [31:0] d);
    bit ok;
    vme.write(port(a), d, ok);
    check(ok, $sformatf("host write port %h answered", a));
  endtask
  task automatic host_read(input logic [5:0] a, output logic [31:0] d);
    bit ok;
    vme.read(port(a), d, ok);
    check(ok, $sformatf("host read port %h answered", a));
  endtask

  // host reads all data by block transfers from the FIFO window
  logic [7:0] stream [$];
  task automatic host_drain();
    logic [31:0] st, d;
    int idle_n = 0;
    bit ok;
    while (idle_n < 20) begin
      host_read(REG_STATUS, st);
      if (st[31:16] != 0) begin
        vme.start_cycle(FIFO_WIN, 6'h0B, 0);
        for (int i = 0; i < int'(st[31:16]); i++) begin
          vme.strobe(0, d, ok);
          check(ok, "block transfer word");
          for (int b = 0; b < 4; b++) stream.push_back(d[8*b +: 8]);
        end
        vme.end_cycle();
        m_blt++;
        idle_n = 0;
      end else if (!st[0]) idle_n++;
    end
  endtask

  // bytes from..from+len in interleaved counting order for n channels;
  // five: 5-sample words, the sixth byte of each word is zero
  function automatic int pattern_errors(int from, int len, int n, bit five = 0);
    int e = 0;
    logic [7:0] prev;
    int q = 0;
    for (int p = from; p < from + len; p++) begin
      int wb;
      wb = ((p - from) / n) % 6;               // byte within the channel word
      if (five && wb == 5) begin
        if (stream[p] != 0) e++;
        continue;
      end
      if (q > 0) begin
        logic [7:0] exp_b;
        exp_b = (q % n == 0) ? prev + 8'(4 - n + 1) : prev + 8'd1;
        if (stream[p] != exp_b) begin
          if (e < 3) $display("  byte %0d: %h after %h", p, stream[p], prev);
          e++;
        end
      end
      prev = stream[p];
      q++;
    end
    return e;
  endfunction

  ctrl_t c;
  initial begin
    logic [31:0] v;
    logic [7:0] vec;
    bit ok;
    int nb, n;

    #45 rst_n = 1;
    #200;

    // DSP sets the interrupt routing: INT0 <- output data, INT1 <- host
    dsp_write(CCL_DSPSEL, 32'hFFF & ~32'h3F | 32'(SRC_DATA) | (32'd6 << 3));
    dsp_write(CCL_VMEMASK, 32'(1 << SRC_STOP));
    dsp_write(CCL_VMEIRQ, 32'h0000_5A03);

    // host loads a DSP program by block transfer into the DSP memory
    vme.start_cycle({BASE, 24'h80_0000}, 6'h0B, 1);
    for (int i = 0; i < 8; i++) begin
      vme.strobe(32'h1000_0000 + i, v, ok);
      check(ok, "program word");
    end
    vme.end_cycle();
    n = 0;
    for (int i = 0; i < 8; i++) if (dspmem[i] == 32'h1000_0000 + i) n++;
    check(n == 8, "DSP program loaded");
    if (n == 8) m_dsp_prog++;

    // broadcast write of the mode to all boards
    c = '0; c.nac = 2'd2;
    vme.write({8'hFF, 24'(REG_CTRL) << 2}, 32'(c), ok);
    host_read(REG_CTRL, v);
    check(ok && v == 32'(c), "broadcast write");
    if (v == 32'(c)) m_bcast++;

    // 1. external START / STOP, 4 channels, host interrupted at STOP
    host_write(REG_CMD, 32'h8);
    stream.delete();
    @(negedge clk) start_in = 1; repeat (3) @(negedge clk); start_in = 0;
    repeat (5) @(negedge clk);
    check(busy && trig_out, "external START");
    if (busy) m_ext_start++;
    repeat (40) @(negedge clk);
    @(negedge clk) stop_in = 1; repeat (3) @(negedge clk); stop_in = 0;
    repeat (5) @(negedge clk);
    check(!trig_out, "external STOP");
    if (!trig_out) m_ext_stop++;
    check(vme_irq_n[3] == 1'b0, "host interrupt on IRQ3");
    vme.iack(3'd3, vec, ok);
    check(ok && vec == 8'h5A, $sformatf("acknowledge returns vector %h", vec));
    if (ok && vec == 8'h5A) m_host_irq++;
    repeat (5) @(negedge clk);
    check(vme_irq_n == 7'h7F, "request released on acknowledge");
    host_drain();
    host_write(REG_CMD, 32'h10);
    host_drain();
    nb = stream.size();
    check(nb > 200 && pattern_errors(0, nb - 28, 4) == 0, $sformatf("4 channels: %0d bytes in order", nb));
    m_nac[2]++;

    // 2. SEGMENTED + REPEAT from the host: 3 segments of 5 rows
    c = '0; c.nac = 2'd2; c.segmented = 1; c.repeat_m = 1;
    host_write(REG_CTRL, 32'(c));
    host_write(REG_SEGMENT, 5); host_write(REG_DELAY, 30); host_write(REG_REPEAT, 2);
    host_write(REG_CMD, 32'h8);
    stream.delete();
    host_write(REG_CMD, 32'h1);
    m_host_start++;
    host_drain();
    check(stream.size() == 3 * 5 * 24, $sformatf("segments: %0d bytes", stream.size()));
    for (int s = 0; s < 3; s++) begin
      check(pattern_errors(s * 120, 120, 4) == 0, "segment in order");
      m_segment++;
    end
    host_read(REG_CYCLES, v);
    check(v == 2, "REPEAT re-started twice");
    m_repeat += int'(v);

    // 3. PRE-TRIGGER, depth 20 words, Trigger In from outside
    c = '0; c.nac = 2'd2; c.pretrig = 1;
    host_write(REG_CTRL, 32'(c));
    host_write(REG_PTDEPTH, 20);
    host_write(REG_CMD, 32'h8);
    stream.delete();
    host_write(REG_CMD, 32'h1);
    repeat (150) @(negedge clk);
    host_read(REG_MEMCOUNT, v);
    check(v == 0, "nothing stored before Trigger In");
    @(negedge clk) trig_in = 1; repeat (3) @(negedge clk); trig_in = 0;
    repeat (20) @(negedge clk);
    host_read(REG_PTTIME_L, v);
    check(v > 150 && v < 400, $sformatf("START to Trigger In: %0d x 20 ns", v));
    host_write(REG_CMD, 32'h2);
    host_drain();
    nb = stream.size();
    check(nb >= 20 * 24 && pattern_errors(0, nb - 24, 4) == 0, $sformatf("pre-trigger: %0d bytes in order", nb));
    m_pretrig++;

    // 4. overflow: nothing read, the pool fills, NOMEMORY stops
    c = '0; c.nac = 2'd2;
    host_write(REG_CTRL, 32'(c));
    host_write(REG_CMD, 32'h8);
    host_write(REG_CMD, 32'h1);
    n = 0;
    @(negedge clk);
    while (busy && n < 50000) begin @(negedge clk); n++; end
    host_read(REG_STATUS, v);
    check(v[1], "NOMEMORY");
    if (v[1]) m_nomem++;
    stream.delete();
    host_drain();
    nb = stream.size();
    check(nb >= 24 * (MEM_WORDS - 1) && pattern_errors(0, nb - 24, 4) == 0, $sformatf("overflow: %0d stored bytes intact", nb));

    // 5. no memory pool: 2 channels straight to the output, read by the DSP
    c = '0; c.nac = 2'd1; c.bypass = 1;
    host_write(REG_CTRL, 32'(c));
    host_write(REG_CMD, 32'h8);
    stream.delete();
    dsp_write(REG_CMD, 32'h1);
    fork
      begin
        int k = 0;
        while (k < 30) begin
          @(negedge clk);
          if (!dsp_int_n[0]) begin
            m_dsp_irq++;
            dsp_read(REG_DATA, v);
            for (int b = 0; b < 4; b++) stream.push_back(v[8*b +: 8]);
            k++; m_dsp_read++;
          end
        end
      end
    join
    dsp_write(REG_CMD, 32'h2);
    host_drain();
    host_read(REG_MEMCOUNT, v);
    nb = stream.size();
    check(v == 0 && pattern_errors(0, nb - 12, 2) == 0, $sformatf("bypass: %0d bytes in order", nb));
    m_bypass++; m_nac[1]++;

    // 6. one channel on the external clock, 5-sample words
    c = '0; c.nac = 2'd0; c.sel_ext = 1; c.five_mode = 1;
    host_write(REG_CTRL, 32'(c));
    host_write(REG_CMD, 32'h8);
    stream.delete();
    host_write(REG_CMD, 32'h1);
    repeat (100) @(negedge clk);
    host_write(REG_CMD, 32'h2);
    host_drain();
    host_write(REG_CMD, 32'h10);
    host_drain();
    nb = stream.size();
    check(nb > 60 && pattern_errors(0, (nb - 10) / 6 * 6, 1, 1) == 0, $sformatf("external clock, 5 samples: %0d bytes", nb));
    m_ext_clk++; m_five++; m_nac[0]++;

    // 7. local clock divided by 8: about one eighth of the data
    c = '0; c.nac = 2'd0; c.div_sel = 2'd3;
    host_write(REG_CTRL, 32'(c));
    host_write(REG_CMD, 32'h8);
    stream.delete();
    host_write(REG_CMD, 32'h1);
    repeat (600) @(negedge clk);
    host_write(REG_CMD, 32'h2);
    host_drain();
    nb = stream.size();
    // 600 cycles x 20 ns at 31.25 MHz = 375 samples
    check(nb > 330 && nb < 420 && pattern_errors(0, nb - 10, 1) == 0, $sformatf("divide by 8: %0d samples", nb));
    m_div++;

    // 8. clock-synchronised mode runs without a START
    c = '0; c.nac = 2'd2; c.clksync = 1;
    host_write(REG_CTRL, 32'(c));
    repeat (10) @(negedge clk);
    check(busy && trig_out, "clock-synchronised acquisition");
    if (busy) m_clksync++;
    c.clksync = 0;
    host_write(REG_CTRL, 32'(c));
    host_write(REG_CMD, 32'h2);
    stream.delete();
    host_drain();

    // 9. host interrupts the DSP by an address-only cycle
    n = m_addr_only;
    vme.addr_only(port(PORT_VME2DSP));
    repeat (10) @(negedge clk);
    check(m_addr_only == n + 1, "address-only cycle gives one DSP interrupt");
    m_addr_only -= n;

    begin : report
      int cnt [string];
      cnt["external START"] = m_ext_start; cnt["external STOP"] = m_ext_stop;
      cnt["Trigger Out"] = m_trig_out; cnt["host START"] = m_host_start;
      cnt["SEGMENTED"] = m_segment; cnt["REPEAT"] = m_repeat; cnt["PRE-TRIGGER"] = m_pretrig;
      cnt["NOMEMORY"] = m_nomem; cnt["bypass"] = m_bypass; cnt["block transfer"] = m_blt;
      cnt["broadcast"] = m_bcast; cnt["address-only"] = m_addr_only; cnt["DSP interrupt"] = m_dsp_irq;
      cnt["host interrupt"] = m_host_irq; cnt["HOLD/HOLDA"] = m_hold; cnt["external clock"] = m_ext_clk;
      cnt["divider"] = m_div; cnt["5-sample words"] = m_five; cnt["1 channel"] = m_nac[0];
      cnt["2 channels"] = m_nac[1]; cnt["4 channels"] = m_nac[2]; cnt["output FIFO full"] = m_ofifo_full;
      cnt["clock-synchronised"] = m_clksync; cnt["DSP program load"] = m_dsp_prog; cnt["DSP data read"] = m_dsp_read;
      foreach (cnt[k]) begin
        $display("  %-20s %0d", k, cnt[k]);
        check(cnt[k] > 0, $sformatf("mechanism %s happened", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
