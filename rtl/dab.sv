// dab: the Data Acquisition Block.
//
// Up to four acquisition channels (AC) sample in parallel on one ADC
// clock; with the ADC clocks of the four channels shifted by a quarter
// period outside this logic they interleave to 1 GSPS. Each channel packs
// six samples into a 48-bit word (sample_packer), buffers it in its 24
// KByte circular FIFO (ac_fifo, crossing from the ADC clock to the 50 MHz
// DAB clock) and stores it in its 3 MByte memory pool (ac_mem). All
// channels move in lock step: one address generator (addr_gen) serves every
// memory, and the FIFOs are read in parallel, one row per 20 ns cycle.
//
// The trigger logic opens and closes the acquisition gate and runs the
// PRE-TRIGGER, SEGMENTED and REPEAT modes with the segment, delay, repeat
// and pre-trigger counters; the error detector stops before data would be
// lost. Rows read back from memory (or passed straight on when no memory
// is fitted) go through output_control and data_align into the 32-bit
// output FIFO, read through the DATA port. The channels' clock comes from
// clock_gen (external clock or local 250 MHz oscillator divided by
// 1/2/4/8).
//
// Interface: clk is the 50 MHz DAB clock; the local port (wr, rd, addr,
// wdata, rdata) is the register map of dab_regs; adc_data are the ADC
// outputs, valid on the rising edge of adc_clk; start_in, stop_in and
// trig_in are asynchronous; irq_src are the interrupt sources (dab_pkg
// SRC_*): START, STOP and TRIGIN are one-cycle pulses, the others levels.
// The pre-trigger depth is clamped to FIFO_WORDS - 2 words (4094 of the
// 4096), the most a FIFO can hold back without overflowing. The segment
// count and the delay-running flag are not read by anything here, which
// leaves two unused-signal lint warnings. The block structure follows
// the design. The clamp is this design's own. The details of each part
// are described in its own file.
module dab
  import dab_pkg::*;
#(
  parameter int unsigned N_AC         = 4,
  parameter int unsigned FIFO_WORDS   = 4096,
  parameter int unsigned MEM_WORDS    = 524288,
  parameter int unsigned OFIFO_WORDS  = 1024,
  parameter int unsigned AFULL_MARGIN = 64,
  parameter int unsigned RESET_CYCLES = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                osc_clk,
  input  logic                ext_clk,
  output logic                adc_clk,
  input  logic [SAMPLE_W-1:0] adc_data [N_AC],
  input  logic                start_in,
  input  logic                stop_in,
  input  logic                trig_in,
  output logic                trig_out,
  output logic                busy,
  input  logic                wr,
  input  logic                rd,
  input  logic [PORT_AW-1:0]  addr,
  input  logic [BUS_W-1:0]    wdata,
  output logic [BUS_W-1:0]    rdata,
  output logic [N_SRC-1:0]    irq_src
);
  localparam int unsigned LW = $clog2(FIFO_WORDS) + 1;
  localparam int unsigned AW = $clog2(MEM_WORDS);

  ctrl_t        ctrl;
  cmd_t         cmd;
  logic [15:0]  segment, delay, repeats, seg_count, rep_count;
  logic [LW-1:0] pt_depth, pt_keep, keep;
  logic         data_pop;
  logic [39:0]  pt_time;

  // channel signals
  logic [N_AC-1:0]      pk_idle, f_empty, f_full, f_afull;
  logic [LW-1:0]        f_level [N_AC];
  logic [AC_WORD_W-1:0] f_rdata [N_AC];
  logic [AC_WORD_W-1:0] m_rdata [N_AC];

  // control
  logic gate, store_ok, discard_ok, fifo_flush, seg_clr, rep_clr, rep_inc;
  logic delay_load, pt_clr, pt_run, ev_start, ev_stop, ev_trigin;
  logic seg_done, delay_done, delay_running, rep_last, err_stop, nomem;
  mem_op_e op;
  logic fifo_rd, mem_full, mem_empty, out_room;
  logic [AW-1:0] mem_addr, mem_count;

  // output path
  logic                 row_valid, row_take, oc_empty;
  logic [AC_WORD_W-1:0] row [N_AC];
  logic                 al_wr, al_pending, flush_req;
  logic [BUS_W-1:0]     al_data, of_data;
  logic                 of_empty, of_full;
  logic [$clog2(OFIFO_WORDS):0] of_count;
  int unsigned          n_used;

  assign n_used = nac_count(ctrl.nac);

  clock_gen u_clk (
    .osc_clk, .ext_clk, .rst_n, .sel_ext(ctrl.sel_ext), .div_sel(ctrl.div_sel), .adc_clk
  );

  for (genvar k = 0; k < int'(N_AC); k++) begin : g_ac
    logic                 pk_wr, wfull;
    logic [AC_WORD_W-1:0] pk_data;

    sample_packer u_pack (
      .adc_clk, .rst_n, .gate(gate && (k < int'(n_used))), .five_mode(ctrl.five_mode),
      .sample(adc_data[k]), .fifo_full(wfull), .wr_en(pk_wr), .wr_data(pk_data), .idle(pk_idle[k])
    );

    ac_fifo #(.DEPTH(FIFO_WORDS), .WIDTH(AC_WORD_W), .AFULL_MARGIN(AFULL_MARGIN)) u_fifo (
      .wclk(adc_clk), .rclk(clk), .rst_n, .wr_en(pk_wr), .wdata(pk_data), .wfull,
      .rd_en(fifo_rd), .flush(fifo_flush), .rdata(f_rdata[k]), .empty(f_empty[k]),
      .full(f_full[k]), .afull(f_afull[k]), .level(f_level[k])
    );

    ac_mem #(.WORDS(MEM_WORDS), .WIDTH(AC_WORD_W)) u_mem (
      .clk, .en(op == OP_WRITE || op == OP_READ), .we(op == OP_WRITE), .addr(mem_addr),
      .wdata(f_rdata[k]), .rdata(m_rdata[k])
    );
  end

  // The read side sees the FIFO level two words late (pointer
  // re-timing), so at most FIFO_WORDS - 2 words can be held back without
  // the FIFO overflowing; a larger pre-trigger depth is clamped to that.
  localparam logic [LW-1:0] PT_MAX = LW'(FIFO_WORDS - 2);
  assign pt_keep = (pt_depth > PT_MAX) ? PT_MAX : pt_depth;

  trigger_logic #(.RESET_CYCLES(RESET_CYCLES), .LW(LW)) u_trig (
    .clk, .rst_n, .ctrl, .pt_depth(pt_keep), .start_in, .stop_in, .trig_in,
    .sw_start(cmd.start), .sw_stop(cmd.stop), .sw_trigin(cmd.trigin),
    .seg_done, .err_stop, .delay_done, .rep_last, .ch_idle(&pk_idle),
    .fifo_empty(&f_empty), .error(nomem),
    .gate, .trig_out, .busy, .store_ok, .discard_ok, .fifo_flush, .keep,
    .seg_clr, .rep_clr, .rep_inc, .delay_load, .pt_clr, .pt_run,
    .ev_start, .ev_stop, .ev_trigin
  );

  segment_counter #(.W(16)) u_seg (
    .clk, .rst_n, .clr(seg_clr || cmd.clear), .inc(op == OP_WRITE || op == OP_PASS),
    .target(segment), .count(seg_count), .done(seg_done)
  );
  delay_counter #(.W(16)) u_delay (
    .clk, .rst_n, .load(delay_load), .delay, .running(delay_running), .done(delay_done)
  );
  repeat_counter #(.W(16)) u_rep (
    .clk, .rst_n, .clr(rep_clr || cmd.clear), .inc(rep_inc), .end_value(repeats),
    .count(rep_count), .last(rep_last)
  );
  pretrig_counter #(.W(40)) u_pt (
    .clk, .rst_n, .clr(pt_clr || cmd.clear), .run(pt_run), .count(pt_time)
  );

  error_detect u_err (
    .clk, .rst_n, .clr(cmd.clear), .gate, .bypass(ctrl.bypass), .fifo_full(|f_full),
    .fifo_afull(|f_afull), .mem_full, .stop(err_stop), .nomem
  );

  addr_gen #(.AW(AW), .LW(LW)) u_addr (
    .clk, .rst_n, .clr(cmd.clear), .bypass(ctrl.bypass), .gate, .store_ok, .discard_ok,
    .keep, .fifo_level(f_level[0]), .fifo_afull(|f_afull), .out_room, .op, .fifo_rd,
    .mem_addr, .mem_full, .mem_empty, .mem_count
  );

  output_control #(.N_AC(N_AC)) u_oc (
    .clk, .rst_n, .clr(cmd.clear), .op, .mem_rdata(m_rdata), .fifo_rdata(f_rdata), .room(out_room),
    .row_valid, .row, .row_take, .empty(oc_empty)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         flush_req <= 1'b0;
    else if (cmd.clear) flush_req <= 1'b0;
    else if (cmd.flush) flush_req <= 1'b1;
    else if (!al_pending && oc_empty) flush_req <= 1'b0;

  data_align #(.N_AC(N_AC)) u_align (
    .clk, .rst_n, .clr(cmd.clear), .nac(ctrl.nac), .row_valid, .row, .row_take, .flush(flush_req),
    .out_full(of_full), .out_wr(al_wr), .out_data(al_data), .pending(al_pending)
  );

  out_fifo #(.DEPTH(OFIFO_WORDS), .WIDTH(BUS_W)) u_ofifo (
    .clk, .rst_n, .clr(cmd.clear), .wr(al_wr), .wdata(al_data), .rd(data_pop),
    .rdata(of_data), .empty(of_empty), .full(of_full), .count(of_count)
  );

  dab_regs #(.LW(LW)) u_regs (
    .clk, .rst_n, .wr, .rd, .addr, .wdata, .rdata, .ctrl, .cmd, .segment, .delay,
    .repeats, .pt_depth, .data_pop,
    .status({al_pending, gate, mem_full, mem_empty, of_full, of_empty, nomem, busy}),
    .ofifo_count(16'(of_count)), .pt_time, .mem_count(32'(mem_count)),
    .ofifo_data(of_data), .cycles(rep_count)
  );

  always_comb begin
    irq_src             = '0;
    irq_src[SRC_START]  = ev_start;
    irq_src[SRC_STOP]   = ev_stop;
    irq_src[SRC_TRIGIN] = ev_trigin;
    irq_src[SRC_DATA]   = !of_empty;
    irq_src[SRC_NODATA] = of_empty;
    irq_src[SRC_NOMEM]  = nomem;
  end
endmodule
