// vme_daq_top: the 1 GSPS VME data acquisition module.
//
// Four 250 MHz 8-bit acquisition channels, interleaved to 1 GSPS, each
// with a 24 KByte circular FIFO and a 3 MByte memory pool, are run by the
// Data Acquisition Block (dab). The block is programmed through a set of
// 32-bit ports and its data are read from a 32-bit output FIFO, either by
// the local DSP or by the VME host. The Common Control Logic (ccl) shares
// those ports between the two and routes interrupts; vme_slave is the
// A32/D32 block-transfer slave and vme_interrupter the ROAK interrupter.
//
// Local bus. The DSP (outside this logic) reaches the ports with dsp_wr,
// dsp_rd, dsp_addr, dsp_wdata and reads dsp_rdata combinationally. While
// the host holds the bus (after the CCL's HOLD/HOLDA handshake) the VME
// slave drives it instead. Word addresses 0x00-0x1F are the DAB's ports,
// 0x20-0x2F the CCL's (dab_pkg). The host's accesses to the DSP's own
// memory leave on the ext_* port.
//
// VMEbus signals are split into inputs, outputs and output enables
// (active-low names end in _n). The ADC samples arrive on adc_data in the
// adc_clk domain; clk is the 50 MHz DAB clock; start_in, stop_in and
// trig_in are asynchronous. The division into DAB, CCL and VME interface
// follows the design; the local bus and its map are this design's own.
module vme_daq_top
  import dab_pkg::*;
#(
  parameter int unsigned N_AC        = 4,
  parameter int unsigned FIFO_WORDS  = 4096,
  parameter int unsigned MEM_WORDS   = 524288,
  parameter int unsigned OFIFO_WORDS = 1024,
  parameter logic [7:0]  BCAST_BASE  = 8'hFF
) (
  input  logic                clk,
  input  logic                rst_n,
  // acquisition
  input  logic                osc_clk,
  input  logic                ext_clk,
  output logic                adc_clk,
  input  logic [SAMPLE_W-1:0] adc_data [N_AC],
  input  logic                start_in,
  input  logic                stop_in,
  input  logic                trig_in,
  output logic                trig_out,
  output logic                busy,
  // DSP local bus
  input  logic                dsp_present,
  input  logic                dsp_wr,
  input  logic                dsp_rd,
  input  logic [PORT_AW-1:0]  dsp_addr,
  input  logic [BUS_W-1:0]    dsp_wdata,
  output logic [BUS_W-1:0]    dsp_rdata,
  output logic [3:0]          dsp_int_n,
  output logic                dsp_hold_n,
  input  logic                dsp_holda_n,
  output logic                ext_req,
  output logic                ext_we,
  output logic [22:2]         ext_addr,
  output logic [31:0]         ext_wdata,
  input  logic [31:0]         ext_rdata,
  input  logic                ext_ack,
  // VMEbus
  input  logic [7:0]          board_base,
  input  logic                bcast_master,
  input  logic                vme_as_n,
  input  logic [1:0]          vme_ds_n,
  input  logic                vme_write_n,
  input  logic                vme_lword_n,
  input  logic                vme_iack_n,
  input  logic                vme_iackin_n,
  output logic                vme_iackout_n,
  input  logic [5:0]          vme_am,
  input  logic [31:1]         vme_a,
  input  logic [31:0]         vme_d_i,
  output logic [31:0]         vme_d_o,
  output logic                vme_d_oe,
  output logic                vme_dtack_n,
  output logic [7:1]          vme_irq_n
);
  logic [N_SRC-1:0]   irq_src;
  logic               br, bg, vme2dsp, irq_req, iack_done;
  logic [2:0]         irq_level;
  logic [7:0]         vector;
  logic               v_wr, v_rd, s_dtack_n, i_dtack_n, s_oe, i_oe;
  logic [PORT_AW-1:0] v_addr;
  logic [BUS_W-1:0]   v_wdata, s_do;
  logic [7:0]         i_do;

  // local bus: host when granted, otherwise the DSP
  logic               lb_wr, lb_rd;
  logic [PORT_AW-1:0] lb_addr;
  logic [BUS_W-1:0]   lb_wdata, lb_rdata, dab_rdata, ccl_rdata;
  logic               sel_dab;

  assign lb_wr    = bg ? v_wr    : dsp_wr;
  assign lb_rd    = bg ? v_rd    : dsp_rd;
  assign lb_addr  = bg ? v_addr  : dsp_addr;
  assign lb_wdata = bg ? v_wdata : dsp_wdata;
  assign sel_dab  = !lb_addr[5];
  assign lb_rdata = sel_dab ? dab_rdata : ccl_rdata;
  assign dsp_rdata = lb_rdata;

  dab #(.N_AC(N_AC), .FIFO_WORDS(FIFO_WORDS), .MEM_WORDS(MEM_WORDS), .OFIFO_WORDS(OFIFO_WORDS)) u_dab (
    .clk, .rst_n, .osc_clk, .ext_clk, .adc_clk, .adc_data, .start_in, .stop_in, .trig_in,
    .trig_out, .busy, .wr(lb_wr && sel_dab), .rd(lb_rd && sel_dab), .addr(lb_addr),
    .wdata(lb_wdata), .rdata(dab_rdata), .irq_src
  );

  ccl u_ccl (
    .clk, .rst_n, .dsp_present, .wr(lb_wr && !sel_dab), .addr(lb_addr), .wdata(lb_wdata),
    .rdata(ccl_rdata), .irq_src, .vme2dsp, .dsp_int_n, .vme_irq_req(irq_req),
    .vme_irq_level(irq_level), .vme_vector(vector), .iack_done, .vme_br(br), .vme_bg(bg),
    .dsp_hold_n, .dsp_holda_n
  );

  vme_slave #(.BCAST_BASE(BCAST_BASE)) u_vme (
    .clk, .rst_n, .board_base, .bcast_master, .as_n(vme_as_n), .ds_n(vme_ds_n),
    .write_n(vme_write_n), .lword_n(vme_lword_n), .iack_n(vme_iack_n), .am(vme_am),
    .a(vme_a), .d_i(vme_d_i), .d_o(s_do), .d_oe(s_oe), .dtack_n(s_dtack_n), .br, .bg,
    .lb_wr(v_wr), .lb_rd(v_rd), .lb_addr(v_addr), .lb_wdata(v_wdata), .lb_rdata,
    .ext_req, .ext_we, .ext_addr, .ext_wdata, .ext_rdata, .ext_ack, .vme2dsp
  );

  vme_interrupter u_int (
    .clk, .rst_n, .irq_req, .level(irq_level), .vector, .iack_done, .irq_n(vme_irq_n),
    .as_n(vme_as_n), .ds0_n(vme_ds_n[0]), .iack_n(vme_iack_n), .iackin_n(vme_iackin_n),
    .iackout_n(vme_iackout_n), .a(vme_a[3:1]), .d_o(i_do), .d_oe(i_oe), .dtack_n(i_dtack_n)
  );

  assign vme_dtack_n = s_dtack_n && i_dtack_n;
  assign vme_d_oe    = s_oe || i_oe;
  assign vme_d_o     = i_oe ? {24'h0, i_do} : s_do;
endmodule
