// ccl: Common Control Logic.
//
// Two jobs. First, the DAB's programming ports are shared by the local
// DSP and the VME host. The DSP owns the local bus; when the host needs it
// (vme_br) and a DSP is fitted, the CCL asserts the DSP's HOLD, waits for
// HOLDA and then grants the bus (vme_bg) until the host lets go; without a
// DSP the grant is immediate. This is also how the host reaches the DSP's
// memory to load its program.
//
// Second, interrupts. Each of the four DSP interrupt pins INT0-INT3 can be
// given any DAB interrupt source or the host's interrupt (select 0-5: DAB
// source, 6: host-to-DSP, 7: none). Pulse sources are stretched to two
// cycles so that the DSP samples them; level sources (output FIFO data,
// NODATA, NOMEMORY) drive the pin for as long as they last, which lets the
// output FIFO flags start DSP DMA transfers directly. For the VME host the
// same DAB sources and a DSP-to-host request (the DSP writes CCL_DSP2VME)
// are latched in `pending`; the masked OR requests an interrupt on the
// programmed IRQ level with the programmed vector, and the acknowledge
// cycle (iack_done) clears the pending bits (release on acknowledge).
//
// Ports (dab_pkg map): CCL_DSPSEL 4 x 3-bit selects; CCL_VMEMASK 7-bit
// mask; CCL_PENDING read, write 1s to clear; CCL_VMEIRQ [2:0] level,
// [15:8] vector; CCL_DSP2VME write to interrupt the host. All on clk; the
// DSP pins are active low. The duties follow the design; the HOLD/HOLDA
// handshake, the select encoding and the two-cycle stretch are this
// design's own.
module ccl
  import dab_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               dsp_present,
  // local port
  input  logic               wr,
  input  logic [PORT_AW-1:0] addr,
  input  logic [BUS_W-1:0]   wdata,
  output logic [BUS_W-1:0]   rdata,
  // interrupt sources
  input  logic [N_SRC-1:0]   irq_src,
  input  logic               vme2dsp,
  output logic [3:0]         dsp_int_n,
  output logic               vme_irq_req,
  output logic [2:0]         vme_irq_level,
  output logic [7:0]         vme_vector,
  input  logic               iack_done,
  // bus request / grant
  input  logic               vme_br,
  output logic               vme_bg,
  output logic               dsp_hold_n,
  input  logic               dsp_holda_n
);
  localparam int unsigned NP = N_SRC + 1;

  logic [11:0]   dspsel;
  logic [NP-1:0] mask, pending;
  logic [7:0]    dsp_srcs, dsp_srcs_d;
  logic          dsp2vme;

  typedef enum logic [1:0] {A_IDLE, A_HOLD, A_GRANT, A_RELEASE} arb_e;
  arb_e arb;

  assign dsp2vme = wr && (addr == CCL_DSP2VME);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dspsel <= '1; mask <= '0; pending <= '0; vme_irq_level <= '0; vme_vector <= '0;
      dsp_srcs_d <= '0;
    end else begin
      dsp_srcs_d <= dsp_srcs;
      if (wr && addr == CCL_DSPSEL)  dspsel <= wdata[11:0];
      if (wr && addr == CCL_VMEMASK) mask <= wdata[NP-1:0];
      if (wr && addr == CCL_VMEIRQ) begin
        vme_irq_level <= wdata[2:0];
        vme_vector    <= wdata[15:8];
      end
      pending <= (iack_done ? '0 : (wr && addr == CCL_PENDING) ? pending & ~wdata[NP-1:0] : pending)
                 | {dsp2vme, irq_src};
    end
  end

  always_comb begin
    unique case (addr)
      CCL_DSPSEL:  rdata = 32'(dspsel);
      CCL_VMEMASK: rdata = 32'(mask);
      CCL_PENDING: rdata = 32'(pending);
      CCL_VMEIRQ:  rdata = {16'h0, vme_vector, 5'h0, vme_irq_level};
      default:     rdata = '0;
    endcase
  end

  // DSP interrupt pins
  assign dsp_srcs = {1'b0, vme2dsp, irq_src};
  always_comb
    for (int i = 0; i < 4; i++)
      dsp_int_n[i] = !(dsp_srcs[dspsel[3*i +: 3]] || dsp_srcs_d[dspsel[3*i +: 3]]);

  assign vme_irq_req = |(pending & mask) && (vme_irq_level != 3'd0);

  // bus request / grant
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) arb <= A_IDLE;
    else begin
      unique case (arb)
        A_IDLE:    if (vme_br) arb <= dsp_present ? A_HOLD : A_GRANT;
        A_HOLD:    if (!dsp_present || !dsp_holda_n) arb <= A_GRANT;
        A_GRANT:   if (!vme_br) arb <= A_RELEASE;
        A_RELEASE: if (!dsp_present || dsp_holda_n) arb <= A_IDLE;
        default:   arb <= A_IDLE;
      endcase
    end
  end
  assign vme_bg     = (arb == A_GRANT);
  assign dsp_hold_n = !(dsp_present && (arb == A_HOLD || arb == A_GRANT));
endmodule
