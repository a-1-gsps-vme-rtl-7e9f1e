// vme_slave: VMEbus A32/D32 slave with block transfers.
//
// Address decode. A31-A24 select a 16 MByte window: the board's own
// base (board switches) for reads and writes, or BCAST_BASE for writes
// only, which every board accepts at once, so one write can trigger
// several modules or load the same DSP program into all of them. Only the
// board whose bcast_master input is high answers a broadcast with DTACK*.
// In the window, offsets below 0x400000 are the local ports (word address
// A7-A2, map in dab_pkg); every address from 0x400000 to 0x7FFFFF is the
// DAB's DATA port, so a block transfer there empties the output FIFO
// while its address advances; offsets from 0x800000 reach the DSP's local
// memory through the ext_* request/acknowledge port. Address modifiers
// 09/0D are single A32 cycles and 0B/0F A32 block transfers; in a block
// transfer the address is taken once and advances by four bytes per data
// strobe. Only D32 transfers (LWORD* low, both data strobes) are answered.
//
// Cycle. The bus inputs are re-timed by two flip-flops of the 50 MHz clk.
// At AS* the address is taken and decoded. At the data strobe the slave
// asks the CCL for the local bus (br / bg; also for the DSP memory, whose
// bus the DSP must give up), makes one port access (or an ext access), drives DTACK* (and D31-D0 for a read) and releases them
// when the strobe goes. The bus is kept until AS* is released, so in a
// block transfer every later port access is made in the cycle the strobe
// is seen, and DTACK* follows the re-timed strobe: under five clock
// periods (100 ns) per 32-bit transfer with a fast master, the
// 40 MBytes/s the design aims at. An address-only cycle (AS* without a data strobe)
// to PORT_VME2DSP gives a one-cycle vme2dsp pulse that interrupts the DSP
// without taking the local bus. The A32/D32 block-transfer slave, the
// multi-board write decode and the address-only DSP interrupt follow the
// design; the address map, the AM list (VMEbus standard) and the
// broadcast-master rule are this design's own.
module vme_slave
  import dab_pkg::*;
#(
  parameter logic [7:0] BCAST_BASE = 8'hFF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         board_base,
  input  logic               bcast_master,
  // VMEbus, active-low controls as on the bus
  input  logic               as_n,
  input  logic [1:0]         ds_n,
  input  logic               write_n,
  input  logic               lword_n,
  input  logic               iack_n,
  input  logic [5:0]         am,
  input  logic [31:1]        a,
  input  logic [31:0]        d_i,
  output logic [31:0]        d_o,
  output logic               d_oe,
  output logic               dtack_n,
  // local port (through the CCL's grant)
  output logic               br,
  input  logic               bg,
  output logic               lb_wr,
  output logic               lb_rd,
  output logic [PORT_AW-1:0] lb_addr,
  output logic [BUS_W-1:0]   lb_wdata,
  input  logic [BUS_W-1:0]   lb_rdata,
  // DSP local memory
  output logic               ext_req,
  output logic               ext_we,
  output logic [22:2]        ext_addr,
  output logic [31:0]        ext_wdata,
  input  logic [31:0]        ext_rdata,
  input  logic               ext_ack,
  // address-only interrupt to the DSP
  output logic               vme2dsp
);
  typedef enum logic [2:0] {V_IDLE, V_ADDR, V_BUS, V_ACCESS, V_ACK, V_SKIP} st_e;
  st_e st;

  logic [1:0]  as_s, ds0_s, ds1_s;
  logic        as_l, ds_l;
  logic [23:2] off;
  logic        write_l, bcast, blt, answer, acc_done, fast;
  logic [31:0] wq;
  logic [31:0] rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s <= '1; ds0_s <= '1; ds1_s <= '1;
    end else begin
      as_s  <= {as_s[0], as_n};
      ds0_s <= {ds0_s[0], ds_n[0]};
      ds1_s <= {ds1_s[0], ds_n[1]};
    end
  end
  assign as_l = !as_s[1];
  assign ds_l = !ds0_s[1] && !ds1_s[1];

  function automatic logic am_a32(input logic [5:0] m);
    return m == 6'h09 || m == 6'h0D || m == 6'h0B || m == 6'h0F;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= V_IDLE; off <= '0; write_l <= 1'b0; bcast <= 1'b0; blt <= 1'b0;
      br <= 1'b0; rd_q <= '0; vme2dsp <= 1'b0; wq <= '0;
    end else begin
      vme2dsp <= 1'b0;
      unique case (st)
        V_IDLE:
          if (as_l && iack_n) begin
            off     <= a[23:2];
            write_l <= !write_n;
            blt     <= am == 6'h0B || am == 6'h0F;
            bcast   <= a[31:24] == BCAST_BASE;
            if (am_a32(am) && (a[31:24] == board_base || a[31:24] == BCAST_BASE)) st <= V_ADDR;
            else st <= V_SKIP;
          end
        V_ADDR:
          if (!as_l) begin
            if (!off[23] && off[7:2] == PORT_VME2DSP) vme2dsp <= 1'b1;
            st <= V_IDLE;
          end else if (ds_l) begin
            if (lword_n || (bcast && !write_l)) st <= V_SKIP;
            else if (fast) begin
              rd_q <= lb_rdata;
              st   <= V_ACK;
            end else begin
              wq       <= d_i;
              st       <= V_BUS;
              br       <= 1'b1;
            end
          end
        V_BUS:
          if (bg) st <= V_ACCESS;
        V_ACCESS:
          if (acc_done) begin
            rd_q <= off[23] ? ext_rdata : lb_rdata;
            st   <= V_ACK;
          end
        V_ACK:
          if (!ds_l) begin
            if (blt) off <= off + 1'b1;
            st <= blt ? V_ADDR : V_SKIP;
          end
        V_SKIP:
          if (!as_l) begin
            st <= V_IDLE;
            br <= 1'b0;
          end
        default: st <= V_IDLE;
      endcase
      if (st == V_ADDR && !as_l) br <= 1'b0;
    end
  end

  // A port access made straight from the address state when the bus is
  // already held (every transfer after the first of a block transfer).
  assign fast      = (st == V_ADDR) && as_l && ds_l && !off[23] && bg && !lword_n
                     && !(bcast && !write_l);
  assign acc_done  = off[23] ? ext_ack : 1'b1;
  assign lb_addr   = off[22] ? REG_DATA : off[7:2];
  assign lb_wdata  = fast ? d_i : wq;
  assign lb_wr     = ((st == V_ACCESS) && !off[23] && write_l) || (fast && write_l);
  assign lb_rd     = ((st == V_ACCESS) && !off[23] && !write_l) || (fast && !write_l);
  assign ext_req   = (st == V_ACCESS) && off[23];
  assign ext_we    = write_l;
  assign ext_addr  = off[22:2];
  assign ext_wdata = wq;
  assign answer    = !bcast || bcast_master;
  // DTACK* follows the re-timed strobe directly, so it falls in the cycle
  // a fast access is made and rises as soon as the strobe is seen gone.
  assign dtack_n   = !(((st == V_ACK) && ds_l && answer) || (fast && answer));
  assign d_oe      = (((st == V_ACK) && ds_l) || fast) && !write_l && answer;
  assign d_o       = fast ? lb_rdata : rd_q;
endmodule
