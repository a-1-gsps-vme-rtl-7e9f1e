// dab_pkg: types and constants shared by the acquisition module.
//
// The Data Acquisition Block (DAB) stores each acquisition channel's
// samples as 48-bit words (six 8-bit samples) and talks to the outside
// world through 32-bit ports. This package holds the word widths, the
// register map of the DAB and Common Control Logic ports, the operating
// mode bits and the interrupt source numbering. The 8-bit sample, 48-bit
// AC word and 32-bit output follow the design; the register map, the
// bit positions and the interrupt numbering are this design's own.
package dab_pkg;

  localparam int unsigned SAMPLE_W   = 8;
  localparam int unsigned AC_WORD_W  = 48;  // six samples per AC word
  localparam int unsigned BUS_W      = 32;
  localparam int unsigned PORT_AW    = 6;   // word address of a local port

  // Local port map (word addresses). 0x00-0x1F DAB, 0x20-0x2F CCL,
  // 0x30 is the address-only port that interrupts the DSP.
  localparam logic [PORT_AW-1:0] REG_CTRL     = 6'h00;
  localparam logic [PORT_AW-1:0] REG_CMD      = 6'h01;
  localparam logic [PORT_AW-1:0] REG_SEGMENT  = 6'h02;
  localparam logic [PORT_AW-1:0] REG_DELAY    = 6'h03;
  localparam logic [PORT_AW-1:0] REG_REPEAT   = 6'h04;
  localparam logic [PORT_AW-1:0] REG_PTDEPTH  = 6'h05;
  localparam logic [PORT_AW-1:0] REG_STATUS   = 6'h06;
  localparam logic [PORT_AW-1:0] REG_PTTIME_L = 6'h07;
  localparam logic [PORT_AW-1:0] REG_PTTIME_H = 6'h08;
  localparam logic [PORT_AW-1:0] REG_MEMCOUNT = 6'h09;
  localparam logic [PORT_AW-1:0] REG_DATA     = 6'h0A;
  localparam logic [PORT_AW-1:0] REG_CYCLES   = 6'h0B;

  localparam logic [PORT_AW-1:0] CCL_DSPSEL   = 6'h20;  // 4 x 3-bit source select
  localparam logic [PORT_AW-1:0] CCL_VMEMASK  = 6'h21;  // host interrupt mask
  localparam logic [PORT_AW-1:0] CCL_PENDING  = 6'h22;  // read pending, write 1 to clear
  localparam logic [PORT_AW-1:0] CCL_VMEIRQ   = 6'h23;  // [2:0] IRQ level, [15:8] vector
  localparam logic [PORT_AW-1:0] CCL_DSP2VME  = 6'h24;  // DSP writes here to interrupt the host
  localparam logic [PORT_AW-1:0] PORT_VME2DSP = 6'h30;  // address-only access from the host

  // Operating modes, written to REG_CTRL.
  typedef struct packed {
    logic [20:0] rsvd;
    logic [1:0]  div_sel;    // local oscillator divided by 1, 2, 4, 8
    logic        sel_ext;    // external clock source
    logic [1:0]  nac;        // ACs in use: 0 -> 1, 1 -> 2, 2 -> 4
    logic        five_mode;  // 5 samples per word (50 MHz storage clock option)
    logic        bypass;     // no memory pool: FIFOs feed the output directly
    logic        clksync;    // clock-synchronised trigger
    logic        repeat_m;   // REPEAT mode
    logic        segmented;  // SEGMENTED mode
    logic        pretrig;    // PRE-TRIGGER mode
  } ctrl_t;

  // Software commands, write strobes in REG_CMD.
  typedef struct packed {
    logic flush;    // push out a last partial output word
    logic clear;    // clear memory pointers, error and counters
    logic trigin;
    logic stop;
    logic start;
  } cmd_t;

  // Memory operation chosen by the address generator each 50 MHz cycle.
  typedef enum logic [2:0] {
    OP_NONE, OP_WRITE, OP_READ, OP_DISCARD, OP_PASS
  } mem_op_e;

  // Interrupt sources of the DAB.
  localparam int unsigned N_SRC     = 6;
  localparam int unsigned SRC_START = 0;
  localparam int unsigned SRC_STOP  = 1;
  localparam int unsigned SRC_TRIGIN= 2;
  localparam int unsigned SRC_DATA  = 3;  // output FIFO not empty
  localparam int unsigned SRC_NODATA= 4;  // output FIFO empty
  localparam int unsigned SRC_NOMEM = 5;  // error: acquisition stopped to avoid data loss

  function automatic int unsigned nac_count(input logic [1:0] nac);
    case (nac)
      2'd0:    return 1;
      2'd1:    return 2;
      default: return 4;
    endcase
  endfunction

endpackage
