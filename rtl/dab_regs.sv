// dab_regs: the programming and status ports of the Data Acquisition Block.
//
// The DAB is run by writing a set of ports and then reading data from its
// output FIFO. Each port is a 32-bit word at a word address of the local
// bus (map in dab_pkg):
//   CTRL     r/w  operating mode (ctrl_t): PRE-TRIGGER, SEGMENTED, REPEAT,
//                 clock-synchronised, no-memory bypass, 5-sample words,
//                 ACs in use, clock source and divider
//   CMD      w    one-cycle commands: start, stop, trigger in, clear, flush
//   SEGMENT  r/w  words per segment (16 bits)
//   DELAY    r/w  REPEAT delay in 20 ns units (16 bits)
//   REPEAT   r/w  number of automatic re-starts (16 bits)
//   PTDEPTH  r/w  pre-trigger depth in FIFO words (the DAB uses at most
//                 FIFO_WORDS - 2 = 4094)
//   STATUS   r    busy, NOMEMORY, output FIFO flags, memory flags, gate,
//                 output FIFO word count in [31:16]
//   PTTIME_L/H r  40-bit START to Trigger In time
//   MEMCOUNT r    rows waiting in the memory pool
//   DATA     r    the output FIFO; each read removes one word
//   CYCLES   r    REPEAT cycles done
// Writes act on the clock edge with wr high; reads are combinational from
// addr, and a read of DATA pops the FIFO at that edge. The set of
// programmable quantities follows the design; the map and encodings are
// this design's own.
module dab_regs
  import dab_pkg::*;
#(
  parameter int unsigned LW = 13
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr,
  input  logic               rd,
  input  logic [PORT_AW-1:0] addr,
  input  logic [BUS_W-1:0]   wdata,
  output logic [BUS_W-1:0]   rdata,
  // programmed values
  output ctrl_t              ctrl,
  output cmd_t               cmd,
  output logic [15:0]        segment,
  output logic [15:0]        delay,
  output logic [15:0]        repeats,
  output logic [LW-1:0]      pt_depth,
  output logic               data_pop,
  // status
  input  logic [7:0]         status,
  input  logic [15:0]        ofifo_count,
  input  logic [39:0]        pt_time,
  input  logic [31:0]        mem_count,
  input  logic [BUS_W-1:0]   ofifo_data,
  input  logic [15:0]        cycles
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= '0; cmd <= '0; segment <= '0; delay <= '0; repeats <= '0; pt_depth <= '0;
    end else begin
      cmd <= '0;
      if (wr) begin
        unique case (addr)
          REG_CTRL:    ctrl     <= ctrl_t'({21'h0, wdata[10:0]});  // reserved bits read 0
          REG_CMD:     cmd      <= cmd_t'(wdata[$bits(cmd_t)-1:0]);
          REG_SEGMENT: segment  <= wdata[15:0];
          REG_DELAY:   delay    <= wdata[15:0];
          REG_REPEAT:  repeats  <= wdata[15:0];
          REG_PTDEPTH: pt_depth <= wdata[LW-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (addr)
      REG_CTRL:     rdata = ctrl;
      REG_SEGMENT:  rdata = 32'(segment);
      REG_DELAY:    rdata = 32'(delay);
      REG_REPEAT:   rdata = 32'(repeats);
      REG_PTDEPTH:  rdata = 32'(pt_depth);
      REG_STATUS:   rdata = {ofifo_count, 8'h00, status};
      REG_PTTIME_L: rdata = pt_time[31:0];
      REG_PTTIME_H: rdata = 32'(pt_time[39:32]);
      REG_MEMCOUNT: rdata = mem_count;
      REG_DATA:     rdata = ofifo_data;
      REG_CYCLES:   rdata = 32'(cycles);
      default:      rdata = '0;
    endcase
  end

  assign data_pop = rd && (addr == REG_DATA);
endmodule
