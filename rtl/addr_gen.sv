// addr_gen: memory pointers and the choice of memory operation.
//
// All channels share one address: a row of the memory pool holds one word
// of every channel. Two circular pointers are kept: wr_ptr, where the next
// row from the FIFOs is stored, and rd_ptr, the next row to send to the
// output. The pool is full when wr_ptr + 1 = rd_ptr, so the write pointer
// never overwrites unread rows and the read pointer never passes the write
// pointer.
//
// Each 50 MHz cycle one operation is chosen (the static RAMs allow one):
//   OP_WRITE   FIFO row to memory, when storing is allowed, the FIFOs hold
//              more than `keep` words and memory is not full;
//   OP_PASS    the same, straight to the output, when no memory is fitted;
//   OP_DISCARD FIFO row dropped (pre-trigger samples older than the
//              programmed depth, or flushing);
//   OP_READ    memory row to the output, when the output can take it,
//              memory is not empty and the FIFOs are not near full or the
//              acquisition has stopped.
// Moving FIFO data takes precedence, so acquired data go to memory as soon
// as they are there and reads use the spare cycles. The pointer scheme and
// the read rule follow the design; the order of precedence is this
// design's own. Outputs are combinational from the inputs and pointers.
module addr_gen
  import dab_pkg::*;
#(
  parameter int unsigned AW = 19,
  parameter int unsigned LW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,         // empty the pool
  input  logic          bypass,
  input  logic          gate,        // acquisition running
  input  logic          store_ok,
  input  logic          discard_ok,
  input  logic [LW-1:0] keep,        // words to leave in the FIFOs
  input  logic [LW-1:0] fifo_level,
  input  logic          fifo_afull,
  input  logic          out_room,
  output mem_op_e       op,
  output logic          fifo_rd,
  output logic [AW-1:0] mem_addr,
  output logic          mem_full,
  output logic          mem_empty,
  output logic [AW-1:0] mem_count
);
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic fifo_ready, read_ok;

  assign mem_full   = (wr_ptr + 1'b1) == rd_ptr;
  assign mem_empty  = wr_ptr == rd_ptr;
  assign mem_count  = wr_ptr - rd_ptr;
  assign fifo_ready = fifo_level > keep;
  assign read_ok    = !bypass && out_room && !mem_empty && (!fifo_afull || !gate);

  always_comb begin
    op = OP_NONE;
    if (fifo_ready && store_ok && !bypass && !mem_full) op = OP_WRITE;
    else if (fifo_ready && store_ok && bypass && out_room) op = OP_PASS;
    else if (fifo_ready && discard_ok) op = OP_DISCARD;
    else if (read_ok) op = OP_READ;
  end

  assign fifo_rd  = (op == OP_WRITE) || (op == OP_PASS) || (op == OP_DISCARD);
  assign mem_addr = (op == OP_READ) ? rd_ptr : wr_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0; rd_ptr <= '0;
    end else if (clr) begin
      wr_ptr <= '0; rd_ptr <= '0;
    end else begin
      if (op == OP_WRITE) wr_ptr <= wr_ptr + 1'b1;
      if (op == OP_READ)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // The pool is never over-written and never read past the write pointer.
  assert property (@(posedge clk) disable iff (!rst_n) op == OP_WRITE |-> !mem_full);
  assert property (@(posedge clk) disable iff (!rst_n) op == OP_READ  |-> !mem_empty);
endmodule
