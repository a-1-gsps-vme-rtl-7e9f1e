// output_control: collects the rows read from the channels for the output.
//
// A row (one 48-bit word per channel) leaves the channels either from the
// memory pool (OP_READ, data one cycle later) or, when no memory is fitted,
// straight from the FIFOs (OP_PASS, registered here so both paths have the
// same one-cycle delay). Rows are held in a two-entry buffer from which the
// data align stage takes them. room tells the address generator it may
// start another row: the entries held plus the row in flight stay within
// two, so nothing is ever dropped. The role (move rows as soon as data are
// there and the output is not full) follows the design; the buffer is this
// design's own. clr empties the buffer and drops a row in flight (the
// software clear of the DAB). All on clk.
module output_control
  import dab_pkg::*;
#(
  parameter int unsigned N_AC = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  mem_op_e              op,
  input  logic [AC_WORD_W-1:0] mem_rdata  [N_AC],
  input  logic [AC_WORD_W-1:0] fifo_rdata [N_AC],
  output logic                 room,
  output logic                 row_valid,
  output logic [AC_WORD_W-1:0] row        [N_AC],
  input  logic                 row_take,
  output logic                 empty
);
  logic                 inflight, from_fifo;
  logic [AC_WORD_W-1:0] fifo_q [N_AC];
  logic [AC_WORD_W-1:0] buf0 [N_AC];
  logic [AC_WORD_W-1:0] buf1 [N_AC];
  logic [AC_WORD_W-1:0] arrive [N_AC];
  logic [1:0]           cnt;

  always_comb
    for (int i = 0; i < int'(N_AC); i++) arrive[i] = from_fifo ? fifo_q[i] : mem_rdata[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= 1'b0; from_fifo <= 1'b0; cnt <= '0;
    end else if (clr) begin
      inflight <= 1'b0; from_fifo <= 1'b0; cnt <= '0;
    end else begin
      inflight  <= (op == OP_READ) || (op == OP_PASS);
      from_fifo <= (op == OP_PASS);
      if (op == OP_PASS) fifo_q <= fifo_rdata;
      unique case ({inflight, row_take && cnt != 0})
        2'b10: begin
          if (cnt == 0) buf0 <= arrive; else buf1 <= arrive;
          cnt <= cnt + 1'b1;
        end
        2'b01: begin
          buf0 <= buf1;
          cnt  <= cnt - 1'b1;
        end
        2'b11: begin
          if (cnt == 1) buf0 <= arrive;
          else begin buf0 <= buf1; buf1 <= arrive; end
        end
        default: ;
      endcase
    end
  end

  assign row_valid = (cnt != 0);
  assign row       = buf0;
  assign room      = (32'(cnt) + 32'(inflight)) < 2;
  assign empty     = (cnt == 0) && !inflight;
endmodule
