// data_align: channel words to the 32-bit output stream.
//
// Each channel delivers 48-bit words of six samples, the outside world
// reads 32-bit words. With N channels in use (1, 2 or 4) a row carries
// 6N samples; when the channels are interleaved, channel k takes sample k
// of every group of N, so sample j of channel k becomes byte j*N + k of
// the row. The row's bytes are appended to a 32-byte shift buffer and
// leave it four at a time, least significant byte first, whenever the
// output FIFO is not full. A row is taken only when it fits behind the
// bytes still waiting. flush pushes out a last partial word padded with
// zero bytes; clr drops the bytes held. The 48-to-32-bit re-ordering by the number of channels in use
// follows the design; the byte order and the padding are this design's own.
// All on clk; row_take and out_wr are combinational.
module data_align
  import dab_pkg::*;
#(
  parameter int unsigned N_AC = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic [1:0]           nac,
  input  logic                 row_valid,
  input  logic [AC_WORD_W-1:0] row [N_AC],
  output logic                 row_take,
  input  logic                 flush,
  input  logic                 out_full,
  output logic                 out_wr,
  output logic [BUS_W-1:0]     out_data,
  output logic                 pending
);
  localparam int unsigned BUFB = 32;  // bytes held
  localparam int unsigned NB   = AC_WORD_W / SAMPLE_W;

  logic [8*BUFB-1:0] sbuf, after_emit, rowbytes;
  logic [5:0]        cnt, cnt_after, rb;
  logic              emit, pad;
  int unsigned       n;

  always_comb begin
    n = nac_count(nac);
    if (n > N_AC) n = N_AC;
    rb = 6'(NB * n);
    rowbytes = '0;
    for (int k = 0; k < int'(N_AC); k++)
      for (int j = 0; j < int'(NB); j++)
        if (k < int'(n))
          rowbytes[8*(j*int'(n)+k) +: 8] = row[k][8*j +: 8];
    pad       = flush && (cnt != 0) && (cnt < 4) && !row_valid;
    emit      = ((cnt >= 4) || pad) && !out_full;
    after_emit = emit ? (sbuf >> 32) : sbuf;
    cnt_after  = emit ? ((cnt >= 4) ? cnt - 6'd4 : 6'd0) : cnt;
    row_take  = row_valid && ((7'(cnt_after) + 7'(rb)) <= 7'(BUFB));
  end

  assign out_wr   = emit;
  assign out_data = sbuf[31:0];
  assign pending  = (cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sbuf <= '0; cnt <= '0;
    end else if (clr) begin
      sbuf <= '0; cnt <= '0;
    end else begin
      if (row_take) begin
        sbuf <= after_emit | (rowbytes << (8 * cnt_after));
        cnt  <= cnt_after + rb;
      end else begin
        sbuf <= after_emit;
        cnt  <= cnt_after;
      end
    end
  end
endmodule
