// out_fifo: the DAB output FIFO.
//
// A single-clock first-in first-out buffer of DEPTH 32-bit words between
// the data align stage and the readers (the DSP, possibly by DMA, or the
// VME host). The oldest word is shown on rdata while empty is low
// (first-word fall-through) and removed by rd. Its empty flag is the
// NODATA interrupt source. The 32-bit width follows the design; the depth
// is not given and 1024 words are assumed. All on clk.
module out_fifo #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  assign count = wp - rp;
  assign empty = (wp == rp);
  assign full  = (count == (AW+1)'(DEPTH));
  assign rdata = mem[rp[AW-1:0]];

  always_ff @(posedge clk)
    if (wr && !full) mem[wp[AW-1:0]] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
    end else if (clr) begin
      wp <= '0; rp <= '0;
    end else begin
      if (wr && !full) wp <= wp + 1'b1;
      if (rd && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
