// ac_mem: the large memory pool of one acquisition channel.
//
// WORDS x 48 bits of static RAM: six 512Kx8 chips side by side give the
// 3 MBytes per channel of the design. One access per 50 MHz cycle (the
// 15 ns RAMs are what set this rate): a write when we is high, otherwise a
// read whose data appears on rdata one cycle later. The address is shared
// by all channels and comes from the address generator. The size follows
// the design; the one-cycle synchronous read is this model's own.
module ac_mem #(
  parameter int unsigned WORDS = 524288,
  parameter int unsigned WIDTH = 48
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
