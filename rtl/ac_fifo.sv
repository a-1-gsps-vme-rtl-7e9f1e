// ac_fifo: the circular buffer of one acquisition channel.
//
// A dual-clock first-in first-out memory of DEPTH 48-bit words (4096 words
// are the 24 KBytes of the design). It lets the ADC side write at the ADC
// word rate while the DAB reads at 50 MHz, asynchronously to each other.
// The pointers cross between the clocks in Gray code through two
// flip-flops. The read side shows the oldest word on rdata whenever empty
// is low (first-word fall-through) and removes it on rd_en. The read side
// also reports its fill level, full (level = DEPTH) and afull, the
// "in danger of becoming full" flag (level >= DEPTH - AFULL_MARGIN).
// flush (read clock) empties the buffer by moving the read pointer to the
// write pointer; it must only be used while the writer is idle.
//
// Size and dual-clock use follow the design; the pointer scheme, the
// fall-through output and the margin are this design's own.
module ac_fifo #(
  parameter int unsigned DEPTH        = 4096,
  parameter int unsigned WIDTH        = 48,
  parameter int unsigned AFULL_MARGIN = 64
) (
  input  logic             wclk,
  input  logic             rclk,
  input  logic             rst_n,
  // write side (wclk)
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  // read side (rclk)
  input  logic             rd_en,
  input  logic             flush,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic             afull,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  always_ff @(posedge wclk)
    if (wr_en && !wfull) mem[wbin[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wfull) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end
  assign rbin_w = gray2bin(rgray_w2);
  assign wfull  = (wbin - rbin_w) >= (AW+1)'(DEPTH);

  // read side
  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (flush) begin
        rbin  <= wbin_r;
        rgray <= bin2gray(wbin_r);
      end else if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
  assign wbin_r = gray2bin(wgray_r2);
  assign level  = wbin_r - rbin;
  assign empty  = (level == '0);
  assign full   = level >= (AW+1)'(DEPTH);
  assign afull  = level >= (AW+1)'(DEPTH - AFULL_MARGIN);
  assign rdata  = mem[rbin[AW-1:0]];
endmodule
