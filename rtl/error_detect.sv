// error_detect: stop before data is lost.
//
// During an acquisition data would be lost if an AC FIFO filled up, which
// happens when the memory pool is full (the read pointer would be
// overwritten) and the FIFOs are near full, or when a FIFO is full for
// any reason. Either case gives a one-cycle stop pulse to the trigger
// logic and sets the sticky NOMEMORY flag, which is an interrupt source
// and stays set until cleared by software. Without memory (bypass) only a
// full FIFO counts. All on clk. The rule "stop the acquisition when data
// could be lost, and interrupt" follows the design; the exact conditions
// are this design's own.
module error_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic gate,
  input  logic bypass,
  input  logic fifo_full,
  input  logic fifo_afull,
  input  logic mem_full,
  output logic stop,
  output logic nomem
);
  logic risk;
  assign risk = gate && (fifo_full || (!bypass && fifo_afull && mem_full));
  assign stop = risk && !nomem;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    nomem <= 1'b0;
    else if (clr)  nomem <= 1'b0;
    else if (risk) nomem <= 1'b1;
endmodule
