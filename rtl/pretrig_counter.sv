// pretrig_counter: time from START to Trigger In.
//
// A 40-bit counter at the 50 MHz DAB clock, cleared by the START of a
// PRE-TRIGGER acquisition and counting while the pre-trigger phase lasts;
// it stops at Trigger In and holds the elapsed time in 20 ns units for
// the host to read. Width and rate follow the design.
module pretrig_counter #(
  parameter int unsigned W = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         run,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (run) count <= count + 1'b1;
endmodule
