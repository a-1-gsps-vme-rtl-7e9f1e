// repeat_counter: number of cycles in REPEAT mode.
//
// Cleared by a START from outside (external input or software), it
// advances at every automatic re-start. last is high once the count has
// reached the programmed end value, after which the trigger logic stops
// re-starting. The programmed value is the number of automatic re-starts
// after the first acquisition. 16 bits as in the design; that reading of
// the end value is this design's own.
module repeat_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,
  input  logic [W-1:0] end_value,
  output logic [W-1:0] count,
  output logic         last
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)             count <= '0;
    else if (clr)           count <= '0;
    else if (inc && !last)  count <= count + 1'b1;

  assign last = count >= end_value;
endmodule
