// segment_counter: words per acquisition in SEGMENTED mode.
//
// A 16-bit counter cleared at each START and advanced once for every word
// stored (one row of all channels written to memory, or passed to the
// output when no memory is fitted). done goes high when the count reaches
// the programmed number of words; the trigger logic turns it into the
// automatic STOP and stops storing. A programmed value of 0 never ends the
// segment. The 16-bit width and the counting of stored words follow the
// design; what 0 means is this design's own. All on clk; done is
// combinational from the count.
module segment_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,
  input  logic [W-1:0] target,
  output logic [W-1:0] count,
  output logic         done
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)            count <= '0;
    else if (clr)          count <= '0;
    else if (inc && !done) count <= count + 1'b1;

  assign done = (target != '0) && (count >= target);
endmodule
