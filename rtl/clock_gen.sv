// clock_gen: acquisition clock selection.
//
// The ADC clock is either the external clock input or the local 250 MHz
// oscillator, and the oscillator may be divided by two, four or eight
// under control of a local port. The division is a ripple of three
// toggle flip-flops on the oscillator; a multiplexer picks the undivided
// or one divided tap, and a second multiplexer picks the oscillator
// branch or the external clock. The choices (external/local, divide by
// 2/4/8) follow the design; the ripple divider and the plain clock
// multiplexers (no glitch-free switching, so change the selection only
// while not acquiring) are this implementation's own.
//
// Interface: osc_clk, ext_clk, rst_n (clears the divider), sel_ext,
// div_sel (0: /1, 1: /2, 2: /4, 3: /8); adc_clk is the chosen clock.
// Timing: combinational from the selects, divided taps change on the
// rising edge of the oscillator.
module clock_gen (
  input  logic       osc_clk,
  input  logic       ext_clk,
  input  logic       rst_n,
  input  logic       sel_ext,
  input  logic [1:0] div_sel,
  output logic       adc_clk
);
  logic div2, div4, div8;
  logic local_clk;

  always_ff @(posedge osc_clk or negedge rst_n)
    if (!rst_n) div2 <= 1'b0;
    else        div2 <= ~div2;

  always_ff @(posedge div2 or negedge rst_n)
    if (!rst_n) div4 <= 1'b0;
    else        div4 <= ~div4;

  always_ff @(posedge div4 or negedge rst_n)
    if (!rst_n) div8 <= 1'b0;
    else        div8 <= ~div8;

  always_comb begin
    unique case (div_sel)
      2'd0: local_clk = osc_clk;
      2'd1: local_clk = div2;
      2'd2: local_clk = div4;
      default: local_clk = div8;
    endcase
  end

  assign adc_clk = sel_ext ? ext_clk : local_clk;
endmodule
