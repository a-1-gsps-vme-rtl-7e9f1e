// vme_interrupter: release-on-acknowledge (ROAK) VMEbus interrupter.
//
// While irq_req is high and a level 1-7 is programmed, the matching IRQn*
// line is driven low. In an interrupt acknowledge cycle (IACK* low) the
// acknowledge arrives on the IACKIN* daisy chain. If this board requests on
// the level given by A3-A1, it places its 8-bit status/ID vector on D7-D0,
// asserts DTACK* and gives a one-cycle iack_done to the CCL, which drops the
// request (release on acknowledge); the vector is supplied without any help
// from the DSP. Otherwise the acknowledge is passed on by IACKOUT*. DTACK*
// and the data are released when the data strobe goes away, IACKOUT* when
// AS* goes high. Bus inputs are re-timed by two flip-flops of the 50 MHz
// clk. The ROAK behaviour, the seven levels and the automatic vector follow
// the design; the daisy-chain handling is taken from the VMEbus standard.
module vme_interrupter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       irq_req,
  input  logic [2:0] level,
  input  logic [7:0] vector,
  output logic       iack_done,
  // VMEbus, active-low as on the bus
  output logic [7:1] irq_n,
  input  logic       as_n,
  input  logic       ds0_n,
  input  logic       iack_n,
  input  logic       iackin_n,
  output logic       iackout_n,
  input  logic [3:1] a,
  output logic [7:0] d_o,
  output logic       d_oe,
  output logic       dtack_n
);
  typedef enum logic [1:0] {I_IDLE, I_RESPOND, I_PASS, I_END} st_e;
  st_e st;
  logic [1:0] as_s, ds_s, iackin_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_s <= '1; ds_s <= '1; iackin_s <= '1;
    end else begin
      as_s     <= {as_s[0], as_n};
      ds_s     <= {ds_s[0], ds0_n};
      iackin_s <= {iackin_s[0], iackin_n};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= I_IDLE; iack_done <= 1'b0;
    end else begin
      iack_done <= 1'b0;
      unique case (st)
        I_IDLE:
          if (!iackin_s[1] && !as_s[1] && !iack_n) begin
            if (irq_req && a == level && !ds_s[1]) begin
              st <= I_RESPOND;
              iack_done <= 1'b1;
            end else if (!(irq_req && a == level)) st <= I_PASS;
          end
        I_RESPOND: if (ds_s[1]) st <= I_END;
        I_PASS:    if (as_s[1]) st <= I_IDLE;
        I_END:     if (as_s[1]) st <= I_IDLE;
        default:   st <= I_IDLE;
      endcase
    end
  end

  always_comb begin
    irq_n = '1;
    if (irq_req && level != 3'd0) irq_n[level] = 1'b0;
  end
  assign iackout_n = !(st == I_PASS);
  assign dtack_n   = !(st == I_RESPOND);
  assign d_oe      = (st == I_RESPOND);
  assign d_o       = vector;
endmodule
