// trigger_logic: starts and stops the acquisition and sequences the modes.
//
// A START may come from the external START input, from software, from the
// delay counter (REPEAT mode) or, in the clock-synchronised mode, from
// nothing at all: the acquisition then runs whenever the module is idle
// and every ADC clock tick is a sample. A STOP comes from the external
// STOP input, software, the segment counter (SEGMENTED mode) or the error
// detector. The external inputs are asynchronous; they are re-timed by two
// flip-flops and act on their rising edge.
//
// States: IDLE (BUSY low, waiting for a START); ACQ (the gate is open and
// the channels sample); DRAIN (gate closed, the samples still in the
// channels are stored); RESET (RESET_CYCLES cycles in which the FIFOs are
// flushed and the logic set up again); WAIT (REPEAT mode, waiting for the
// delay counter). The delay counter is loaded at the STOP and runs in
// parallel with DRAIN and RESET; the mode of a mixed setting therefore
// costs the longest of the dead times, not their sum.
//
// PRE-TRIGGER: the gate opens at START but the FIFOs keep only the last
// `pt_depth` words, older ones being discarded, until Trigger In; the
// pre-trigger counter measures START to Trigger In. From then on words
// beyond the depth are stored, and at the STOP the remaining `pt_depth`
// words are stored in DRAIN, which is why the dead time grows with the
// pre-trigger depth.
//
// Trigger Out copies the gate so that other modules can follow this one.
// BUSY is high in every state but IDLE. Events (start, stop, trigin) are
// one-cycle pulses for the interrupt logic. Everything runs on the 50 MHz
// clk. The sources, modes, counters and BUSY follow the design; the state
// machine, the re-timing and the Trigger Out waveform are this design's own.
module trigger_logic
  import dab_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 2,
  parameter int unsigned LW           = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ctrl_t         ctrl,
  input  logic [LW-1:0] pt_depth,
  // trigger sources
  input  logic          start_in,    // asynchronous
  input  logic          stop_in,     // asynchronous
  input  logic          trig_in,     // asynchronous
  input  logic          sw_start,
  input  logic          sw_stop,
  input  logic          sw_trigin,
  input  logic          seg_done,
  input  logic          err_stop,
  input  logic          delay_done,
  input  logic          rep_last,
  // channel state
  input  logic          ch_idle,     // asynchronous, all sample packers idle
  input  logic          fifo_empty,
  input  logic          error,       // sticky NOMEMORY
  // controls
  output logic          gate,
  output logic          trig_out,
  output logic          busy,
  output logic          store_ok,
  output logic          discard_ok,
  output logic          fifo_flush,
  output logic [LW-1:0] keep,
  output logic          seg_clr,
  output logic          rep_clr,
  output logic          rep_inc,
  output logic          delay_load,
  output logic          pt_clr,
  output logic          pt_run,
  output logic          ev_start,
  output logic          ev_stop,
  output logic          ev_trigin
);
  typedef enum logic [2:0] {S_IDLE, S_ACQ, S_DRAIN, S_RESET, S_WAIT} state_e;
  state_e state;

  logic [2:0] start_s, stop_s, trig_s;
  logic [2:0] idle_s;
  logic       pre, delay_hit, auto_start;
  logic [$clog2(RESET_CYCLES+1)-1:0] rcnt;
  logic start_req, stop_req, trig_req, first_start, do_start, do_stop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_s <= '0; stop_s <= '0; trig_s <= '0; idle_s <= '1;
    end else begin
      start_s <= {start_s[1:0], start_in};
      stop_s  <= {stop_s[1:0], stop_in};
      trig_s  <= {trig_s[1:0], trig_in};
      idle_s  <= {idle_s[1:0], ch_idle};
    end
  end

  assign start_req   = (start_s[1] && !start_s[2]) || sw_start || ctrl.clksync;
  assign stop_req    = (stop_s[1] && !stop_s[2]) || sw_stop;
  assign trig_req    = (trig_s[1] && !trig_s[2]) || sw_trigin;
  assign first_start = (state == S_IDLE) && start_req;
  assign auto_start  = (state == S_WAIT) && delay_hit;
  assign do_start    = first_start || auto_start;
  assign do_stop     = (state == S_ACQ) && (stop_req || err_stop || (ctrl.segmented && seg_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pre <= 1'b0; delay_hit <= 1'b0; rcnt <= '0;
    end else begin
      if (delay_done) delay_hit <= 1'b1;
      unique case (state)
        S_IDLE, S_WAIT: if (do_start) begin
          state     <= S_ACQ;
          pre       <= ctrl.pretrig;
          delay_hit <= 1'b0;
        end
        S_ACQ: begin
          if (trig_req) pre <= 1'b0;
          if (do_stop) begin
            state <= S_DRAIN;
            pre   <= 1'b0;
          end
        end
        S_DRAIN:
          if (&idle_s && (fifo_empty || (ctrl.segmented && seg_done) || error)) begin
            state <= S_RESET;
            rcnt  <= '0;
          end
        S_RESET:
          if (rcnt == ($bits(rcnt))'(RESET_CYCLES - 1))
            state <= (ctrl.repeat_m && !rep_last) ? S_WAIT : S_IDLE;
          else
            rcnt <= rcnt + 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign gate       = (state == S_ACQ);
  assign trig_out   = gate;
  assign busy       = (state != S_IDLE);
  assign store_ok   = ((state == S_ACQ && !pre) || state == S_DRAIN) && !(ctrl.segmented && seg_done);
  assign discard_ok = (state == S_ACQ && pre);
  assign fifo_flush = (state == S_RESET);
  assign keep       = (state == S_ACQ && ctrl.pretrig) ? pt_depth : '0;
  assign seg_clr    = do_start;
  assign rep_clr    = first_start;
  assign rep_inc    = auto_start;
  assign delay_load = do_stop && ctrl.repeat_m && !rep_last;
  assign pt_clr     = do_start && ctrl.pretrig;
  assign pt_run     = (state == S_ACQ) && pre && !trig_req;
  assign ev_start   = do_start;
  assign ev_stop    = do_stop;
  assign ev_trigin  = trig_req && (state == S_ACQ);
endmodule
