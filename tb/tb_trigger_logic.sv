// tb_trigger_logic: runs the trigger logic through each mode with simple
// models of the channels (idle a few cycles after the gate closes) and of
// the delay and repeat counters, and checks the gate, BUSY, Trigger Out,
// the storing/discarding permissions, the pre-trigger depth, the counter
// controls and the dead times: SEGMENTED restarts within 200 ns (10
// cycles of 20 ns) and a PRE-TRIGGER drain lasts as long as the FIFO data.
//
// Interface and timing: a 50 MHz clock, with the external inputs driven
// between clock edges. A watchdog ends the run after 100,000 cycles. The
// modes and the 200 ns dead-time bound follow the design; the state
// machine's exact cycle counts are this design's own.
module tb_trigger_logic;
  import dab_pkg::*;
  localparam int LW = 13;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl;
  logic [LW-1:0] pt_depth = 0, keep;
  logic start_in = 0, stop_in = 0, trig_in = 0, sw_start = 0, sw_stop = 0, sw_trigin = 0;
  logic seg_done = 0, err_stop = 0, delay_done = 0, rep_last = 0, ch_idle, fifo_empty, error = 0;
  logic gate, trig_out, busy, store_ok, discard_ok, fifo_flush, seg_clr, rep_clr, rep_inc;
  logic delay_load, pt_clr, pt_run, ev_start, ev_stop, ev_trigin;
  int checks = 0, failures = 0;
  int fifo_words = 0;

  trigger_logic #(.RESET_CYCLES(2), .LW(LW)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t %s", $time, what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // channel model: idle three cycles after the gate closes
  logic [2:0] g_d;
  always_ff @(posedge clk) g_d <= {g_d[1:0], gate};
  assign ch_idle = !gate && !(|g_d);
  // FIFO model: the words stored in DRAIN go one per cycle
  always_ff @(posedge clk) if (store_ok && fifo_words > 0 && !gate) fifo_words <= fifo_words - 1;
  assign fifo_empty = (fifo_words == 0);

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1; repeat (3) @(negedge clk); s = 0;
  endtask
  task automatic wait_for(ref logic s, input int max, output int n);
    n = 0;
    while (!s && n < max) begin @(negedge clk); n++; end
  endtask

  initial begin
    int n;
    ctrl = '0;
    g_d = 0;
    #25 rst_n = 1;
    repeat (3) @(negedge clk);
    check(!busy && !gate, "idle after reset");

    // 1. external START / STOP
    fork pulse(start_in); join_none
    wait_for(gate, 20, n);
    check(gate && busy && trig_out && store_ok && !discard_ok && n <= 5, $sformatf("START opens gate in %0d", n));
    repeat (10) @(negedge clk);
    fork pulse(stop_in); join_none
    wait_for(ev_stop, 20, n);
    @(negedge clk);
    check(!gate && busy, "STOP closes gate, still busy");
    n = 0; while (busy && n < 50) begin @(negedge clk); n++; end
    check(!busy, "back to idle");

    // 2. SEGMENTED: automatic STOP and dead time below 200 ns
    ctrl.segmented = 1;
    @(negedge clk) sw_start = 1;
    #1 check(seg_clr && ev_start, "software START clears the segment counter");
    @(negedge clk) sw_start = 0;
    check(gate, "software START opens the gate");
    repeat (5) @(negedge clk);
    seg_done = 1;
    @(negedge clk);
    check(!gate && !store_ok, "segment end stops and stops storing");
    n = 0; while (busy) begin @(negedge clk); n++; end
    check(n < 10, $sformatf("segmented dead time %0d cycles", n));
    seg_done = 0;

    // 3. REPEAT with 2 re-starts, delay counted by a model
    ctrl = '0; ctrl.repeat_m = 1;
    fork
      begin : model
        int k = 0;
        forever begin
          @(posedge clk);
          if (rep_clr) k = 0;
          if (rep_inc) k++;
          rep_last = (k >= 2);
          if (delay_load) fork begin repeat (15) @(posedge clk); delay_done = 1; @(posedge clk); delay_done = 0; end join_none
        end
      end
    join_none
    @(negedge clk) sw_start = 1; @(negedge clk) sw_start = 0;
    for (int c = 0; c < 3; c++) begin
      check(gate, $sformatf("repeat cycle %0d running", c));
      repeat (4) @(negedge clk);
      @(negedge clk) sw_stop = 1; @(negedge clk) sw_stop = 0;
      n = 0; while (!gate && busy && n < 100) begin @(negedge clk); n++; end
      if (c < 2) check(gate && n >= 14 && n <= 17, $sformatf("re-start after delay, %0d cycles", n));
    end
    check(!busy, "repeat ends after the programmed count");
    disable model;

    // 4. PRE-TRIGGER: discard beyond depth, time START->TRIGIN, drain
    ctrl = '0; ctrl.pretrig = 1; pt_depth = 13'd40;
    @(negedge clk) sw_start = 1; @(negedge clk) sw_start = 0;
    check(gate && discard_ok && !store_ok && keep == 13'd40 && pt_run, "pre-trigger phase");
    repeat (20) @(negedge clk);
    fork pulse(trig_in); join_none
    wait_for(ev_trigin, 20, n);
    @(negedge clk);
    check(store_ok && !discard_ok && !pt_run && keep == 13'd40, "after Trigger In");
    repeat (5) @(negedge clk);
    fifo_words = 40;
    @(negedge clk) sw_stop = 1; @(negedge clk) sw_stop = 0;
    check(keep == 0, "drain stores the kept words");
    n = 1; while (busy) begin @(negedge clk); n++; end
    check(n >= 40 && n <= 40 + 10, $sformatf("pre-trigger dead time %0d cycles for 40 words", n));

    // 5. error stop and clock-synchronised mode
    ctrl = '0;
    @(negedge clk) sw_start = 1; @(negedge clk) sw_start = 0;
    @(negedge clk) err_stop = 1; @(negedge clk) err_stop = 0;
    check(!gate, "error stops the acquisition");
    while (busy) @(negedge clk);
    ctrl.clksync = 1;
    repeat (2) @(negedge clk);
    check(gate, "clock-synchronised mode runs without a START");
    ctrl.clksync = 0;
    @(negedge clk) sw_stop = 1; @(negedge clk) sw_stop = 0;
    while (busy) @(negedge clk);
    check(!gate, "stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
