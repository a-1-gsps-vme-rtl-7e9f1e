// tb_output_control: issues memory reads and bypass passes whenever room
// allows, with a one-cycle-latency memory model and random stalls of the
// consumer, and checks every row arrives once, in order, from the right
// source, and that room never lets the two-entry buffer overflow; then
// that clr empties it.
//
// Interface and timing: a 50 MHz clock. The memory model answers one
// cycle after a read. Two channels are used. A watchdog ends the run
// after 100,000 cycles. Moving data on as soon as it is there and the
// output can take it follows the design; the two-entry buffer is this
// design's own.
module tb_output_control;
  import dab_pkg::*;
  localparam int N_AC = 2;
  logic clk = 0, rst_n = 0, row_take = 0, clr = 0;
  mem_op_e op = OP_NONE;
  logic [47:0] mem_rdata [N_AC];
  logic [47:0] fifo_rdata [N_AC];
  logic [47:0] row [N_AC];
  logic room, row_valid, empty;
  logic [47:0] exp_q [$];
  int checks = 0, failures = 0, tag = 0, got = 0;

  output_control #(.N_AC(N_AC)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // memory answers a read one cycle later with the tag of the read
  logic [47:0] mem_next;
  always_ff @(posedge clk) begin
    mem_rdata[0] <= mem_next;
    mem_rdata[1] <= ~mem_next;
  end

  initial begin
    #25 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // consumer
      if (row_valid) begin
        check(row[0] == exp_q[0] && row[1] == ~exp_q[0], $sformatf("row %0d", got));
      end
      row_take = row_valid && $urandom_range(0, 2) == 0;
      if (row_take) begin void'(exp_q.pop_front()); got++; end
      // producer
      op = OP_NONE;
      mem_next = 48'hDEAD;
      fifo_rdata[0] = 48'hBAD; fifo_rdata[1] = 48'hBAD;
      if (room && $urandom_range(0, 1)) begin
        tag++;
        if (i < 2000 ? 1'b1 : $urandom_range(0, 1) == 1) begin
          op = OP_READ; mem_next = 48'(tag);
        end else begin
          op = OP_PASS; fifo_rdata[0] = 48'(tag); fifo_rdata[1] = ~48'(tag);
        end
        exp_q.push_back(48'(tag));
      end
    end
    @(negedge clk) op = OP_NONE;
    while (row_valid) begin
      @(negedge clk) row_take = 1;
      check(row[0] == exp_q[0], "tail row"); void'(exp_q.pop_front()); got++;
      @(posedge clk); #1 row_take = 0;
    end
    check(got == tag && got > 500 && empty, $sformatf("all %0d rows out (%0d)", tag, got));
    // clear: a held row and a row in flight are dropped
    @(negedge clk) op = OP_READ; mem_next = 48'h1;
    @(negedge clk) op = OP_READ; mem_next = 48'h2;
    @(negedge clk) op = OP_NONE; clr = 1;
    @(negedge clk) clr = 0;
    check(!row_valid && empty && room, "clear empties the buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
