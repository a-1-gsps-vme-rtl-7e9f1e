// tb_out_fifo: random writes and reads against a queue model, checking
// data order, count, empty and full, and that clear empties it.
//
// Interface and timing: a 50 MHz clock, with DEPTH reduced to 16 so that
// full is reached often. A watchdog ends the run after 500,000 cycles. A
// 32-bit output FIFO follows the design; its depth and first-word
// fall-through are this design's own.
module tb_out_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, clr = 0, wr = 0, rd = 0;
  logic [31:0] wdata = 0, rdata;
  logic empty, full;
  logic [4:0] count;
  logic [31:0] q [$];
  int checks = 0, failures = 0;

  out_fifo #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #25 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(count == 5'(q.size()) && empty == (q.size() == 0) && full == (q.size() == DEPTH), "flags");
      if (q.size() > 0) check(rdata == q[0], "data");
      wr = $urandom_range(0, (i / 500) % 2 ? 3 : 1) != 0;
      rd = $urandom_range(0, (i / 500) % 2 ? 1 : 3) != 0;
      wdata = $urandom;
      begin
        bit fb, eb;
        fb = q.size() == DEPTH; eb = q.size() == 0;
        @(posedge clk);
        if (rd && !eb) void'(q.pop_front());
        if (wr && !fb) q.push_back(wdata);
      end
    end
    @(negedge clk) begin wr = 0; rd = 0; clr = 1; end
    @(negedge clk) clr = 0;
    check(empty && count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
