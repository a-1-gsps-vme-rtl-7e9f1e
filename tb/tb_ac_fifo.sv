// tb_ac_fifo: writes a counting stream on a 41.7 MHz-like write clock and
// reads it on a 50 MHz read clock with random stalls; checks the order of
// the data, that the buffer fills to exactly DEPTH words with full and
// afull at the right levels, that nothing is accepted while full, and that
// flush empties it.
//
// Interface and timing: the write clock has a 24 ns period, like the word
// rate of a 250 MHz ADC divided by six, and the read clock is 50 MHz.
// DEPTH is reduced to 64 and the margin to 8 so that filling is quick. A
// watchdog ends the run after 1,000,000 read clocks. The expected values
// come from a queue model. The dual-clock role follows the design; the
// almost-full margin tested is this design's own rule.
module tb_ac_fifo;
  localparam int DEPTH = 64, MARGIN = 8;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, flush = 0;
  logic [47:0] wdata = 0, rdata;
  logic wfull, empty, full, afull;
  logic [6:0] level;
  int checks = 0, failures = 0;
  logic [47:0] expect_q [$];

  ac_fifo #(.DEPTH(DEPTH), .WIDTH(48), .AFULL_MARGIN(MARGIN)) dut (.*);
  always #12 wclk = ~wclk;
  always #10 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000000) @(posedge rclk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nwr = 0;
  task automatic write_n(input int n, input bit block = 0);
    for (int i = 0; i < n; i++) begin
      @(negedge wclk);
      while (block && wfull) @(negedge wclk);
      wr_en = 1; wdata = {16'hA5A5, 32'(nwr)};
      if (!wfull) begin expect_q.push_back(wdata); nwr++; end
      @(posedge wclk); #1 wr_en = 0;
    end
  endtask

  initial begin
    #50 rst_n = 1;
    // fill to the top
    write_n(DEPTH + 5);
    repeat (6) @(posedge rclk);
    @(negedge rclk);
    check(level == 7'(DEPTH) && full && afull && !empty, $sformatf("filled level %0d", level));
    check(expect_q.size() == DEPTH, "exactly DEPTH words accepted");
    // drain with random stalls, checking order and the flags
    while (!empty) begin
      @(negedge rclk);
      check(afull == (level >= 7'(DEPTH - MARGIN)), "afull flag");
      rd_en = $urandom_range(0, 3) != 0;
      if (rd_en) begin
        check(rdata == expect_q[0], $sformatf("data %h expected %h", rdata, expect_q[0]));
        void'(expect_q.pop_front());
      end
      @(posedge rclk); #1 rd_en = 0;
    end
    check(expect_q.size() == 0, "all read");
    // concurrent traffic
    fork
      write_n(300, 1);
      begin
        int got = 0;
        while (got < 300) begin
          @(negedge rclk);
          if (!empty && $urandom_range(0, 1)) begin
            rd_en = 1;
            check(rdata == expect_q[0], "streaming order");
            void'(expect_q.pop_front()); got++;
          end
          @(posedge rclk); #1 rd_en = 0;
        end
      end
    join
    // flush
    write_n(10);
    repeat (6) @(posedge rclk);
    @(negedge rclk) flush = 1; @(negedge rclk) flush = 0;
    check(empty && level == 0, "flush empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
