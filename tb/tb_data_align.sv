// tb_data_align: sends rows of counting samples for 1, 2 and 4 channels
// in use, with random stalls on both sides, and checks the 32-bit output
// stream is the samples in interleaved time order (sample j of channel k
// at position j*N + k), least significant byte first, and that flush
// pads the last word with zeros, and that clr drops bytes held.
//
// Interface and timing: a 50 MHz clock, with rows offered at the falling
// edge and outputs checked at the rising edge. A watchdog ends the run
// after 200,000 cycles. Ordering by the number of channels in use follows
// the design; the byte order and the padding are this design's own.
module tb_data_align;
  import dab_pkg::*;
  localparam int N_AC = 4;
  logic clk = 0, rst_n = 0, row_valid = 0, flush = 0, out_full = 0, clr = 0;
  logic [1:0] nac = 0;
  logic [47:0] row [N_AC];
  logic row_take, out_wr, pending;
  logic [31:0] out_data;
  int checks = 0, failures = 0;
  logic [7:0] exp_q [$];
  byte unsigned s = 0;

  data_align #(.N_AC(N_AC)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // new row: time-ordered samples distributed over the channels
  task automatic make_row(input int n);
    for (int k = 0; k < N_AC; k++) row[k] = {$urandom, $urandom};
    for (int j = 0; j < 6; j++)
      for (int k = 0; k < n; k++) begin
        row[k][8*j +: 8] = s;
        exp_q.push_back(s);
        s++;
      end
  endtask

  always @(posedge clk) if (rst_n && out_wr) begin
    logic [31:0] e;
    for (int b = 0; b < 4; b++) e[8*b +: 8] = exp_q.size() > 0 ? exp_q.pop_front() : 8'h00;
    check(out_data == e, $sformatf("out %h expected %h", out_data, e));
  end

  initial begin
    int n;
    #25 rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      nac = 2'(m); n = 1 << m;
      for (int r = 0; r < 41; r++) begin
        @(negedge clk);
        make_row(n);
        row_valid = 1;
        forever begin
          bit taken;
          out_full = $urandom_range(0, 3) == 0;
          #1 taken = row_take;
          @(posedge clk);
          if (taken) break;
          @(negedge clk);
        end
        #1 row_valid = 0;
        out_full = 0;
      end
      @(negedge clk) flush = 1;
      while (pending) @(negedge clk);
      flush = 0;
      repeat (3) @(negedge clk);
      check(exp_q.size() == 0, $sformatf("stream for %0d channels complete", n));
      exp_q.delete();
    end
    // clear: bytes held are dropped, nothing is written
    @(negedge clk) nac = 2'd2; out_full = 1; make_row(4); row_valid = 1;
    @(negedge clk) row_valid = 0; exp_q.delete();
    check(pending, "row held while the output is full");
    clr = 1;
    @(negedge clk) clr = 0; out_full = 0;
    repeat (3) @(negedge clk);
    check(!pending && !out_wr, "clear drops the bytes held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
