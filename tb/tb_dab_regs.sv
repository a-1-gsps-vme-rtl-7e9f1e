// tb_dab_regs: writes and reads back every programmable port, checks the
// command strobes last one cycle, the status words are mapped where the
// map says and that reading DATA pops the output FIFO.
//
// Interface and timing: a 50 MHz clock, with writes and reads one cycle
// each. A watchdog ends the run after 100,000 cycles. The presence of
// mode, counter, command and status ports follows the design; their
// addresses and bit positions are this design's own.
module tb_dab_regs;
  import dab_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0;
  logic [5:0] addr = 0;
  logic [31:0] wdata = 0, rdata, ofifo_data, mem_count;
  ctrl_t ctrl;
  cmd_t cmd;
  logic [15:0] segment, delay, repeats, ofifo_count, cycles;
  logic [12:0] pt_depth;
  logic data_pop;
  logic [7:0] status;
  logic [39:0] pt_time;
  int checks = 0, failures = 0;

  dab_regs #(.LW(13)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic write(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk) begin wr = 1; addr = a; wdata = d; end
    @(negedge clk) wr = 0;
  endtask
  logic [31:0] r [64];
  task automatic read_all();
    for (int a = 0; a < 64; a++) begin addr = 6'(a); #1 r[a] = rdata; end
  endtask

  initial begin
    logic [31:0] v;
    status = 8'h5A; ofifo_count = 16'h0123; pt_time = 40'hAB_1234_5678; mem_count = 32'h7_0001;
    ofifo_data = 32'hCAFE_F00D; cycles = 16'd9;
    #25 rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      v = $urandom;
      write(REG_CTRL, v);
      read_all();
      check(r[REG_CTRL] == {21'h0, v[10:0]}, "ctrl read back");
      check(ctrl.pretrig == v[0] && ctrl.segmented == v[1] && ctrl.nac == v[7:6] && ctrl.div_sel == v[10:9], "ctrl fields");
      write(REG_SEGMENT, v); read_all(); check(segment == v[15:0] && r[REG_SEGMENT] == {16'h0, v[15:0]}, "segment");
      write(REG_DELAY, v); read_all();   check(delay == v[15:0] && r[REG_DELAY] == {16'h0, v[15:0]}, "delay");
      write(REG_REPEAT, v); read_all();  check(repeats == v[15:0] && r[REG_REPEAT] == {16'h0, v[15:0]}, "repeat");
      write(REG_PTDEPTH, v); read_all(); check(pt_depth == v[12:0] && r[REG_PTDEPTH] == {19'h0, v[12:0]}, "ptdepth");
    end
    read_all();
    check(r[REG_STATUS] == 32'h0123_005A, "status");
    check(r[REG_PTTIME_L] == 32'h1234_5678 && r[REG_PTTIME_H] == 32'hAB, "pre-trigger time");
    check(r[REG_MEMCOUNT] == 32'h7_0001 && r[REG_CYCLES] == 32'd9, "counts");
    check(r[REG_DATA] == 32'hCAFE_F00D, "data");
    @(negedge clk) begin addr = REG_DATA; rd = 1; end
    #1 check(data_pop, "DATA read pops");
    @(negedge clk) rd = 0; addr = REG_STATUS; rd = 1;
    #1 check(!data_pop, "other reads do not pop");
    @(negedge clk) rd = 0;
    @(negedge clk) begin wr = 1; addr = REG_CMD; wdata = 32'h13; end
    @(negedge clk) begin wr = 0; check(cmd.start && cmd.stop && cmd.flush && !cmd.clear, "commands"); end
    @(negedge clk) check(cmd == '0, "commands last one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
