// tb_ac_mem: writes random words at random addresses of a reduced memory,
// keeps a reference copy, and reads them all back with the one-cycle
// latency; also checks a read does not disturb the contents.
//
// Interface and timing: a 50 MHz clock, with WORDS reduced to 1024 (the
// full 512K array is exercised by the full-size test). Data is checked
// one cycle after the read. A watchdog ends the run after 500,000 cycles.
// The one-access-per-cycle behaviour follows the design; the one-cycle
// read latency is this design's own.
module tb_ac_mem;
  localparam int WORDS = 1024;
  logic clk = 0, en = 0, we = 0;
  logic [9:0] addr = 0;
  logic [47:0] wdata = 0, rdata;
  logic [47:0] ref_m [WORDS];
  bit written [WORDS];
  int checks = 0, failures = 0;

  ac_mem #(.WORDS(WORDS), .WIDTH(48)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 10'($urandom); wdata = {$urandom, $urandom} & 48'hFFFF_FFFF_FFFF;
      ref_m[addr] = wdata; written[addr] = 1;
    end
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      en = 1; we = 0; addr = 10'(i);
      @(negedge clk);
      en = 0;
      if (written[i]) check(rdata == ref_m[i], $sformatf("addr %0d %h expected %h", i, rdata, ref_m[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
