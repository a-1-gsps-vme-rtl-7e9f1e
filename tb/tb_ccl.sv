// tb_ccl: checks the routing of every interrupt source to every DSP pin
// (pulse stretch and levels), the host interrupt pending/mask/clear and
// release on acknowledge, the DSP-to-host request, and the bus
// request/grant handshake with and without a DSP.
//
// Interface and timing: a 50 MHz clock. The DSP's HOLDA is modelled as
// answering HOLD after a few cycles. The expected values are written out
// in the test. A watchdog ends the run after 100,000 cycles. The routing
// of any source to any of four DSP pins and to the host follows the
// design; the pulse length, the register map and the arbiter's states are
// this design's own.
module tb_ccl;
  import dab_pkg::*;
  logic clk = 0, rst_n = 0, dsp_present = 1, wr = 0;
  logic [5:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [N_SRC-1:0] irq_src = 0;
  logic vme2dsp = 0, iack_done = 0, vme_br = 0, dsp_holda_n = 1;
  logic [3:0] dsp_int_n;
  logic vme_irq_req, vme_bg, dsp_hold_n;
  logic [2:0] vme_irq_level;
  logic [7:0] vme_vector;
  int checks = 0, failures = 0;

  ccl dut (.*);
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

  initial begin
    int low;
    #25 rst_n = 1;
    @(negedge clk);
    check(dsp_int_n == 4'hF && !vme_irq_req && dsp_hold_n, "quiet after reset");
    // each pin, each source 0..6
    for (int pin = 0; pin < 4; pin++)
      for (int src = 0; src < 7; src++) begin
        write(CCL_DSPSEL, 32'hFFF & ~(32'h7 << (3 * pin)) | (32'(src) << (3 * pin)));
        @(negedge clk);
        if (src < N_SRC) irq_src[src] = 1; else vme2dsp = 1;
        @(negedge clk) begin irq_src = 0; vme2dsp = 0; end
        #1 check(dsp_int_n[pin] == 1'b0, "stretched second cycle");
        check((dsp_int_n | (4'b1 << pin)) == 4'hF, "only the selected pin");
        @(negedge clk) check(dsp_int_n[pin], $sformatf("pin %0d src %0d released", pin, src));
      end
    // level source held
    write(CCL_DSPSEL, 32'hFFF & ~32'h7 | SRC_NODATA);
    irq_src[SRC_NODATA] = 1;
    low = 0; repeat (10) begin @(negedge clk); if (!dsp_int_n[0]) low++; end
    irq_src = 0;
    check(low == 10, "level source held on the pin");
    // host interrupt: mask, pending, vector, ROAK
    write(CCL_VMEIRQ, 32'h0000_A503);
    check(vme_irq_level == 3 && vme_vector == 8'hA5, "level and vector");
    write(CCL_PENDING, 32'h7F);
    write(CCL_VMEMASK, 32'h02);                 // STOP only
    @(negedge clk) irq_src[SRC_START] = 1; @(negedge clk) irq_src = 0;
    @(negedge clk) check(!vme_irq_req, "masked source does not interrupt");
    addr = CCL_PENDING; #1 check(rdata[SRC_START], "but is pending");
    @(negedge clk) irq_src[SRC_STOP] = 1; @(negedge clk) irq_src = 0;
    @(negedge clk) check(vme_irq_req, "STOP interrupts the host");
    @(negedge clk) iack_done = 1; @(negedge clk) iack_done = 0;
    @(negedge clk) check(!vme_irq_req, "released on acknowledge");
    write(CCL_VMEMASK, 32'h40);
    write(CCL_DSP2VME, 32'h1);
    @(negedge clk) check(vme_irq_req, "DSP interrupts the host");
    write(CCL_PENDING, 32'h40);
    @(negedge clk) check(!vme_irq_req, "cleared by writing 1");
    // bus request / grant with a DSP
    @(negedge clk) vme_br = 1;
    repeat (2) @(negedge clk);
    check(!dsp_hold_n && !vme_bg, "HOLD asserted, no grant before HOLDA");
    dsp_holda_n = 0;
    repeat (2) @(negedge clk);
    check(vme_bg, "granted after HOLDA");
    vme_br = 0;
    repeat (2) @(negedge clk);
    check(!vme_bg && dsp_hold_n, "released");
    dsp_holda_n = 1;
    repeat (2) @(negedge clk);
    dsp_present = 0;
    @(negedge clk) vme_br = 1;
    repeat (2) @(negedge clk);
    check(vme_bg && dsp_hold_n, "immediate grant without DSP");
    vme_br = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
