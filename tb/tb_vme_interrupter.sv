// tb_vme_interrupter: a VMEbus interrupt handler model runs acknowledge
// cycles: on the wrong level the acknowledge must be passed on IACKOUT*,
// on the right level the vector must come back with DTACK* and the
// request must be released (ROAK).
//
// Interface and timing: a 50 MHz clock. The handler model drives IACK*,
// IACKIN*, AS*, DS0* and A3-A1 as a VMEbus interrupt handler does. A
// watchdog ends the run after 100,000 cycles. The ROAK behaviour and
// IRQ1-7 follow the design; the daisy-chain timing comes from the VMEbus
// convention.
module tb_vme_interrupter;
  logic clk = 0, rst_n = 0, irq_req = 0;
  logic [2:0] level = 0;
  logic [7:0] vector = 8'h00;
  logic iack_done, iackout_n, d_oe, dtack_n;
  logic [7:1] irq_n;
  logic as_n = 1, ds0_n = 1, iack_n = 1, iackin_n = 1;
  logic [3:1] a = 0;
  logic [7:0] d_o;
  int checks = 0, failures = 0, ndone = 0;

  vme_interrupter dut (.*);
  always #10 clk = ~clk;
  always @(posedge clk) if (rst_n && iack_done) begin ndone++; irq_req <= 0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic iack_cycle(input logic [2:0] lv, output bit answered, output bit passed, output logic [7:0] vec);
    int n;
    answered = 0; passed = 0;
    #7 a = lv; iack_n = 0; #15 as_n = 0; #10 ds0_n = 0; #5 iackin_n = 0;
    n = 0;
    while (n < 40) begin
      #5 n++;
      if (!dtack_n) begin answered = 1; vec = d_o; check(d_oe, "data driven"); break; end
      if (!iackout_n) begin passed = 1; break; end
    end
    #20 ds0_n = 1; iackin_n = 1; #10 as_n = 1; iack_n = 1;
    #100;
    check(dtack_n && iackout_n && !d_oe, "bus released");
  endtask

  initial begin
    bit ans, pas;
    logic [7:0] vec;
    #25 rst_n = 1;
    for (int lv = 1; lv < 8; lv++) begin
      level = 3'(lv); vector = 8'(8'h30 + lv);
      @(negedge clk) irq_req = 1;
      @(negedge clk);
      check(irq_n == ~(7'b1 << (lv - 1)), $sformatf("IRQ%0d driven", lv));
      iack_cycle(3'(lv == 7 ? 1 : lv + 1), ans, pas, vec);
      check(!ans && pas && irq_req, "other level passed on");
      iack_cycle(3'(lv), ans, pas, vec);
      check(ans && !pas && vec == 8'(8'h30 + lv), $sformatf("vector %h on level %0d", vec, lv));
      check(!irq_req && irq_n == 7'h7F, "released on acknowledge");
    end
    iack_cycle(3'd2, ans, pas, vec);
    check(pas && !ans, "no request: passed on");
    check(ndone == 7, $sformatf("one acknowledge per request (%0d)", ndone));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
