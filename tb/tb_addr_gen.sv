// tb_addr_gen: drives the address generator with random FIFO levels,
// output room and phases against a reference model of the pointer rules:
// the chosen operation and address each cycle, memory full/empty, that
// the write pointer never overruns the read pointer, and the bypass and
// discard paths.
//
// Interface and timing: a 50 MHz clock, with AW reduced to 4 (16 rows) so
// the ring wraps and fills often. The inputs are changed at the falling
// edge and the model is compared at the rising edge. A watchdog ends the
// run after 100,000 cycles. The pointer rules (no overwrite, the read
// pointer never passes the write pointer) follow the design; the
// precedence of the operations is this design's own.
module tb_addr_gen;
  import dab_pkg::*;
  localparam int AW = 4, LW = 6;
  logic clk = 0, rst_n = 0, clr = 0, bypass = 0, gate = 0, store_ok = 0, discard_ok = 0;
  logic [LW-1:0] keep = 0, fifo_level = 0;
  logic fifo_afull = 0, out_room = 0;
  mem_op_e op;
  logic fifo_rd, mem_full, mem_empty;
  logic [AW-1:0] mem_addr, mem_count;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_full = 0, n_pass = 0, n_disc = 0;

  addr_gen #(.AW(AW), .LW(LW)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int wp = 0, rp = 0;
  initial begin
    mem_op_e e;
    int used;
    bit fr, rok;
    #25 rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      bypass     = (i / 2000) == 1;
      gate       = $urandom_range(0, 1);
      store_ok   = $urandom_range(0, 3) != 0;
      discard_ok = !store_ok && $urandom_range(0, 1);
      keep       = LW'($urandom_range(0, 3));
      fifo_level = LW'($urandom_range(0, 6));
      fifo_afull = $urandom_range(0, 4) == 0;
      out_room   = $urandom_range(0, (i / 1000) % 2 ? 3 : 0) == 0;
      #1;
      used = (wp - rp) & ((1 << AW) - 1);
      fr   = fifo_level > keep;
      rok  = !bypass && out_room && used != 0 && (!fifo_afull || !gate);
      if (fr && store_ok && !bypass && used != (1 << AW) - 1) e = OP_WRITE;
      else if (fr && store_ok && bypass && out_room) e = OP_PASS;
      else if (fr && discard_ok) e = OP_DISCARD;
      else if (rok) e = OP_READ;
      else e = OP_NONE;
      check(op == e, $sformatf("cycle %0d op %s expected %s", i, op.name(), e.name()));
      check(mem_full == (used == (1 << AW) - 1) && mem_empty == (used == 0), "full/empty");
      check(fifo_rd == (e inside {OP_WRITE, OP_PASS, OP_DISCARD}), "fifo_rd");
      if (e == OP_WRITE) begin check(mem_addr == AW'(wp), "write address"); wp++; n_wr++; end
      if (e == OP_READ)  begin check(mem_addr == AW'(rp), "read address");  rp++; n_rd++; end
      if (e == OP_PASS) n_pass++;
      if (e == OP_DISCARD) n_disc++;
      if (mem_full) n_full++;
    end
    check(n_wr > 100 && n_rd > 100 && n_full > 10 && n_pass > 100 && n_disc > 100, "every case seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
