// tb_vme_slave: a VMEbus master model runs single A32/D32 writes and
// reads, block transfers, broadcast writes, accesses to another board,
// D16 accesses, accesses to the DSP memory window and address-only cycles
// against models of the local ports, the bus grant and the DSP memory. It
// checks data, DTACK* behaviour and the block transfer rate (at least 40
// MBytes/s, i.e. no more than 100 ns per 32-bit transfer).
//
// Interface and timing: a 50 MHz clock. The master model is
// tb/vme_master.sv. The local ports, the bus grant and the DSP memory are
// modelled in the testbench. A watchdog ends the run after 200,000
// cycles. The 40 MBytes/s target and the broadcast writes follow the
// design; the address map and the broadcast base are this design's own.
module tb_vme_slave;
  import dab_pkg::*;
  localparam logic [7:0] BASE = 8'h42;
  logic clk = 0, rst_n = 0, bcast_master = 1;
  logic [7:0] board_base = BASE;
  logic as_n = 1, write_n = 1, lword_n = 0, iack_n = 1;
  logic [1:0] ds_n = 2'b11;
  logic [5:0] am = 6'h09;
  logic [31:1] a = 0;
  logic [31:0] d_i = 0, d_o;
  logic d_oe, dtack_n, br, bg, lb_wr, lb_rd, ext_req, ext_we, ext_ack, vme2dsp;
  logic [5:0] lb_addr;
  logic [31:0] lb_wdata, lb_rdata, ext_wdata, ext_rdata;
  logic [22:2] ext_addr;
  logic [31:0] ports [64];
  logic [31:0] dspmem [256];
  int checks = 0, failures = 0, n_v2d = 0;

  vme_slave #(.BCAST_BASE(8'hFF)) dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %t %s", $time, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // local port, bus grant and DSP memory models
  assign lb_rdata = ports[lb_addr];
  always @(posedge clk) if (lb_wr) ports[lb_addr] <= lb_wdata;
  logic [2:0] br_d;
  always @(posedge clk) br_d <= {br_d[1:0], br & rst_n};
  assign bg = br && br_d[2];
  logic [1:0] ext_d;
  always @(posedge clk) begin
    ext_d <= {ext_d[0], ext_req && !ext_ack};
    if (ext_req && ext_we && ext_d[1]) dspmem[ext_addr[9:2]] <= ext_wdata;
  end
  assign ext_ack   = ext_req && ext_d[1];
  assign ext_rdata = dspmem[ext_addr[9:2]];
  always @(posedge clk) if (rst_n && vme2dsp) n_v2d++;

  // master model
  task automatic start_cycle(input logic [31:0] addr, input logic [5:0] m, input bit wr_, input bit d32 = 1);
    a = addr[31:1]; am = m; write_n = !wr_; lword_n = !d32; iack_n = 1;
    #15 as_n = 0;
  endtask
  task automatic data(input logic [31:0] wd, output logic [31:0] rd, output bit ok);
    int n = 0;
    d_i = wd; #1 ds_n = 2'b00;
    while (dtack_n && n < 2000) begin #1 n++; end
    ok = !dtack_n;
    rd = d_o;
    if (ok && write_n) check(d_oe, "read drives data");
    ds_n = 2'b11;
    n = 0;
    while (!dtack_n && n < 2000) begin #1 n++; end
    check(dtack_n, "DTACK released");
  endtask
  task automatic end_cycle();
    #10 as_n = 1; #40;
  endtask
  task automatic single(input logic [31:0] addr, input bit wr_, input logic [31:0] wd,
                        output logic [31:0] rd, output bit ok, input bit d32 = 1);
    start_cycle(addr, 6'h09, wr_, d32);
    data(wd, rd, ok);
    end_cycle();
  endtask

  initial begin
    logic [31:0] rd, v;
    bit ok;
    realtime t0, t1;
    foreach (ports[i]) ports[i] = 0;
    #45 rst_n = 1;
    #100;
    // single writes and reads of every port
    for (int p = 0; p < 32; p++) begin
      v = $urandom;
      single({BASE, 24'(p * 4)}, 1, v, rd, ok);
      check(ok && ports[p] == v, $sformatf("write port %0d", p));
      single({BASE, 24'(p * 4)}, 0, 0, rd, ok);
      check(ok && rd == v, $sformatf("read port %0d", p));
    end
    // another board's address: no answer, no write
    v = ports[3];
    single({8'h43, 24'h0C}, 1, 32'h1234, rd, ok);
    check(!ok && ports[3] == v, "other board ignored");
    // D16 access ignored
    single({BASE, 24'h0C}, 1, 32'h1234, rd, ok, 0);
    check(!ok && ports[3] == v, "non-D32 ignored");
    // broadcast write, with and without the DTACK duty
    single({8'hFF, 24'h10}, 1, 32'hB0B0_0001, rd, ok);
    check(ok && ports[4] == 32'hB0B0_0001, "broadcast write, master answers");
    bcast_master = 0;
    single({8'hFF, 24'h10}, 1, 32'hB0B0_0002, rd, ok);
    #200;
    check(!ok && ports[4] == 32'hB0B0_0002, "broadcast write taken silently");
    single({8'hFF, 24'h10}, 0, 0, rd, ok);
    check(!ok, "broadcast read ignored");
    bcast_master = 1;
    // block transfer read of 32 ports, timed
    foreach (ports[i]) ports[i] = 32'hC000_0000 + i;
    start_cycle({BASE, 24'h0}, 6'h0B, 0);
    data(0, rd, ok);
    check(ok && rd == 32'hC000_0000, "BLT first word");
    t0 = $realtime;
    for (int i = 1; i < 32; i++) begin
      data(0, rd, ok);
      check(ok && rd == 32'hC000_0000 + i, $sformatf("BLT word %0d", i));
    end
    t1 = $realtime;
    end_cycle();
    $display("block transfer: %0.1f ns per 32-bit word", (t1 - t0) / 31);
    check((t1 - t0) / 31 <= 100.0, $sformatf("BLT %0.1f ns per transfer", (t1 - t0) / 31));
    // block transfer write
    start_cycle({BASE, 24'h40}, 6'h0F, 1);
    for (int i = 0; i < 16; i++) begin data(32'hD000_0000 + i, rd, ok); check(ok, "BLT write"); end
    end_cycle();
    for (int i = 0; i < 16; i++) check(ports[16 + i] == 32'hD000_0000 + i, "BLT write data");
    // output FIFO window: any address reads the DATA port
    ports[REG_DATA] = 32'hFEED_0001;
    single({BASE, 24'h40_0104}, 0, 0, rd, ok);
    check(ok && rd == 32'hFEED_0001, "FIFO window reads DATA");
    // DSP memory window
    single({BASE, 24'h80_0020}, 1, 32'h5555_AAAA, rd, ok);
    check(ok && dspmem[8] == 32'h5555_AAAA, "DSP memory write");
    single({BASE, 24'h80_0020}, 0, 0, rd, ok);
    check(ok && rd == 32'h5555_AAAA, "DSP memory read");
    // address-only cycle to the DSP interrupt port
    start_cycle({BASE, 24'(PORT_VME2DSP) << 2}, 6'h09, 1);
    #200 end_cycle();
    #100 check(n_v2d == 1, "address-only cycle interrupts the DSP");
    start_cycle({BASE, 24'h08}, 6'h09, 1);
    #200 end_cycle();
    #100 check(n_v2d == 1, "address-only cycle elsewhere does nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
