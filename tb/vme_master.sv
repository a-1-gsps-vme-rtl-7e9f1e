// vme_master: VMEbus master model for the testbenches. It drives the
// address, data strobes and interrupt acknowledge of a VMEbus and waits for
// DTACK*, for single A32/D32 cycles, block transfers (AM 0B), address-only
// cycles and interrupt acknowledge cycles. Bus signals are active low as on
// the bus; `ok` reports whether the cycle was answered.
//
// Interface: an interface with the bus signals as seen by the slave
// (inputs of the module under test) and the tasks start_cycle, strobe,
// end_cycle, write, read, addr_only and iack. Timing: 15 ns from address
// to AS*; a strobe is held until DTACK* is seen (giving up after 4 us)
// and the next waits for DTACK* to be released. The model is a testbench
// convenience; it follows the VMEbus handshake, not anything particular
// to this module.
interface vme_master;
  logic        as_n = 1, write_n = 1, lword_n = 0, iack_n = 1, iackin_n = 1;
  logic [1:0]  ds_n = 2'b11;
  logic [5:0]  am = 6'h09;
  logic [31:1] a = '0;
  logic [31:0] d_i = '0;
  logic [31:0] d_o;
  logic        d_oe, dtack_n;

  task automatic start_cycle(input logic [31:0] addr, input logic [5:0] m, input bit wr_);
    a = addr[31:1]; am = m; write_n = !wr_; lword_n = 0; iack_n = 1;
    #15 as_n = 0;
  endtask
  task automatic strobe(input logic [31:0] wd, output logic [31:0] rd, output bit ok);
    int n = 0;
    d_i = wd; #1 ds_n = 2'b00;
    while (dtack_n && n < 4000) begin #1 n++; end
    ok = !dtack_n;
    rd = d_o;
    ds_n = 2'b11;
    n = 0;
    while (!dtack_n && n < 4000) begin #1 n++; end
  endtask
  task automatic end_cycle();
    #10 as_n = 1; #40;
  endtask
  task automatic write(input logic [31:0] addr, input logic [31:0] wd, output bit ok);
    logic [31:0] rd;
    start_cycle(addr, 6'h09, 1); strobe(wd, rd, ok); end_cycle();
  endtask
  task automatic read(input logic [31:0] addr, output logic [31:0] rd, output bit ok);
    start_cycle(addr, 6'h09, 0); strobe(0, rd, ok); end_cycle();
  endtask
  task automatic addr_only(input logic [31:0] addr);
    start_cycle(addr, 6'h09, 1); #200; end_cycle();
  endtask
  task automatic iack(input logic [2:0] level, output logic [7:0] vec, output bit ok);
    logic [31:0] rd;
    a = {28'h0, level, 1'b0} >> 1; a[3:1] = level; iack_n = 0; write_n = 1; lword_n = 1;
    #15 as_n = 0; #5 iackin_n = 0;
    strobe(0, rd, ok);
    vec = rd[7:0];
    iackin_n = 1; #10 as_n = 1; iack_n = 1; #40;
  endtask
endinterface
