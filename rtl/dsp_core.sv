// dsp_core: 16-bit micro-programmed DSP for the spectral analysis of a
// CELP speech coder.
//
// The processor copies the organisation of the DSP56001 so that programs
// scheduled for that processor can be carried over with little change, but
// with 16-bit data instead of 24.  Three execution units run in parallel:
// the data ALU (dsp_alu), the address generation unit (dsp_agu) and the
// controller unit (dsp_cu, with its program ROM dsp_prog_rom).  They
// exchange data over an X data bus, a Y data bus and a global bus joined by
// a bus switch (dsp_bus_switch), with two data memory spaces of 256 words
// RAM + 256 words ROM each (dsp_mem) and a host interface to an 8-bit PC
// bus (dsp_host_if).  At best one instruction performs an arithmetic
// operation, two memory moves and two address updates in one clock, e.g.
// "mac x0,y1,a  x:(r0)+,x0  y:(r4)-,y1".
//
// Interface: clk, synchronous active-low rst_n, the 8-bit host port
// (host_addr, host_wr, host_rd, host_wdata, host_rdata), and status
// outputs (halted after a STOP instruction, loop_err on loop stack overflow,
// prog_addr of the executing instruction, the accumulators for
// observation).  Timing: one instruction per clock; the first instruction
// (address 0) executes in the first cycle after reset.
//
// The default program image (rtl/dsp_prog_autocorr.hex) is one frame of
// the coder's spectral analysis front end: it receives 240 samples from
// the host, high-pass filters them and applies the Hamming window, both
// with tables held in the Y ROM (rtl/dsp_yrom_tables.hex), computes the autocorrelation lags 0..10 and
// sends them back, each as the high word of the 40-bit sum after an
// arithmetic right shift by 8; it then starts the LPC recursion by dividing
// the first two lags (16 division steps) and sends the first reflection
// coefficient k1 = -r1/r0 (see the README for the program).
module dsp_core
  import dsp_pkg::*;
#(
  parameter string PROG_FILE  = "rtl/dsp_prog_autocorr.hex",
  parameter string XROM_FILE  = "",
  parameter string YROM_FILE  = "rtl/dsp_yrom_tables.hex",
  parameter int    RAM_WORDS  = 256,
  parameter int    ROM_WORDS  = 256,
  parameter int    LOOP_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  host_addr,
  input  logic        host_wr,
  input  logic        host_rd,
  input  logic [7:0]  host_wdata,
  output logic [7:0]  host_rdata,
  output logic        halted,
  output logic        loop_err,
  output logic [9:0]  prog_addr,
  output logic [39:0] acc_a,
  output logic [39:0] acc_b
);

  ctrl_t      ctrl;
  logic       exec;
  ccr_t       ccr;
  word_t      xdb, ydb, gdb;
  word_t      xmem_rdata, ymem_rdata;
  word_t      alu_xdata, alu_ydata, alu_gdata, agu_gdata, host_gdata;
  addr_t      xaddr, yaddr;
  logic       xmem_we, ymem_we;
  logic       norm_en, norm_inc;
  logic [2:0] norm_rn;
  logic       rx_full, tx_full;

  dsp_cu #(.LOOP_DEPTH(LOOP_DEPTH), .PROG_FILE(PROG_FILE)) u_cu (
    .clk, .rst_n, .ccr, .rx_full, .tx_full, .gdb,
    .ctrl, .exec, .pc(prog_addr), .halted, .loop_err,
    .lc_out(), .loop_active()
  );

  dsp_alu u_alu (
    .clk, .rst_n, .ctrl, .exec,
    .xdb_in(xdb), .ydb_in(ydb), .gdb_in(gdb),
    .x_rdata(alu_xdata), .y_rdata(alu_ydata), .g_rdata(alu_gdata),
    .ccr, .norm_en, .norm_rn, .norm_inc, .acc_a, .acc_b
  );

  dsp_agu u_agu (
    .clk, .rst_n, .exec, .ctrl, .gdb_in(gdb), .g_rdata(agu_gdata),
    .xaddr, .yaddr, .norm_en, .norm_rn, .norm_inc
  );

  dsp_bus_switch u_bus (
    .ctrl, .exec, .xmem_rdata, .ymem_rdata,
    .alu_xdata, .alu_ydata, .alu_gdata, .agu_gdata, .host_gdata,
    .xdb, .ydb, .gdb, .xmem_we, .ymem_we
  );

  dsp_mem #(.RAM_WORDS(RAM_WORDS), .ROM_WORDS(ROM_WORDS), .ROM_FILE(XROM_FILE)) u_xmem (
    .clk, .addr(xaddr), .we(xmem_we), .wdata(xdb), .rdata(xmem_rdata)
  );

  dsp_mem #(.RAM_WORDS(RAM_WORDS), .ROM_WORDS(ROM_WORDS), .ROM_FILE(YROM_FILE)) u_ymem (
    .clk, .addr(yaddr), .we(ymem_we), .wdata(ydb), .rdata(ymem_rdata)
  );

  dsp_host_if u_host (
    .clk, .rst_n,
    .pc_addr(host_addr), .pc_wr(host_wr), .pc_rd(host_rd),
    .pc_wdata(host_wdata), .pc_rdata(host_rdata),
    .rx_pop(exec && ctrl.g_rd && ctrl.g_sel == GS_REG && ctrl.g_src == G_HOST),
    .tx_push(exec && ctrl.gmv && ctrl.g_dst == G_HOST),
    .stat_we(exec && ctrl.gmv && ctrl.g_dst == G_HSTAT),
    .dsp_wdata(gdb),
    .stat_rd(ctrl.g_src == G_HSTAT),
    .dsp_rdata(host_gdata),
    .rx_full, .tx_full
  );

  // A memory move and a register move must not both load the same register
  // from the global bus in one instruction: the decoder never does this.
  a_one_gdb_load: assert property (@(posedge clk) disable iff (!rst_n)
    exec && ctrl.gmv |-> !(ctrl.xmv.en && ctrl.ymv.en));

endmodule
