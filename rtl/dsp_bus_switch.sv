// dsp_bus_switch: the three data busses of the DSP and the switch between
// them.
//
// The DSP has an X data bus (X memory), a Y data bus (Y memory) and a
// global bus that links the controller, the AGU, the host interface and the
// registers; a bus switch passes data between the three (this much follows
// the document).  In this implementation the bidirectional busses are
// multiplexers, one per bus:
//   global bus : instruction immediate, the register g_src (data ALU, host
//                interface or AGU), or the X or Y bus when a memory word is
//                loaded into a register that is not a data ALU register;
//   X / Y bus  : the memory read data for a load; for a store, the data ALU
//                register of the move, or the global bus when the register
//                is an AGU or host register.
// It also gives the memory write enables.  Purely combinational.
module dsp_bus_switch
  import dsp_pkg::*;
(
  input  ctrl_t ctrl,
  input  logic  exec,
  input  word_t xmem_rdata,
  input  word_t ymem_rdata,
  input  word_t alu_xdata,
  input  word_t alu_ydata,
  input  word_t alu_gdata,
  input  word_t agu_gdata,
  input  word_t host_gdata,
  output word_t xdb,
  output word_t ydb,
  output word_t gdb,
  output logic  xmem_we,
  output logic  ymem_we
);

  word_t greg_val;

  always_comb begin
    if (is_alu_reg(ctrl.g_src))      greg_val = alu_gdata;
    else if (is_agu_reg(ctrl.g_src)) greg_val = agu_gdata;
    else                             greg_val = host_gdata;

    case (ctrl.g_sel)
      GS_IMM:  gdb = ctrl.imm;
      GS_XDB:  gdb = xmem_rdata;
      GS_YDB:  gdb = ymem_rdata;
      default: gdb = greg_val;
    endcase

    if (ctrl.xmv.store) xdb = is_alu_reg(ctrl.xmv.greg) ? alu_xdata : gdb;
    else                xdb = xmem_rdata;
    if (ctrl.ymv.store) ydb = is_alu_reg(ctrl.ymv.greg) ? alu_ydata : gdb;
    else                ydb = ymem_rdata;

    xmem_we = exec && ctrl.xmv.en && ctrl.xmv.store;
    ymem_we = exec && ctrl.ymv.en && ctrl.ymv.store;
  end

endmodule
