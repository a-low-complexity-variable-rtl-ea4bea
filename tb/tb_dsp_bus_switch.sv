`timescale 1ns/1ps
// tb_dsp_bus_switch: self-checking test of the bus switch.
//
// Gives every source a distinct random value and, for random control
// words, checks which value appears on the X, Y and global busses and the
// memory write enables, against the routing rules worked out here.
module tb_dsp_bus_switch;
  import dsp_pkg::*;

  ctrl_t ctrl;
  logic  exec;
  word_t xmem_rdata, ymem_rdata, alu_xdata, alu_ydata, alu_gdata, agu_gdata, host_gdata;
  word_t xdb, ydb, gdb;
  logic  xmem_we, ymem_we;

  int checks = 0, failures = 0;
  word_t eg, ex, ey;

  dsp_bus_switch dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      ctrl = '0;
      ctrl.alu_op = OP_NOP; ctrl.sh_op = SH_NONE;
      ctrl.xmv.mode = AM_NONE; ctrl.ymv.mode = AM_NONE;
      ctrl.g_sel     = gsel_e'($urandom_range(0, 3));
      ctrl.g_src     = 5'($urandom);
      ctrl.imm       = word_t'($urandom);
      ctrl.xmv.en    = $urandom_range(0, 1);
      ctrl.xmv.store = $urandom_range(0, 1);
      ctrl.xmv.greg  = 5'($urandom);
      ctrl.ymv.en    = $urandom_range(0, 1);
      ctrl.ymv.store = $urandom_range(0, 1);
      ctrl.ymv.greg  = 5'($urandom);
      exec = $urandom_range(0, 1);
      xmem_rdata = word_t'($urandom); ymem_rdata = word_t'($urandom);
      alu_xdata  = word_t'($urandom); alu_ydata  = word_t'($urandom);
      alu_gdata  = word_t'($urandom); agu_gdata  = word_t'($urandom);
      host_gdata = word_t'($urandom);
      #1;
      case (ctrl.g_sel)
        GS_IMM: eg = ctrl.imm;
        GS_XDB: eg = xmem_rdata;
        GS_YDB: eg = ymem_rdata;
        default: eg = (ctrl.g_src < 6) ? alu_gdata : (ctrl.g_src < 8) ? host_gdata : agu_gdata;
      endcase
      ex = !ctrl.xmv.store ? xmem_rdata : (ctrl.xmv.greg < 6) ? alu_xdata : eg;
      ey = !ctrl.ymv.store ? ymem_rdata : (ctrl.ymv.greg < 6) ? alu_ydata : eg;
      check("global bus", int'(gdb), int'(eg));
      check("X bus", int'(xdb), int'(ex));
      check("Y bus", int'(ydb), int'(ey));
      check("X we", int'(xmem_we), int'(exec && ctrl.xmv.en && ctrl.xmv.store));
      check("Y we", int'(ymem_we), int'(exec && ctrl.ymv.en && ctrl.ymv.store));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
