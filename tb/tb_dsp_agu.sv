`timescale 1ns/1ps
// tb_dsp_agu: self-checking test of the address generation unit.
//
// Loads R, N and M registers through the global bus, then runs sequences of
// (R), (R)+, (R)-, (R)+N and (R)-N accesses on both address units in the
// same cycles.  The expected address sequence is tracked here as a base and
// an index into a circular buffer (modulo) or as a plain 10-bit count
// (linear).  Also checks register read-back and the NORM adjust request.
module tb_dsp_agu;
  import dsp_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, exec = 1'b1;
  ctrl_t ctrl;
  word_t gdb_in, g_rdata;
  addr_t xaddr, yaddr;
  logic  norm_en = 1'b0, norm_inc = 1'b0;
  logic [2:0] norm_rn = '0;

  int checks = 0, failures = 0;

  dsp_agu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100_000;   // 10,000 cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    ctrl = '0;
    ctrl.alu_op = OP_NOP; ctrl.sh_op = SH_NONE; ctrl.g_sel = GS_REG;
    ctrl.xmv.mode = AM_NONE; ctrl.ymv.mode = AM_NONE;
  endtask

  task automatic step();
    @(posedge clk); #1;
    idle();
  endtask

  task automatic load(logic [4:0] g, int v);
    idle();
    ctrl.gmv = 1'b1; ctrl.g_dst = g; ctrl.g_sel = GS_IMM; gdb_in = word_t'(v);
    step();
  endtask

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // expected model: X unit register R1 (modulo), Y unit register R6 (linear)
  int xb, xi, xmod, yr, n1, n6;
  amode_e xm, ym;

  initial begin
    idle();
    gdb_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // reset values: M = 0x3FF (linear)
    idle(); ctrl.g_src = 5'd24 + 5'd3; #1;
    check("M3 reset", int'(g_rdata), 'h3FF);

    for (int trial = 0; trial < 20; trial++) begin
      xmod = $urandom_range(2, 60);
      xb   = 64 * $urandom_range(0, 15);
      xi   = $urandom_range(0, xmod - 1);
      n1   = $urandom_range(0, xmod);
      yr   = $urandom_range(0, 1023);
      n6   = $urandom_range(0, 1023);
      load(5'd8 + 5'd1, xb + xi);       // R1
      load(5'd16 + 5'd1, n1);           // N1
      load(5'd24 + 5'd1, xmod - 1);     // M1: modulo xmod
      load(5'd8 + 5'd6, yr);            // R6
      load(5'd16 + 5'd6, n6);           // N6
      load(5'd24 + 5'd6, 'h3FF);        // M6: linear
      idle(); ctrl.g_src = 5'd16 + 5'd1; #1;
      check("N1 readback", int'(g_rdata), n1);
      for (int i = 0; i < 40; i++) begin
        xm = amode_e'($urandom_range(0, 4));
        ym = amode_e'($urandom_range(0, 4));
        idle();
        ctrl.xmv.en = 1'b1; ctrl.xmv.rr = 2'd1; ctrl.xmv.mode = xm;
        ctrl.ymv.en = 1'b1; ctrl.ymv.rr = 2'd2; ctrl.ymv.mode = ym;
        #1;
        check("X address", int'(xaddr), xb + xi);
        check("Y address", int'(yaddr), yr);
        step();
        case (xm)
          AM_INC: xi = (xi + 1) % xmod;
          AM_DEC: xi = (xi + xmod - 1) % xmod;
          AM_PN:  xi = (xi + n1) % xmod;
          AM_MN:  xi = (xi + xmod - n1) % xmod;
          default: ;
        endcase
        case (ym)
          AM_INC: yr = (yr + 1) % 1024;
          AM_DEC: yr = (yr + 1023) % 1024;
          AM_PN:  yr = (yr + n6) % 1024;
          AM_MN:  yr = (yr + 1024 - n6) % 1024;
          default: ;
        endcase
      end
      idle(); ctrl.g_src = 5'd8 + 5'd1; #1;
      check("R1 readback", int'(g_rdata), xb + xi);
    end

    // NORM adjust on R3
    load(5'd8 + 5'd3, 100);
    idle(); norm_en = 1'b1; norm_rn = 3'd3; norm_inc = 1'b0; step();
    norm_en = 1'b1; norm_inc = 1'b0; step();
    norm_en = 1'b1; norm_inc = 1'b1; step();
    norm_en = 1'b0;
    idle(); ctrl.g_src = 5'd8 + 5'd3; #1;
    check("NORM adjust", int'(g_rdata), 99);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
