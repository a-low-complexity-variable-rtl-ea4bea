// dsp_cu: controller unit of the DSP.
//
// Fetches 24-bit instructions from its internal program ROM, decodes them
// into the control word (ctrl_t) for the data ALU, AGU, bus switch and host
// interface, and runs the program controller: program counter, conditional
// jumps and hardware DO loops.  Every instruction executes in one clock
// cycle.  The next instruction is fetched while the current one executes:
// the instruction register holds the executing instruction, and the address
// of the next one (pc+1, a jump target, a loop start) is computed from it
// combinationally and read from the asynchronous ROM, so jumps and loops
// cost no cycle beyond their own.  Decoding is combinational from the
// instruction register.
//
// A DO instruction saves the current loop counter, loop start and loop end
// registers on a hardware stack (LOOP_DEPTH entries) and loads them for the
// new loop, so loops nest; at the end address the counter is decremented
// and the program returns to the start, or the loop ends and the outer loop
// is popped.  A count of zero skips the body.  The loop mechanism, the
// three loop registers, their stack and the single-cycle execution follow
// the document; the stack depth, the instruction encoding (dsp_pkg), the
// STOP instruction and the rule that nested loops must end at different
// addresses are this design's choices.  A push onto a full stack is
// dropped and sets loop_err.
//
// Reset: synchronous, active low.  During reset the instruction at address
// 0 is fetched, so it executes in the first cycle after reset is released.
module dsp_cu
  import dsp_pkg::*;
#(
  parameter int    LOOP_DEPTH = 4,
  parameter string PROG_FILE  = "rtl/dsp_prog_autocorr.hex"
) (
  input  logic   clk,
  input  logic   rst_n,
  input  ccr_t   ccr,
  input  logic   rx_full,
  input  logic   tx_full,
  input  word_t  gdb,        // loop count of DO with a register operand
  output ctrl_t  ctrl,
  output logic   exec,       // an instruction executes this cycle
  output paddr_t pc,         // address of the executing instruction
  output logic   halted,
  output logic   loop_err,
  output logic [15:0] lc_out,
  output logic   loop_active
);

  instr_t ir, rom_data;
  paddr_t next_pc;

  dsp_prog_rom #(.DEPTH(1 << PAW), .PROG_FILE(PROG_FILE)) u_rom (
    .addr(next_pc), .data(rom_data)
  );

  // --------------------------------------------------------------- decode
  op_e    op;
  sub_e   sub;
  logic   is_jcc, is_do, is_stop;
  paddr_t target;
  logic [15:0] do_count;
  move_t  mv;

  assign op  = op_e'(ir[23:20]);
  assign sub = sub_e'(ir[19:16]);

  function automatic logic [4:0] xreg(logic [1:0] r);
    case (r)
      2'd0: return G_X0;
      2'd1: return G_X1;
      2'd2: return G_A;
      default: return G_B;
    endcase
  endfunction

  function automatic logic [4:0] yreg(logic [1:0] r);
    case (r)
      2'd0: return G_Y0;
      2'd1: return G_Y1;
      2'd2: return G_A;
      default: return G_B;
    endcase
  endfunction

  always_comb begin
    ctrl     = '0;
    ctrl.alu_op = OP_NOP;
    ctrl.sh_op  = SH_NONE;
    ctrl.g_sel  = GS_REG;
    ctrl.xmv.mode = AM_NONE;
    ctrl.ymv.mode = AM_NONE;
    is_jcc   = 1'b0;
    is_do    = 1'b0;
    is_stop  = 1'b0;
    target   = ir[9:0];
    do_count = {10'b0, ir[15:10]};
    mv       = '0;
    mv.mode  = AM_NONE;

    if (op == OP_CTL) begin
      case (sub)
        SUB_NOP:  is_stop = ir[15];
        SUB_JCC:  is_jcc = 1'b1;
        SUB_DOI:  is_do = 1'b1;
        SUB_DOR: begin
          is_do      = 1'b1;
          ctrl.g_rd  = 1'b1;
          ctrl.g_src = ir[14:10];
          do_count   = gdb;
        end
        SUB_MOVR: begin
          ctrl.g_rd  = 1'b1;
          ctrl.g_src = ir[9:5];
          ctrl.gmv   = 1'b1;
          ctrl.g_dst = ir[4:0];
        end
        SUB_MOVM: begin
          mv.en    = 1'b1;
          mv.store = ir[14];
          mv.greg  = ir[13:9];
          mv.rr    = ir[8:7];
          mv.mode  = amode_e'(ir[6:4]);
          if (ir[15]) ctrl.ymv = mv;
          else        ctrl.xmv = mv;
          if (!is_alu_reg(ir[13:9])) begin
            if (ir[14]) begin
              ctrl.g_rd  = 1'b1;
              ctrl.g_src = ir[13:9];
            end else begin
              ctrl.gmv   = 1'b1;
              ctrl.g_dst = ir[13:9];
              ctrl.g_sel = ir[15] ? GS_YDB : GS_XDB;
            end
          end
        end
        SUB_SHIFT: begin
          ctrl.sh_op   = shop_e'(ir[3:0]);
          ctrl.alu_d   = ir[4];
          ctrl.alu_src = ir[7:5];
        end
        default: ;
      endcase
    end else if (op == OP_IMM) begin
      ctrl.gmv   = 1'b1;
      ctrl.g_sel = GS_IMM;
      if (!ir[19]) begin
        ctrl.g_dst = {2'b00, ir[18:16]};
        ctrl.imm   = ir[15:0];
      end else begin
        ctrl.g_dst = {ir[18:17] + 2'd1, ir[16:14]};
        ctrl.imm   = {6'b0, ir[9:0]};
      end
    end else begin
      ctrl.alu_op  = op;
      ctrl.alu_src = ir[19:17];
      ctrl.alu_d   = ir[16];
      ctrl.xmv.en    = ir[15:14] == 2'd1 || ir[15:14] == 2'd2;
      ctrl.xmv.store = ir[15:14] == 2'd2;
      ctrl.xmv.greg  = xreg(ir[13:12]);
      ctrl.xmv.rr    = ir[11:10];
      ctrl.xmv.mode  = amode_e'({1'b0, ir[9:8]});
      ctrl.ymv.en    = ir[7:6] == 2'd1 || ir[7:6] == 2'd2;
      ctrl.ymv.store = ir[7:6] == 2'd2;
      ctrl.ymv.greg  = yreg(ir[5:4]);
      ctrl.ymv.rr    = ir[3:2];
      ctrl.ymv.mode  = amode_e'({1'b0, ir[1:0]});
    end
  end

  // ---------------------------------------------------------- conditions
  logic cond;
  always_comb begin
    case (cc_e'(ir[13:10]))
      CC_AL:  cond = 1'b1;
      CC_EQ:  cond = ccr.z;
      CC_NE:  cond = !ccr.z;
      CC_PL:  cond = !ccr.n;
      CC_MI:  cond = ccr.n;
      CC_GE:  cond = ccr.n == ccr.v;
      CC_LT:  cond = ccr.n != ccr.v;
      CC_GT:  cond = !ccr.z && (ccr.n == ccr.v);
      CC_LE:  cond = ccr.z || (ccr.n != ccr.v);
      CC_CC:  cond = !ccr.c;
      CC_CS:  cond = ccr.c;
      CC_LC:  cond = !ccr.l;
      CC_LS:  cond = ccr.l;
      CC_RXE: cond = !rx_full;
      CC_TXF: cond = tx_full;
      default: cond = 1'b0;
    endcase
  end

  // ------------------------------------------------- program controller
  logic [15:0] lc;
  paddr_t      ls, la;
  logic [15:0] st_lc [LOOP_DEPTH];
  paddr_t      st_ls [LOOP_DEPTH];
  paddr_t      st_la [LOOP_DEPTH];
  logic        st_act [LOOP_DEPTH];
  logic [$clog2(LOOP_DEPTH+1)-1:0] sp;
  localparam int SPW = (LOOP_DEPTH > 1) ? $clog2(LOOP_DEPTH) : 1;
  logic [SPW-1:0] push_i, pop_i;
  logic        active, halted_q, err_q;

  assign push_i = sp[SPW-1:0];
  assign pop_i  = SPW'(sp - 1'b1);

  logic jump, at_end, loop_back, do_skip, do_start;

  assign exec = !halted_q;
  assign jump      = exec && is_jcc && cond;
  assign do_skip   = exec && is_do && do_count == 16'd0;
  assign do_start  = exec && is_do && do_count != 16'd0;
  assign at_end    = exec && active && pc == la && !jump && !is_do;
  assign loop_back = at_end && lc > 16'd1;

  always_comb begin
    if (!rst_n)         next_pc = '0;   // fetch address 0 during reset
    else if (!exec || is_stop) next_pc = pc;
    else if (jump)      next_pc = target;
    else if (do_skip)   next_pc = target + paddr_t'(1);
    else if (loop_back) next_pc = ls;
    else                next_pc = pc + paddr_t'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc       <= '0;
      ir       <= rom_data;
      halted_q <= 1'b0;
      err_q    <= 1'b0;
      active   <= 1'b0;
      lc <= '0; ls <= '0; la <= '0;
      sp <= '0;
      for (int i = 0; i < LOOP_DEPTH; i++) begin
        st_lc[i] <= '0; st_ls[i] <= '0; st_la[i] <= '0; st_act[i] <= 1'b0;
      end
    end else if (exec) begin
      pc <= next_pc;
      ir <= rom_data;
      if (is_stop) halted_q <= 1'b1;
      if (do_start) begin
        if (int'(sp) < LOOP_DEPTH) begin
          st_lc[push_i]  <= lc;
          st_ls[push_i]  <= ls;
          st_la[push_i]  <= la;
          st_act[push_i] <= active;
          sp <= sp + 1'b1;
        end else begin
          err_q <= 1'b1;
        end
        lc     <= do_count;
        ls     <= pc + paddr_t'(1);
        la     <= target;
        active <= 1'b1;
      end else if (loop_back) begin
        lc <= lc - 16'd1;
      end else if (at_end) begin
        if (sp != '0) begin
          lc     <= st_lc[pop_i];
          ls     <= st_ls[pop_i];
          la     <= st_la[pop_i];
          active <= st_act[pop_i];
          sp     <= sp - 1'b1;
        end else begin
          active <= 1'b0;
        end
      end
    end
  end

  assign halted      = halted_q;
  assign loop_err    = err_q;
  assign lc_out      = lc;
  assign loop_active = active;

endmodule
