// dsp_alu: data arithmetic logic unit of the DSP.
//
// Holds the four 16-bit input registers X0, X1, Y0, Y1, the two 40-bit
// accumulators A and B (8-bit extension, 16-bit high word, 16-bit low word)
// and the condition code register.  Arithmetic is fractional two's
// complement.  A 16x16 multiplier gives a 32-bit product (shifted left once,
// as for Q15 x Q15 -> Q31) that feeds one input of a 40-bit adder; the
// destination accumulator feeds the other.  Between the adder and the
// accumulators sit rounding, shifting, one normalisation step and one
// non-restoring division step.  No logical operations exist.  These points
// follow the document.
//
// Operations (op field): MPY, MPYR, MAC, MACR, RND, DIV, NORM, ADD, SUB,
// NEG, ABS, CLR, TFR; and through the control format ASL, ASR, CMP.
// Multiplier operand pairs (src): 0 X0*Y0, 1 X0*Y1, 2 X1*Y0, 3 X1*Y1,
// 4 X0*X0, 5 X1*X1, 6 Y0*Y0, 7 Y1*Y1.  Adder source (src): 0 X0, 1 X1,
// 2 Y0, 3 Y1, 4..7 the other accumulator.  DIV divisor: src[1:0] as X0..Y1.
// NORM: src selects the address register R0..R7 that counts the exponent;
// the adjust request (norm_en, norm_rn, norm_inc) goes to the AGU.
// CLR also clears the carry, which a division sequence needs first.
// These encodings, the rounding rule (add one half LSB of the high word,
// then clear the low word) and the flag rules are this design's choices,
// modelled on the DSP56001.
//
// Register access: three read ports (X bus, Y bus, global bus) and three
// write ports.  Reading A or B onto a 16-bit bus returns the high word,
// limited to 0x7FFF / 0x8000 when the extension is in use; this sets the
// sticky L flag.  Writing A or B from a bus loads the high word, sign
// extends it and clears the low word.  When an operation and a move write
// the same accumulator in one cycle, the operation wins.
//
// Timing: one operation per clock; all reads are combinational, results
// and moves take effect at the rising clock edge.  Synchronous active-low
// reset clears every register.
module dsp_alu
  import dsp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  ctrl_t      ctrl,
  input  logic       exec,      // instruction valid this cycle
  input  word_t      xdb_in,    // X data bus (loads)
  input  word_t      ydb_in,    // Y data bus (loads)
  input  word_t      gdb_in,    // global bus (loads)
  output word_t      x_rdata,   // register named by the X move
  output word_t      y_rdata,   // register named by the Y move
  output word_t      g_rdata,   // register g_src
  output ccr_t       ccr,
  output logic       norm_en,
  output logic [2:0] norm_rn,
  output logic       norm_inc,  // 1: Rn+1 (right shift), 0: Rn-1
  output acc_t       acc_a,     // observation of the accumulators
  output acc_t       acc_b
);

  word_t x0, x1, y0, y1;
  acc_t  a, b;
  ccr_t  ccr_q;

  assign ccr   = ccr_q;
  assign acc_a = a;
  assign acc_b = b;

  // ---------------------------------------------------------------- helpers
  function automatic acc_t sext_hi(word_t w);
    return {{8{w[15]}}, w, 16'h0000};
  endfunction

  // Limiter: high word of an accumulator, saturated if the extension is used
  function automatic logic [16:0] limit(acc_t v);
    logic ext_used;
    ext_used = !((&v[39:31]) || !(|v[39:31]));
    if (!ext_used)   return {1'b0, v[31:16]};
    else if (v[39])  return {1'b1, 16'h8000};
    else             return {1'b1, 16'h7FFF};
  endfunction

  function automatic acc_t rnd(acc_t v);
    acc_t t;
    t = v + 40'h00_0000_8000;
    return {t[39:16], 16'h0000};
  endfunction

  function automatic word_t reg_rd(logic [4:0] g, word_t rx0, word_t rx1,
                                   word_t ry0, word_t ry1, acc_t ra, acc_t rb);
    logic [16:0] la, lb;
    la = limit(ra);
    lb = limit(rb);
    case (g)
      G_X0:    return rx0;
      G_X1:    return rx1;
      G_Y0:    return ry0;
      G_Y1:    return ry1;
      G_A:     return la[15:0];
      G_B:     return lb[15:0];
      default: return '0;
    endcase
  endfunction

  function automatic logic reg_sat(logic [4:0] g, acc_t ra, acc_t rb);
    logic [16:0] la, lb;
    la = limit(ra);
    lb = limit(rb);
    return (g == G_A && la[16]) || (g == G_B && lb[16]);
  endfunction

  // ------------------------------------------------------------- read ports
  assign x_rdata = reg_rd(ctrl.xmv.greg, x0, x1, y0, y1, a, b);
  assign y_rdata = reg_rd(ctrl.ymv.greg, x0, x1, y0, y1, a, b);
  assign g_rdata = reg_rd(ctrl.g_src,    x0, x1, y0, y1, a, b);

  logic move_sat;
  always_comb begin
    move_sat = 1'b0;
    if (ctrl.xmv.en && ctrl.xmv.store && is_alu_reg(ctrl.xmv.greg))
      move_sat |= reg_sat(ctrl.xmv.greg, a, b);
    if (ctrl.ymv.en && ctrl.ymv.store && is_alu_reg(ctrl.ymv.greg))
      move_sat |= reg_sat(ctrl.ymv.greg, a, b);
    if (ctrl.g_rd && ctrl.g_sel == GS_REG && is_alu_reg(ctrl.g_src))
      move_sat |= reg_sat(ctrl.g_src, a, b);
  end

  // ------------------------------------------------------------- operation
  word_t       m1, m2, divisor;
  logic signed [31:0] prod;
  acc_t        p40, d_in, s_in, res;
  logic        wr_d;
  ccr_t        f;
  logic [40:0] sum;

  always_comb begin
    // multiplier operands
    case (ctrl.alu_src)
      3'd0: begin m1 = x0; m2 = y0; end
      3'd1: begin m1 = x0; m2 = y1; end
      3'd2: begin m1 = x1; m2 = y0; end
      3'd3: begin m1 = x1; m2 = y1; end
      3'd4: begin m1 = x0; m2 = x0; end
      3'd5: begin m1 = x1; m2 = x1; end
      3'd6: begin m1 = y0; m2 = y0; end
      default: begin m1 = y1; m2 = y1; end
    endcase
    prod = $signed(m1) * $signed(m2);
    p40  = {{8{prod[31]}}, prod} << 1;

    d_in = ctrl.alu_d ? b : a;
    case (ctrl.alu_src)
      3'd0: s_in = sext_hi(x0);
      3'd1: s_in = sext_hi(x1);
      3'd2: s_in = sext_hi(y0);
      3'd3: s_in = sext_hi(y1);
      default: s_in = ctrl.alu_d ? a : b;
    endcase
    case (ctrl.alu_src[1:0])
      2'd0: divisor = x0;
      2'd1: divisor = x1;
      2'd2: divisor = y0;
      default: divisor = y1;
    endcase

    res      = d_in;
    wr_d     = 1'b0;
    f        = ccr_q;
    sum      = '0;
    norm_en  = 1'b0;
    norm_rn  = ctrl.alu_src;
    norm_inc = 1'b0;

    case (ctrl.alu_op)
      OP_MPY, OP_MPYR: begin
        res  = (ctrl.alu_op == OP_MPYR) ? rnd(p40) : p40;
        wr_d = 1'b1;
        f.v  = 1'b0;
      end
      OP_MAC, OP_MACR: begin
        sum  = {1'b0, d_in} + {1'b0, p40};
        res  = (ctrl.alu_op == OP_MACR) ? rnd(sum[39:0]) : sum[39:0];
        wr_d = 1'b1;
        f.c  = sum[40];
        f.v  = (d_in[39] == p40[39]) && (sum[39] != d_in[39]);
      end
      OP_RND: begin
        res  = rnd(d_in);
        wr_d = 1'b1;
        f.v  = !d_in[39] && res[39];
      end
      OP_DIV: begin
        // one non-restoring step: shift in the previous quotient bit, then
        // subtract the divisor when signs agree, add it when they differ
        if (d_in[39] == divisor[15])
          res = {d_in[38:0], ccr_q.c} - sext_hi(divisor);
        else
          res = {d_in[38:0], ccr_q.c} + sext_hi(divisor);
        wr_d = 1'b1;
        f.c  = !(res[39] ^ divisor[15]);
        f.v  = d_in[39] ^ d_in[38];
      end
      OP_NORM: begin
        if (!ccr_q.e && ccr_q.u && !ccr_q.z) begin
          res      = d_in << 1;
          norm_en  = exec;
          norm_inc = 1'b0;
        end else if (ccr_q.e) begin
          res      = $signed(d_in) >>> 1;
          norm_en  = exec;
          norm_inc = 1'b1;
        end
        wr_d = 1'b1;
        f.v  = 1'b0;
      end
      OP_ADD: begin
        sum  = {1'b0, d_in} + {1'b0, s_in};
        res  = sum[39:0];
        wr_d = 1'b1;
        f.c  = sum[40];
        f.v  = (d_in[39] == s_in[39]) && (res[39] != d_in[39]);
      end
      OP_SUB: begin
        sum  = {1'b0, d_in} - {1'b0, s_in};
        res  = sum[39:0];
        wr_d = 1'b1;
        f.c  = sum[40];
        f.v  = (d_in[39] != s_in[39]) && (res[39] != d_in[39]);
      end
      OP_NEG: begin
        res  = -d_in;
        wr_d = 1'b1;
        f.v  = d_in == 40'h80_0000_0000;
      end
      OP_ABS: begin
        res  = d_in[39] ? -d_in : d_in;
        wr_d = 1'b1;
        f.v  = d_in == 40'h80_0000_0000;
      end
      OP_CLR: begin
        res  = '0;
        wr_d = 1'b1;
        f.v  = 1'b0;
        f.c  = 1'b0;   // clears the quotient bit ahead of a division
      end
      OP_TFR: begin
        res  = s_in;
        wr_d = 1'b1;
      end
      default: ;
    endcase

    case (ctrl.sh_op)
      SH_ASL: begin
        res  = d_in << 1;
        wr_d = 1'b1;
        f.c  = d_in[39];
        f.v  = d_in[39] ^ d_in[38];
      end
      SH_ASR: begin
        res  = $signed(d_in) >>> 1;
        wr_d = 1'b1;
        f.c  = d_in[0];
        f.v  = 1'b0;
      end
      SH_CMP: begin
        sum  = {1'b0, d_in} - {1'b0, s_in};
        res  = sum[39:0];   // flags only, accumulator unchanged
        f.c  = sum[40];
        f.v  = (d_in[39] != s_in[39]) && (res[39] != d_in[39]);
      end
      default: ;
    endcase

    // result flags (TFR and DIV leave N, Z, E, U alone)
    if ((ctrl.alu_op != OP_NOP && ctrl.alu_op != OP_TFR && ctrl.alu_op != OP_DIV
         && ctrl.alu_op != OP_CTL && ctrl.alu_op != OP_IMM) || ctrl.sh_op != SH_NONE) begin
      f.n = res[39];
      f.z = (res == '0);
      f.e = !((&res[39:31]) || !(|res[39:31]));
      f.u = !(res[31] ^ res[30]);
    end
    f.l = ccr_q.l | f.v | move_sat;
  end

  // ----------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x0 <= '0; x1 <= '0; y0 <= '0; y1 <= '0;
      a  <= '0; b  <= '0;
      ccr_q <= '0;
    end else if (exec) begin
      // moves from the busses (old register values were read above)
      if (ctrl.xmv.en && !ctrl.xmv.store && is_alu_reg(ctrl.xmv.greg)) begin
        case (ctrl.xmv.greg)
          G_X0: x0 <= xdb_in;
          G_X1: x1 <= xdb_in;
          G_Y0: y0 <= xdb_in;
          G_Y1: y1 <= xdb_in;
          G_A:  a  <= sext_hi(xdb_in);
          default: b <= sext_hi(xdb_in);
        endcase
      end
      if (ctrl.ymv.en && !ctrl.ymv.store && is_alu_reg(ctrl.ymv.greg)) begin
        case (ctrl.ymv.greg)
          G_X0: x0 <= ydb_in;
          G_X1: x1 <= ydb_in;
          G_Y0: y0 <= ydb_in;
          G_Y1: y1 <= ydb_in;
          G_A:  a  <= sext_hi(ydb_in);
          default: b <= sext_hi(ydb_in);
        endcase
      end
      if (ctrl.gmv && is_alu_reg(ctrl.g_dst)) begin
        case (ctrl.g_dst)
          G_X0: x0 <= gdb_in;
          G_X1: x1 <= gdb_in;
          G_Y0: y0 <= gdb_in;
          G_Y1: y1 <= gdb_in;
          G_A:  a  <= sext_hi(gdb_in);
          default: b <= sext_hi(gdb_in);
        endcase
      end
      if (wr_d) begin
        if (ctrl.alu_d) b <= res;
        else            a <= res;
      end
      ccr_q <= f;
    end
  end

endmodule
