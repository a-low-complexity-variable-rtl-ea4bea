`timescale 1ns/1ps
// tb_dsp_alu: self-checking test of the data ALU.
//
// Drives the decoded control word directly.  Random operands go through
// MPY, MPYR, MAC, MACR, ADD, SUB, NEG, ABS, TFR, ASL, ASR, CMP and RND;
// each result is compared with integer arithmetic worked out here.  It
// also checks a 16-step division against integer division, normalisation
// steps against a count of leading sign bits, and the limiter when an
// accumulator with its extension in use is read onto a bus.
module tb_dsp_alu;
  import dsp_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, exec = 1'b1;
  ctrl_t ctrl;
  word_t xdb_in, ydb_in, gdb_in, x_rdata, y_rdata, g_rdata;
  ccr_t  ccr;
  logic  norm_en, norm_inc;
  logic [2:0] norm_rn;
  acc_t  acc_a, acc_b;

  int checks = 0, failures = 0;

  dsp_alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200_000;   // 20,000 cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    ctrl = '0;
    ctrl.alu_op = OP_NOP; ctrl.sh_op = SH_NONE; ctrl.g_sel = GS_REG;
  endtask

  task automatic step();
    @(posedge clk); #1;
    idle();
  endtask

  // load a data register through the global bus
  task automatic load(logic [4:0] g, word_t v);
    idle();
    ctrl.gmv = 1'b1; ctrl.g_dst = g; gdb_in = v;
    step();
  endtask

  task automatic alu(op_e op, logic [2:0] src, logic d);
    idle();
    ctrl.alu_op = op; ctrl.alu_src = src; ctrl.alu_d = d;
    step();
  endtask

  task automatic sh(shop_e op, logic [2:0] src, logic d);
    idle();
    ctrl.sh_op = op; ctrl.alu_src = src; ctrl.alu_d = d;
    step();
  endtask

  task automatic expect_acc(string what, acc_t got, acc_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  function automatic acc_t prod(word_t a, word_t b);
    longint p;
    p = longint'($signed(a)) * longint'($signed(b)) * 2;
    return acc_t'(p);
  endfunction

  function automatic acc_t hi(word_t w);
    longint p;
    p = longint'($signed(w)) * 65536;
    return acc_t'(p);
  endfunction

  function automatic acc_t round40(acc_t v);
    acc_t t;
    t = v + 40'h8000;
    t[15:0] = '0;
    return t;
  endfunction

  word_t a16, b16, c16, d16;
  acc_t  ea, eb;
  longint q;
  int    k, steps;

  initial begin
    idle();
    xdb_in = '0; ydb_in = '0; gdb_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int it = 0; it < 200; it++) begin
      a16 = word_t'($urandom); b16 = word_t'($urandom);
      c16 = word_t'($urandom); d16 = word_t'($urandom);
      load(G_X0, a16); load(G_Y0, b16); load(G_X1, c16); load(G_Y1, d16);
      // MPY X0*Y0 -> A
      alu(OP_MPY, 3'd0, 1'b0); ea = prod(a16, b16);
      expect_acc("MPY", acc_a, ea);
      // MAC X1*Y1 + A -> A
      alu(OP_MAC, 3'd3, 1'b0); ea = ea + prod(c16, d16);
      expect_acc("MAC", acc_a, ea);
      // MPYR X0*Y1 -> B
      alu(OP_MPYR, 3'd1, 1'b1); eb = round40(prod(a16, d16));
      expect_acc("MPYR", acc_b, eb);
      // MACR X1*X1 + B -> B
      alu(OP_MACR, 3'd5, 1'b1); eb = round40(eb + prod(c16, c16));
      expect_acc("MACR", acc_b, eb);
      // ADD B to A, SUB Y0 from A
      alu(OP_ADD, 3'd4, 1'b0); ea = ea + eb;
      expect_acc("ADD", acc_a, ea);
      alu(OP_SUB, 3'd2, 1'b0); ea = ea - hi(b16);
      expect_acc("SUB", acc_a, ea);
      expect_bit("N flag", ccr.n, ea[39]);
      expect_bit("Z flag", ccr.z, ea == 0);
      // CMP A with B: flags only
      sh(SH_CMP, 3'd4, 1'b0);
      expect_acc("CMP keeps A", acc_a, ea);
      expect_bit("CMP N", ccr.n, acc_t'(ea - eb) >> 39);
      // NEG, ABS
      alu(OP_NEG, 3'd0, 1'b1); eb = -eb;
      expect_acc("NEG", acc_b, eb);
      alu(OP_ABS, 3'd0, 1'b1); if (eb[39]) eb = -eb;
      expect_acc("ABS", acc_b, eb);
      // ASL / ASR on A, RND
      sh(SH_ASL, 3'd0, 1'b0); ea = ea << 1;
      expect_acc("ASL", acc_a, ea);
      sh(SH_ASR, 3'd0, 1'b0); ea = acc_t'($signed(ea) >>> 1);
      expect_acc("ASR", acc_a, ea);
      alu(OP_RND, 3'd0, 1'b0); ea = round40(ea);
      expect_acc("RND", acc_a, ea);
      // TFR X0 -> B
      alu(OP_TFR, 3'd0, 1'b1);
      expect_acc("TFR", acc_b, hi(a16));
    end

    // limiter: extension in use -> saturated high word, L set
    load(G_X0, 16'h7FFF); load(G_Y0, 16'h7FFF);
    alu(OP_CLR, 3'd0, 1'b0);
    for (int i = 0; i < 4; i++) alu(OP_MAC, 3'd0, 1'b0);
    idle(); ctrl.g_rd = 1'b1; ctrl.g_src = G_A; #1;
    checks++;
    if (g_rdata !== 16'h7FFF) begin failures++; $display("limit %h", g_rdata); end
    step();
    expect_bit("L flag", ccr.l, 1'b1);
    load(G_X0, 16'h8000); load(G_Y0, 16'h7FFF);
    alu(OP_CLR, 3'd0, 1'b1);
    for (int i = 0; i < 4; i++) alu(OP_MAC, 3'd0, 1'b1);
    idle(); ctrl.ymv.en = 1'b1; ctrl.ymv.store = 1'b1; ctrl.ymv.greg = G_B; #1;
    checks++;
    if (y_rdata !== 16'h8000) begin failures++; $display("limit neg %h", y_rdata); end
    step();

    // division: 0 < a < s, 16 DIV steps leave floor(a * 2^15 / s) in A0
    for (int it = 0; it < 50; it++) begin
      b16 = word_t'($urandom_range(2, 32767));
      a16 = word_t'($urandom_range(1, int'(b16) - 1));
      load(G_X1, b16);
      alu(OP_CLR, 3'd0, 1'b0);
      load(G_A, a16);
      for (int i = 0; i < 16; i++) alu(OP_DIV, 3'd1, 1'b0);
      q = (longint'(a16) * 32768) / longint'(b16);
      checks++;
      if (acc_a[15:0] !== 16'(q)) begin
        failures++;
        $display("DIV %h/%h: got %h expected %h", a16, b16, acc_a[15:0], 16'(q));
      end
    end

    // normalisation: a positive value 2^-k needs k-1 left shifts; each step
    // asks the AGU for Rn-1
    for (int it = 0; it < 20; it++) begin
      k = $urandom_range(2, 14);
      load(G_A, 16'(1 << (15 - k)));
      load(G_X0, 16'h0000);
      alu(OP_ADD, 3'd0, 1'b0);  // A = A + 0 sets the flags NORM tests
      begin
        steps = 0;
        for (int i = 0; i < 20; i++) begin
          idle();
          ctrl.alu_op = OP_NORM; ctrl.alu_src = 3'd2; ctrl.alu_d = 1'b0;
          #1;
          if (norm_en) begin
            steps++;
            checks++;
            if (norm_inc !== 1'b0 || norm_rn !== 3'd2) begin
              failures++; $display("NORM adjust request wrong");
            end
          end
          step();
        end
        checks++;
        if (steps != k - 1 || acc_a[31:30] !== 2'b01) begin
          failures++;
          $display("NORM k=%0d: %0d steps, A=%h", k, steps, acc_a);
        end
      end
    end

    // extension in use: NORM shifts right and asks for Rn+1
    load(G_X0, 16'h7FFF); load(G_Y0, 16'h7FFF);
    alu(OP_CLR, 3'd0, 1'b0);
    alu(OP_MAC, 3'd0, 1'b0); alu(OP_MAC, 3'd0, 1'b0);
    ea = acc_a;
    idle(); ctrl.alu_op = OP_NORM; ctrl.alu_src = 3'd5; #1;
    expect_bit("NORM right request", norm_en && norm_inc && norm_rn == 3'd5, 1'b1);
    step();
    expect_acc("NORM right", acc_a, acc_t'($signed(ea) >>> 1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
