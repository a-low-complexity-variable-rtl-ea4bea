`timescale 1ns/1ps
// tb_dsp_cu: self-checking test of the controller unit.
//
// Runs a test program (tb/dsp_cu_test.hex) that contains a single loop,
// two nested loops, a loop with a zero count, a taken and a not-taken
// conditional jump, a loop whose count comes from a register over the
// global bus, a polling loop on the host receive flag, loops nested deeper
// than the hardware stack, and STOP.  The address of the executing
// instruction is compared, cycle by cycle, with the trace written out
// below; since the trace has one entry per clock, it also checks that
// every instruction, jump and loop return takes exactly one cycle.
// Decoding is checked on the DO-register instruction (register read onto
// the global bus) and on STOP.
module tb_dsp_cu;
  import dsp_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  ccr_t   ccr;
  logic   rx_full, tx_full;
  word_t  gdb;
  ctrl_t  ctrl;
  logic   exec, halted, loop_err, loop_active;
  paddr_t pc;
  logic [15:0] lc_out;

  int checks = 0, failures = 0;

  dsp_cu #(.PROG_FILE("tb/dsp_cu_test.hex")) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10_000;   // 1,000 cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int trace [$];
  int polls = 0, n;

  initial begin
    // expected trace of executed addresses up to the deep nest
    trace.push_back(0);
    trace.push_back(1);
    repeat (3) begin trace.push_back(2); trace.push_back(3); end
    trace.push_back(4);
    repeat (2) begin
      trace.push_back(5);
      repeat (3) trace.push_back(6);
      trace.push_back(7); trace.push_back(8);
    end
    trace.push_back(9);
    trace.push_back(11);           // DO #0 skips address 10
    trace.push_back(14);           // JEQ taken
    trace.push_back(15);           // JNE not taken
    repeat (4) trace.push_back(16);
    repeat (5) trace.push_back(17);
    trace.push_back(18);

    ccr = '0; ccr.z = 1'b1;
    tx_full = 1'b0; rx_full = 1'b0;
    gdb = 16'd4;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    n = 0;
    while (n < trace.size()) begin
      #1;
      checks++;
      if (!exec || int'(pc) != trace[n]) begin
        failures++;
        $display("cycle %0d: executing %0d expected %0d", n, pc, trace[n]);
      end
      if (pc == 10'd15) begin
        checks++;
        if (!(ctrl.g_rd && ctrl.g_src == G_X0 && ctrl.g_sel == GS_REG)) begin
          failures++; $display("DO X0 does not read X0 onto the global bus");
        end
      end
      if (pc == 10'd17) begin
        polls++;
        if (polls == 5) rx_full = 1'b1;
      end
      n++;
      @(posedge clk);
    end
    // deep nest overflows the 4-entry loop stack; then STOP
    repeat (30) @(posedge clk);
    #1;
    checks++;
    if (!loop_err) begin failures++; $display("loop stack overflow not flagged"); end
    checks++;
    if (!halted || pc != 10'd30) begin failures++; $display("not halted at STOP (pc %0d)", pc); end
    checks++;
    if (exec) begin failures++; $display("still executing after STOP"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
