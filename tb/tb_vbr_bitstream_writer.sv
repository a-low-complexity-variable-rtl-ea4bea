`timescale 1ns/1ps
// tb_vbr_bitstream_writer: self-checking test of the bit-stream writer.
//
// Feeds 400 frames whose VAD pattern alternates speech bursts and silence
// runs of 1 to 40 frames (so runs are cut at 16), then a flush.  The
// expected stream is built here bit by bit from the frame rules (regular
// frame for speech, one SID frame per run of at most 16 silent frames,
// written when the run ends) and compared word by word with the output.
// Also checks that a frame takes one cycle per stored bit plus one.
module tb_vbr_bitstream_writer;
  import vbr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_valid, frame_ready, flush, vad, word_valid;
  reg_frame_t e_par;
  logic [LSP_BITS-1:0] av_lsp;
  logic [SCG_BITS-1:0] av_scg;
  logic [SW-1:0] word;
  logic [4:0] run_len;

  int checks = 0, failures = 0;

  vbr_bitstream_writer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_bits [$];
  logic [SW-1:0] got_words [$];
  int n_sid = 0, n_reg = 0, n_cut = 0, run = 0, left = 0, t0, bits_before;
  bit cur_vad = 1;

  task automatic push(logic [REG_BITS-1:0] v, int n);
    for (int i = n - 1; i >= 0; i--) exp_bits.push_back(v[i]);
  endtask

  task automatic push_sid(int len, logic [LSP_BITS-1:0] l, logic [SCG_BITS-1:0] g);
    push(REG_BITS'(SID_MARK), 4); push(REG_BITS'(l), LSP_BITS);
    push(REG_BITS'(g), SCG_BITS); push(REG_BITS'(len - 1), LEN_BITS);
    n_sid++;
  endtask

  always @(posedge clk) if (word_valid) got_words.push_back(word);

  initial begin
    frame_valid = 0; flush = 0; vad = 0; e_par = '0; av_lsp = '0; av_scg = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 400; f++) begin
      if (left == 0) begin
        cur_vad = !cur_vad;
        left = cur_vad ? $urandom_range(1, 6) : $urandom_range(1, 40);
      end
      left--;
      vad = cur_vad;
      for (int i = 0; i < REG_BITS; i += 32) e_par[i +: 32] = $urandom;
      if (e_par[REG_BITS-1 -: 4] == SID_MARK) e_par[REG_BITS-1] = 1'b0;
      av_lsp = {$urandom, $urandom};
      av_scg = 5'($urandom);
      bits_before = exp_bits.size();
      if (vad) begin
        if (run > 0) push_sid(run, av_lsp, av_scg);
        push(e_par, REG_BITS); n_reg++;
        run = 0;
      end else begin
        run++;
        if (run == MAX_RUN) begin push_sid(run, av_lsp, av_scg); run = 0; n_cut++; end
      end
      while (!frame_ready) @(negedge clk);
      frame_valid = 1;
      t0 = $time;
      @(posedge clk); #1 frame_valid = 0;
      while (!frame_ready) @(negedge clk);
      // one clock to accept plus one per stored bit
      checks++;
      if (($time - t0) / 10 != 1 + exp_bits.size() - bits_before &&
          exp_bits.size() != bits_before) begin
        failures++;
        $display("frame %0d took %0d cycles for %0d bits", f, ($time - t0) / 10,
                 exp_bits.size() - bits_before);
      end
      checks++;
      if (run_len != 5'(run)) begin failures++; $display("run length %0d vs %0d", run_len, run); end
    end
    // flush: pending SID, then pad
    av_lsp = {$urandom, $urandom}; av_scg = 5'($urandom);
    if (run > 0) push_sid(run, av_lsp, av_scg);
    while (exp_bits.size() % SW != 0) exp_bits.push_back(1'b0);
    @(negedge clk); flush = 1; frame_valid = 1;
    @(negedge clk); frame_valid = 0; flush = 0;
    repeat (300) @(negedge clk);
    checks++;
    if (got_words.size() * SW != exp_bits.size()) begin
      failures++;
      $display("%0d words written, expected %0d", got_words.size(), exp_bits.size() / SW);
    end
    for (int w = 0; w < got_words.size() && w * SW < exp_bits.size(); w++) begin
      logic [SW-1:0] e;
      for (int b = 0; b < SW; b++) e[SW-1-b] = exp_bits[w*SW + b];
      checks++;
      if (got_words[w] !== e) begin
        failures++;
        if (failures < 10) $display("word %0d: got %h expected %h", w, got_words[w], e);
      end
    end
    checks++;
    if (n_sid == 0 || n_reg == 0 || n_cut == 0) begin
      failures++; $display("missing case: sid %0d reg %0d cut %0d", n_sid, n_reg, n_cut);
    end
    $display("regular=%0d sid=%0d sid_at_16=%0d words=%0d", n_reg, n_sid, n_cut, got_words.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
