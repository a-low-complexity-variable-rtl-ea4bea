`timescale 1ns/1ps
// tb_vbr_bitstream_reader: self-checking test of the bit-stream reader.
//
// Builds here a stream of 300 random regular and SID frames (SID run
// lengths 1..16), packed back to back into 16-bit words, most significant
// bit first, and padded at the end.  The words are offered with random
// gaps; every frame the reader reports is compared with the list of frames
// that went in, and the count must match.  Also checks the rate: one
// stored bit per clock while words are available.
module tb_vbr_bitstream_reader;
  import vbr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic word_valid, word_ready, frame_valid, is_sid;
  logic [SW-1:0] word;
  reg_frame_t e_par;
  logic [LSP_BITS-1:0] av_lsp;
  logic [SCG_BITS-1:0] av_scg;
  logic [4:0] sid_frames;

  int checks = 0, failures = 0;

  vbr_bitstream_reader dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    bit sid;
    logic [REG_BITS-1:0] e;
    logic [LSP_BITS-1:0] l;
    logic [SCG_BITS-1:0] g;
    int len;
  } frame_s;

  frame_s frames [$];
  bit bits [$];
  int n_out = 0, n_sid = 0;
  frame_s fr;

  task automatic push(logic [REG_BITS-1:0] v, int n);
    for (int i = n - 1; i >= 0; i--) bits.push_back(v[i]);
  endtask

  always @(posedge clk) if (rst_n && frame_valid) begin
    checks++;
    if (n_out >= frames.size()) begin
      failures++; $display("extra frame");
    end else begin
      fr = frames[n_out];
      if (is_sid !== fr.sid ||
          (fr.sid && (av_lsp !== fr.l || av_scg !== fr.g || int'(sid_frames) != fr.len)) ||
          (!fr.sid && e_par !== fr.e)) begin
        failures++;
        $display("frame %0d differs (sid %b/%b)", n_out, is_sid, fr.sid);
      end
    end
    n_out++;
  end

  initial begin
    for (int f = 0; f < 300; f++) begin
      fr.sid = ($urandom_range(0, 2) == 0);
      for (int i = 0; i < REG_BITS; i += 32) fr.e[i +: 32] = $urandom;
      if (fr.e[REG_BITS-1 -: 4] == SID_MARK) fr.e[REG_BITS-2] = 1'b0;
      fr.l = {$urandom, $urandom};
      fr.g = 5'($urandom);
      fr.len = $urandom_range(1, 16);
      frames.push_back(fr);
      if (fr.sid) begin
        push(REG_BITS'(SID_MARK), 4); push(REG_BITS'(fr.l), LSP_BITS);
        push(REG_BITS'(fr.g), SCG_BITS); push(REG_BITS'(fr.len - 1), LEN_BITS);
        n_sid++;
      end else push(fr.e, REG_BITS);
    end
    while (bits.size() % SW != 0) bits.push_back(1'b0);

    word_valid = 0; word = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < bits.size() / SW; w++) begin
      for (int b = 0; b < SW; b++) word[SW-1-b] = bits[w*SW + b];
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 20)) @(negedge clk);
      @(negedge clk);
      word_valid = 1;
      while (!word_ready) @(negedge clk);
      @(posedge clk);
      #1 word_valid = 0;
      // rate: the word is consumed in 16 cycles after it is taken
      if (w == 5) begin
        int c = 0;
        #1;
        while (!word_ready) begin @(posedge clk); #1 c++; end
        checks++;
        if (c != SW) begin failures++; $display("word took %0d cycles", c); end
      end
    end
    repeat (40) @(negedge clk);
    checks++;
    if (n_out != frames.size()) begin
      failures++; $display("%0d frames out, %0d in", n_out, frames.size());
    end
    $display("frames=%0d sid=%0d", n_out, n_sid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
