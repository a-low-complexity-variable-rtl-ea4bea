// vbr_bitstream_reader: splits the stored bit stream back into regular and
// SID frames for the decoder.
//
// Reads 16-bit storage words, most significant bit first, one bit per
// clock.  The first four bits of each frame decide its type: the SID marker
// 1110 announces a 47-bit SID frame, anything else is the start of a
// 138-bit regular frame (the marker is a code a regular frame never starts
// with).  A complete frame is presented for one cycle on frame_valid, with
// is_sid telling which fields are meaningful: e_par for a regular frame;
// av_lsp, av_scg and sid_frames (the number of 30 ms frames of background
// noise it stands for, 1..16) for a SID frame.  The frame formats and the
// marker follow the document; the word width, bit order and handshake are
// this design's choices, matching vbr_bitstream_writer.  Padding after the
// last frame is not a frame: the reader simply stops receiving words.
//
// Interface: word_valid/word_ready take one storage word when both are
// high.  Timing: 16 cycles per word; frame_valid in the cycle after the
// frame's last bit.  Synchronous active-low reset.
module vbr_bitstream_reader
  import vbr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                word_valid,
  output logic                word_ready,
  input  logic [SW-1:0]       word,
  output logic                frame_valid,
  output logic                is_sid,
  output reg_frame_t          e_par,
  output logic [LSP_BITS-1:0] av_lsp,
  output logic [SCG_BITS-1:0] av_scg,
  output logic [4:0]          sid_frames
);

  logic [SW-1:0]            buf_q;
  logic [$clog2(SW+1)-1:0]  buf_n;     // bits left in buf_q
  logic [REG_BITS-1:0]      sh;        // bits of the current frame
  logic [7:0]               got;       // bits collected for the current frame
  logic                     sid_q;
  logic [REG_BITS-1:0]      nsh;       // frame bits including the next one

  assign nsh = {sh[REG_BITS-2:0], buf_q[SW-1]};

  assign word_ready = (buf_n == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q <= '0; buf_n <= '0; sh <= '0; got <= '0; sid_q <= 1'b0;
      frame_valid <= 1'b0; is_sid <= 1'b0; e_par <= '0;
      av_lsp <= '0; av_scg <= '0; sid_frames <= '0;
    end else begin
      frame_valid <= 1'b0;
      if (word_valid && word_ready) begin
        buf_q <= word;
        buf_n <= ($bits(buf_n))'(SW);
      end else if (buf_n != '0) begin
        buf_q <= buf_q << 1;
        buf_n <= buf_n - 1'b1;
        if (got == 8'(MARK_BITS - 1) && nsh[MARK_BITS-1:0] == SID_MARK) begin
          sid_q <= 1'b1;
          sh    <= nsh;
          got   <= got + 8'd1;
        end else if ((sid_q && got == 8'(SID_BITS - 1)) ||
                     (!sid_q && got == 8'(REG_BITS - 1))) begin
          frame_valid <= 1'b1;
          is_sid      <= sid_q;
          if (sid_q) begin
            av_lsp     <= nsh[LEN_BITS+SCG_BITS +: LSP_BITS];
            av_scg     <= nsh[LEN_BITS +: SCG_BITS];
            sid_frames <= {1'b0, nsh[LEN_BITS-1:0]} + 5'd1;
          end else begin
            e_par <= nsh;
          end
          sh    <= '0;
          got   <= '0;
          sid_q <= 1'b0;
        end else begin
          sh  <= nsh;
          got <= got + 8'd1;
        end
      end
    end
  end

endmodule
