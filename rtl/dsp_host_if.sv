// dsp_host_if: host interface between an 8-bit PC bus and the 16-bit DSP.
//
// The PC writes two 8-bit registers that the DSP reads as one 16-bit
// receive word; the DSP writes one 16-bit transmit word that the PC reads
// as two bytes; an 8-bit DSP status register, written by the DSP program,
// can be read by the PC.  Hardware flags stop either side from overwriting
// a word not yet taken or reading a word not yet written.  This much
// follows the document; the register addresses and the flag rules are this
// design's choices:
//   PC address 0: write receive low byte   / read transmit low byte
//   PC address 1: write receive high byte  / read transmit high byte
//                 (writing it completes the word and sets rx_full;
//                  reading it completes the read and clears tx_full)
//   PC address 2: read DSP status register
//   PC address 3: read hardware flags {6'b0, tx_full, rx_full}
// PC writes while rx_full is set are ignored; DSP transmit writes while
// tx_full is set are ignored.  The DSP polls rx_full/tx_full through
// conditional jumps.  The PC side is synchronous to the DSP clock: pc_wr
// and pc_rd are one-cycle strobes, pc_rdata is combinational.
module dsp_host_if
  import dsp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // PC side
  input  logic [1:0] pc_addr,
  input  logic       pc_wr,
  input  logic       pc_rd,
  input  logic [7:0] pc_wdata,
  output logic [7:0] pc_rdata,
  // DSP side
  input  logic       rx_pop,      // DSP reads the receive word
  input  logic       tx_push,     // DSP writes the transmit word
  input  logic       stat_we,     // DSP writes the status register
  input  word_t      dsp_wdata,
  input  logic       stat_rd,     // 1: dsp_rdata shows the status register
  output word_t      dsp_rdata,
  output logic       rx_full,
  output logic       tx_full
);

  logic [7:0] rx_lo, rx_hi, status;
  word_t      tx;

  always_comb begin
    case (pc_addr)
      2'd0: pc_rdata = tx[7:0];
      2'd1: pc_rdata = tx[15:8];
      2'd2: pc_rdata = status;
      default: pc_rdata = {6'b0, tx_full, rx_full};
    endcase
  end

  assign dsp_rdata = stat_rd ? {8'h00, status} : {rx_hi, rx_lo};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_lo <= '0; rx_hi <= '0; status <= '0; tx <= '0;
      rx_full <= 1'b0; tx_full <= 1'b0;
    end else begin
      if (pc_wr && !rx_full) begin
        if (pc_addr == 2'd0) rx_lo <= pc_wdata;
        if (pc_addr == 2'd1) begin
          rx_hi   <= pc_wdata;
          rx_full <= 1'b1;
        end
      end
      if (rx_pop) rx_full <= 1'b0;
      if (pc_rd && pc_addr == 2'd1) tx_full <= 1'b0;
      if (tx_push && !tx_full) begin
        tx      <= dsp_wdata;
        tx_full <= 1'b1;
      end
      if (stat_we) status <= dsp_wdata[7:0];
    end
  end

endmodule
