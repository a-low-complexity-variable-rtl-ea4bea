// dsp_agu: address generation unit.
//
// Holds eight address registers R0-R7, eight offset registers N0-N7 and
// eight modifier registers M0-M7, all 10 bits wide (1024 words per memory
// space), and two address arithmetic units working in the same cycle: the
// X unit with R0-R3/N0-N3/M0-M3 serves the X memory, the Y unit with
// R4-R7/N4-N7/M4-M7 serves the Y memory.  This organisation follows the
// document.
//
// Interface: the decoded X and Y moves give the register within the bank
// (rr) and the addressing mode; xaddr/yaddr are the effective addresses,
// valid combinationally in the same cycle, and the post-modified registers
// are written at the clock edge.  Any AGU register can be read onto or
// loaded from the global bus (general codes 8-15 R, 16-23 N, 24-31 M), so
// the registers can also hold generic data.  The data ALU's NORM step
// requests Rn+1 or Rn-1 through norm_*.  When a global-bus load and an
// address update hit the same register in one cycle, the load wins (this
// design's choice).  Reset values: R = N = 0, M = 0x3FF (linear), as on
// the DSP56001.
module dsp_agu
  import dsp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       exec,
  input  ctrl_t      ctrl,
  input  word_t      gdb_in,
  output word_t      g_rdata,
  output addr_t      xaddr,
  output addr_t      yaddr,
  input  logic       norm_en,
  input  logic [2:0] norm_rn,
  input  logic       norm_inc
);

  addr_t r [8];
  addr_t n [8];
  addr_t m [8];

  logic [2:0] xi, yi;
  addr_t      xr_next, yr_next;

  assign xi = {1'b0, ctrl.xmv.rr};
  assign yi = {1'b1, ctrl.ymv.rr};

  dsp_addr_unit u_xunit (
    .r(r[xi]), .n(n[xi]), .m(m[xi]), .mode(ctrl.xmv.mode),
    .ea(xaddr), .r_next(xr_next)
  );

  dsp_addr_unit u_yunit (
    .r(r[yi]), .n(n[yi]), .m(m[yi]), .mode(ctrl.ymv.mode),
    .ea(yaddr), .r_next(yr_next)
  );

  always_comb begin
    case (ctrl.g_src[4:3])
      2'b01:   g_rdata = {6'b0, r[ctrl.g_src[2:0]]};
      2'b10:   g_rdata = {6'b0, n[ctrl.g_src[2:0]]};
      2'b11:   g_rdata = {6'b0, m[ctrl.g_src[2:0]]};
      default: g_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) begin
        r[i] <= '0;
        n[i] <= '0;
        m[i] <= '1;
      end
    end else if (exec) begin
      if (ctrl.xmv.en) r[xi] <= xr_next;
      if (ctrl.ymv.en) r[yi] <= yr_next;
      if (norm_en)
        r[norm_rn] <= norm_inc ? r[norm_rn] + addr_t'(1) : r[norm_rn] - addr_t'(1);
      if (ctrl.gmv && is_agu_reg(ctrl.g_dst)) begin
        case (ctrl.g_dst[4:3])
          2'b01:   r[ctrl.g_dst[2:0]] <= gdb_in[ADW-1:0];
          2'b10:   n[ctrl.g_dst[2:0]] <= gdb_in[ADW-1:0];
          default: m[ctrl.g_dst[2:0]] <= gdb_in[ADW-1:0];
        endcase
      end
    end
  end

endmodule
