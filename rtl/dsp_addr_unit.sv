// dsp_addr_unit: one address arithmetic unit of the AGU (combinational).
//
// Given an address register R, its offset register N and modifier register
// M, it returns the effective address (always R: all modes post-modify) and
// the updated R for the modes (R), (R)+, (R)-, (R)+N and (R)-N.  Linear
// arithmetic wraps at 1024 words; modulo arithmetic keeps R inside a
// circular buffer.  The document names linear and modulo arithmetic; the
// modifier encoding is this design's choice, taken from the DSP56001:
// M = 0x3FF selects linear arithmetic, any other M selects modulo M+1.  The
// buffer starts at R with its low k bits cleared, where 2^k is the smallest
// power of two not below M+1, and an offset must not exceed M+1 in size.
module dsp_addr_unit
  import dsp_pkg::*;
(
  input  addr_t  r,
  input  addr_t  n,
  input  addr_t  m,
  input  amode_e mode,
  output addr_t  ea,
  output addr_t  r_next
);

  logic signed [11:0] delta, off, nxt, modulus;
  addr_t mask, base;

  always_comb begin
    case (mode)
      AM_INC:  delta = 12'sd1;
      AM_DEC:  delta = -12'sd1;
      AM_PN:   delta = {{2{n[9]}}, n};
      AM_MN:   delta = -{{2{n[9]}}, n};
      default: delta = 12'sd0;
    endcase

    // smallest all-ones mask covering M
    mask = m;
    for (int i = 1; i < ADW; i++) mask = mask | (mask >> i);
    base    = r & ~mask;
    modulus = {2'b00, m} + 12'sd1;
    off     = {2'b00, r & mask};
    nxt     = off + delta;
    if (nxt >= modulus)  nxt = nxt - modulus;
    else if (nxt < 0)    nxt = nxt + modulus;

    ea = r;
    if (m == '1) r_next = r + delta[ADW-1:0];
    else         r_next = base | nxt[ADW-1:0];
  end

endmodule
