// cmul: complex multiplier function unit (used to apply twiddle factors).
//
// Operand port O holds one complex Q1.15 sample; a move to the trigger port T supplies the
// second factor and starts the multiplication. The product
//   re = a.re*b.re - a.im*b.im,  im = a.re*b.im + a.im*b.re
// is formed exactly (33 bits), rounded half-up to Q1.15 and saturated to 16 bits.
// Timing: one cycle; the result register is readable from the cycle after the trigger and
// holds until the next trigger. A same-cycle operand move is used by that trigger. The
// unit's clock runs only in cycles with a move to one of its ports. The paper names the
// unit; its arithmetic format and latency are this design's choices.
module cmul
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  test_en,
  input  mv_t   opnd,
  input  mv_t   trig,
  output cplx_t y,
  output logic  clk_en
);
  cplx_t a_q, a, b, yn;
  logic  gclk;
  logic signed [32:0] p_re, p_im;
  logic signed [33:0] q_re, q_im;

  assign clk_en = opnd.v | trig.v;
  clk_gate u_cg (.clk(clk), .en(clk_en), .test_en(test_en), .gclk(gclk));

  assign a = opnd.v ? cplx_t'(opnd.d) : a_q;
  assign b = cplx_t'(trig.d);

  function automatic logic signed [15:0] sat16(input logic signed [33:0] v);
    if (v > 34'sd32767)       return 16'sh7fff;
    else if (v < -34'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  always_comb begin
    p_re = 33'(a.re * b.re) - 33'(a.im * b.im);
    p_im = 33'(a.re * b.im) + 33'(a.im * b.re);
    q_re = (34'(p_re) + 34'sd16384) >>> 15;
    q_im = (34'(p_im) + 34'sd16384) >>> 15;
    yn.re = sat16(q_re);
    yn.im = sat16(q_im);
  end

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      y   <= '0;
    end else begin
      if (opnd.v) a_q <= cplx_t'(opnd.d);
      if (trig.v) y   <= yn;
    end
  end
endmodule
