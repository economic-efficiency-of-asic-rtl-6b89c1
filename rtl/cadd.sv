// cadd: complex adder function unit, the radix-4 / radix-2 butterfly of the processor.
//
// Four operand ports O1..O4 hold complex samples; the trigger port T takes the opcode as
// data (cadd_op_t). A move to T starts the operation on the operands already held, so the
// four outputs of one 4-point DFT come from four trigger moves without re-sending operands.
// Structure (after the block diagram in the paper): O2 and O4 each pass a rotator, which
// either passes the sample or swaps its real and imaginary parts; two first-level adders
// form s1 = O1 +/- rot(O2) and s2 = O3 +/- rot(O4) with add/subtract chosen per component;
// a second-level adder forms s1 +/- s2; an output multiplexer picks s1 (2-point butterfly)
// or the second-level sum (4-point butterfly). Together this gives
//   y_k = (O1 + (-j)^k O2) + (-1)^k (O3 + (-j)^k O4),  k = 0..3.
// The swap-and-sign reading of the rotator, the opcode layout, the optional scaling and
// the saturation are this design's choices.
// Timing: operand moves in the same cycle as the trigger are used by that operation; the
// result register is readable from the cycle after the trigger (latency 1) and holds until
// the next trigger. The unit's clock runs only in cycles with a move to one of its ports.
module cadd
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  test_en,
  input  mv_t   op_in [4],   // O1..O4
  input  mv_t   trig,        // T, data = cadd_op_t in bits [3:0]
  output cplx_t y,
  output logic  clk_en       // this cycle's clock enable (for activity monitoring)
);
  cplx_t    opr_q [4];
  cplx_t    opr   [4];
  cadd_op_t op;
  logic     gclk;

  always_comb begin
    clk_en = trig.v;
    for (int i = 0; i < 4; i++) begin
      clk_en |= op_in[i].v;
      opr[i] = op_in[i].v ? cplx_t'(op_in[i].d) : opr_q[i];
    end
  end

  clk_gate u_cg (.clk(clk), .en(clk_en), .test_en(test_en), .gclk(gclk));

  assign op = cadd_op_t'(trig.d[3:0]);

  // Rotator: swap real and imaginary parts for odd k.
  function automatic cplx_t rot(input cplx_t x, input logic swap);
    return swap ? cplx_t'{re: x.im, im: x.re} : x;
  endfunction

  logic signed [18:0] s1_re, s1_im, s2_re, s2_im, t_re, t_im, r_re, r_im;
  logic               sub_re, sub_im;
  cplx_t              r2, r4, yn;

  // Signs of (-j)^k applied after the swap: re subtracts for k=2,3, im for k=1,2.
  assign sub_re = op.k[1];
  assign sub_im = op.k[1] ^ op.k[0];
  assign r2 = rot(opr[1], op.k[0]);
  assign r4 = rot(opr[3], op.k[0]);

  function automatic logic signed [15:0] sat16(input logic signed [18:0] v);
    if (v > 19'sd32767)       return 16'sh7fff;
    else if (v < -19'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  always_comb begin
    s1_re = sub_re ? 19'(opr[0].re) - 19'(r2.re) : 19'(opr[0].re) + 19'(r2.re);
    s1_im = sub_im ? 19'(opr[0].im) - 19'(r2.im) : 19'(opr[0].im) + 19'(r2.im);
    s2_re = sub_re ? 19'(opr[2].re) - 19'(r4.re) : 19'(opr[2].re) + 19'(r4.re);
    s2_im = sub_im ? 19'(opr[2].im) - 19'(r4.im) : 19'(opr[2].im) + 19'(r4.im);
    // Second-level adder: subtract for odd k.
    t_re  = op.k[0] ? s1_re - s2_re : s1_re + s2_re;
    t_im  = op.k[0] ? s1_im - s2_im : s1_im + s2_im;
    // Output multiplexer M and scaling with round-half-up.
    if (op.radix2) begin
      r_re = op.scale ? (s1_re + 19'sd1) >>> 1 : s1_re;
      r_im = op.scale ? (s1_im + 19'sd1) >>> 1 : s1_im;
    end else begin
      r_re = op.scale ? (t_re + 19'sd2) >>> 2 : t_re;
      r_im = op.scale ? (t_im + 19'sd2) >>> 2 : t_im;
    end
    yn.re = sat16(r_re);
    yn.im = sat16(r_im);
  end

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) opr_q[i] <= '0;
      y <= '0;
    end else begin
      for (int i = 0; i < 4; i++)
        if (op_in[i].v) opr_q[i] <= cplx_t'(op_in[i].d);
      if (trig.v) y <= yn;
    end
  end
endmodule
