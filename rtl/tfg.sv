// tfg: twiddle-factor (rotation coefficient) generator function unit.
//
// Produces W = exp(-j*2*pi*k/N) in Q1.15 for any power-of-two length N = 2^L up to
// 2^LOG2N_MAX (16384). The index is first scaled to the 16384-point circle, k' = k << (14-L).
// Only one octant of the circle is tabulated: TBL = 2^LOG2N_MAX/8 + 1 = 2049 complex entries
// (cos and sin of 2*pi*i/2^LOG2N_MAX for i = 0..2048), built as combinational logic rather
// than a memory. The other seven octants follow by swapping and negating the table's cosine
// and sine. The table values are round(32767*cos), round(32767*sin), computed when the
// design is elaborated.
// Ports: operand O = L (log2 of the transform length, 1..LOG2N_MAX, bits [3:0]), trigger
// T = index k. Timing: two pipeline stages - stage 1 registers the octant and the table
// address, stage 2 registers the looked-up, symmetry-corrected factor - so the result is
// readable two cycles after the trigger. The octant reduction and table scaling are this
// design's own; the table size, the logic-based table and the two stages follow the
// paper. The unit's clock runs only while a move arrives or the pipe holds work.
module tfg
  import fft_pkg::*;
#(
  parameter int LOG2N_MAX = TW_LOG2N
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  test_en,
  input  mv_t   opnd,
  input  mv_t   trig,
  output cplx_t w,
  output logic  clk_en
);
  localparam int TBL = (1 << LOG2N_MAX) / 8 + 1;
  localparam int AW  = LOG2N_MAX - 2;       // table address width (0..TBL-1)

  typedef logic [31:0] tbl_t [TBL];

  // Entry i: {round(32767*cos(a)), round(32767*sin(a))}, a = 2*pi*i/2^LOG2N_MAX <= pi/4.
  // Computed with Taylor series, which converge to far below one LSB on [0, pi/4].
  function automatic tbl_t gen_table();
    tbl_t t;
    real  a, c, s, term_c, term_s;
    for (int i = 0; i < TBL; i++) begin
      a = 2.0 * 3.14159265358979323846 * real'(i) / real'(1 << LOG2N_MAX);
      c = 1.0; s = a; term_c = 1.0; term_s = a;
      for (int n = 1; n < 12; n++) begin
        term_c = -term_c * a * a / real'((2 * n - 1) * (2 * n));
        term_s = -term_s * a * a / real'((2 * n) * (2 * n + 1));
        c += term_c;
        s += term_s;
      end
      t[i] = {16'($rtoi(c * 32767.0 + 0.5)), 16'($rtoi(s * 32767.0 + 0.5))};
    end
    return t;
  endfunction

  localparam tbl_t TABLE = gen_table();

  logic [3:0]           l_q, l;
  logic [LOG2N_MAX-1:0] kk;
  logic [2:0]           oct_n, oct1;
  logic [AW-1:0]        addr_n, addr1;
  logic                 v1, gclk;

  assign clk_en = opnd.v | trig.v | v1;
  clk_gate u_cg (.clk(clk), .en(clk_en), .test_en(test_en), .gclk(gclk));

  assign l = opnd.v ? opnd.d[3:0] : l_q;

  // Stage 1 input: scale the index to the full circle and fold it into one octant.
  always_comb begin
    kk     = LOG2N_MAX'(trig.d) << (LOG2N_MAX - int'(l));
    oct_n  = kk[LOG2N_MAX-1 -: 3];
    addr_n = AW'(kk[LOG2N_MAX-4:0]);
    if (oct_n[0]) addr_n = AW'(TBL - 1) - addr_n;
  end

  // Stage 2 input: table lookup and octant symmetry.
  logic signed [15:0] c, s, cs, sn;
  always_comb begin
    c = TABLE[addr1][31:16];
    s = TABLE[addr1][15:0];
    unique case (oct1)
      3'd0: begin cs =  c; sn =  s; end
      3'd1: begin cs =  s; sn =  c; end
      3'd2: begin cs = -s; sn =  c; end
      3'd3: begin cs = -c; sn =  s; end
      3'd4: begin cs = -c; sn = -s; end
      3'd5: begin cs = -s; sn = -c; end
      3'd6: begin cs =  s; sn = -c; end
      default: begin cs = c; sn = -s; end
    endcase
  end

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      l_q   <= 4'(LOG2N_MAX);
      v1    <= 1'b0;
      oct1  <= '0;
      addr1 <= '0;
      w     <= '0;
    end else begin
      if (opnd.v) l_q <= opnd.d[3:0];
      v1 <= trig.v;
      if (trig.v) begin
        oct1  <= oct_n;
        addr1 <= addr_n;
      end
      if (v1) w <= cplx_t'{re: cs, im: -sn};
    end
  end
endmodule
