// tb_cmul: self-checking test of the complex multiplier.
//
// Random Q1.15 operands (including full-scale values that saturate, -1 * -1) are
// multiplied; the result, read one cycle after the trigger, is compared with the product
// computed here in 64-bit integers, rounded half-up by 2^15 and saturated. Also checks that
// a held operand is reused by later triggers.
module tb_cmul;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0;
  mv_t opnd, trig;
  cplx_t y, a, b, e;
  logic clk_en;
  int checks = 0, failures = 0;

  cmul dut (.clk, .rst_n, .test_en(1'b0), .opnd, .trig, .y, .clk_en);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [15:0] rs(input longint v);
    longint r = (v + 16384) >>> 15;
    return (r > 32767) ? 16'sh7fff : (r < -32768) ? 16'sh8000 : 16'(r);
  endfunction

  function automatic cplx_t model(input cplx_t p, input cplx_t q);
    longint pr = p.re, pi = p.im, qr = q.re, qi = q.im;
    return cplx_t'{re: rs(pr * qr - pi * qi), im: rs(pr * qi + pi * qr)};
  endfunction

  initial begin
    opnd = '0; trig = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a = (i == 0) ? cplx_t'{re: -16'sd32768, im: -16'sd32768} : cplx_t'($urandom);
      b = (i == 0) ? cplx_t'{re: -16'sd32768, im: 16'sd0} : cplx_t'($urandom);
      if (i % 3 != 2) opnd = '{v: 1'b1, d: a};   // every third: reuse the held operand
      else a = e;                                // e keeps the last operand value
      trig = '{v: 1'b1, d: b};
      @(negedge clk);
      opnd = '0; trig = '0;
      checks++;
      if (y !== model(a, b)) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h got %h exp %h", a, b, y, model(a, b));
      end
      e = a;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
