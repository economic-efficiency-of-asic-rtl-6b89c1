// tb_tfg: self-checking test of the twiddle-factor generator.
//
// For every transform length 2^L, L = 1..14, it requests random indices (and all indices for
// L = 6), one per cycle back to back, and compares each output - two cycles after its
// trigger - with round(32767 cos(2 pi k / N)) and -round(32767 sin(2 pi k / N)) computed
// here with the simulator's own $cos/$sin (tolerance one LSB). It also checks the length
// operand can arrive in the same cycle as the trigger, and that the result is not yet there
// one cycle after the trigger.
module tb_tfg;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0;
  mv_t opnd, trig;
  cplx_t w;
  logic clk_en;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  tfg dut (.clk, .rst_n, .test_en(1'b0), .opnd, .trig, .w, .clk_en);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t model(input int l, input int k);
    real a = 2.0 * PI * real'(k) / real'(1 << l);
    return cplx_t'{re: 16'($rtoi($floor($cos(a) * 32767.0 + 0.5))),
                   im: 16'(-$rtoi($floor($sin(a) * 32767.0 + 0.5)))};
  endfunction

  function automatic bit close(input cplx_t p, input cplx_t q);
    int dr = int'(p.re) - int'(q.re), di = int'(p.im) - int'(q.im);
    return dr >= -1 && dr <= 1 && di >= -1 && di <= 1;
  endfunction

  cplx_t exp_q [$];
  int    cnt;

  // Scoreboard: the pipe output for a trigger is checked two cycles later.
  logic v_d1, v_d2;
  always @(negedge clk) begin
    if (v_d2) begin
      cplx_t e;
      e = exp_q.pop_front();
      checks++;
      if (!close(w, e)) begin
        failures++;
        if (failures < 10) $display("got %h exp %h", w, e);
      end
    end
  end
  always @(posedge clk) begin
    v_d2 <= v_d1;
    v_d1 <= trig.v;
  end

  initial begin
    opnd = '0; trig = '0; v_d1 = 0; v_d2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 1; l <= 14; l++) begin
      cnt = (l == 6) ? 64 : 200;
      for (int i = 0; i < cnt; i++) begin
        int k;
        k = (l == 6) ? i : int'($urandom_range(0, (1 << l) - 1));
        @(negedge clk);
        opnd = (i == 0) ? '{v: 1'b1, d: 32'(l)} : '0;
        trig = '{v: 1'b1, d: 32'(k)};
        exp_q.push_back(model(l, k));
      end
      @(negedge clk);
      opnd = '0; trig = '0;
      repeat (3) @(negedge clk);
    end
    // Latency: after one cycle the output still shows the previous factor.
    @(negedge clk);
    opnd = '{v: 1'b1, d: 32'd2};
    trig = '{v: 1'b1, d: 32'd1};   // W_4^1 = -j
    exp_q.push_back(cplx_t'{re: 16'sd0, im: -16'sd32767});
    @(negedge clk);
    opnd = '0; trig = '0;
    checks++;
    if (w === cplx_t'{re: 16'sd0, im: -16'sd32767}) begin
      failures++; $display("result arrived after one cycle");
    end
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
