// tb_cadd: self-checking test of the complex adder.
//
// Loads four random operands, then fires all opcodes (k = 0..3, radix-4 and radix-2, with
// and without scaling) by trigger moves alone, and compares each result, one cycle after
// its trigger, with a 4-point DFT term computed here from the definition
// y_k = sum_m x_m (-j)^(m k) (first two terms only for radix-2), then rounded and saturated.
// Also checks that operand moves in the trigger's own cycle are used, and that the unit's
// clock enable is low in idle cycles.
module tb_cadd;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0;
  mv_t  op_in [4];
  mv_t  trig;
  cplx_t y;
  logic clk_en;
  int checks = 0, failures = 0;

  cadd dut (.clk, .rst_n, .test_en(1'b0), .op_in, .trig, .y, .clk_en);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic cplx_t model(input cplx_t x [4], input logic [3:0] opc);
    longint re = 0, im = 0, r, i;
    int n, terms;
    cplx_t res;
    terms = opc[2] ? 2 : 4;
    for (int m = 0; m < terms; m++) begin
      n = (m * int'(opc[1:0])) % 4;
      case (n)
        0: begin re += x[m].re; im += x[m].im; end
        1: begin re += x[m].im; im -= x[m].re; end   // * -j
        2: begin re -= x[m].re; im -= x[m].im; end
        default: begin re -= x[m].im; im += x[m].re; end  // * j
      endcase
    end
    if (opc[3]) begin
      r = opc[2] ? (re + 1) >>> 1 : (re + 2) >>> 2;
      i = opc[2] ? (im + 1) >>> 1 : (im + 2) >>> 2;
    end else begin
      r = re; i = im;
    end
    res.re = (r > 32767) ? 16'sh7fff : (r < -32768) ? 16'sh8000 : 16'(r);
    res.im = (i > 32767) ? 16'sh7fff : (i < -32768) ? 16'sh8000 : 16'(i);
    return res;
  endfunction

  task automatic idle();
    for (int i = 0; i < 4; i++) op_in[i] = '0;
    trig = '0;
  endtask

  cplx_t x [4];
  cplx_t exp_y;

  initial begin
    idle();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int iter = 0; iter < 300; iter++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        // mostly small values, sometimes full scale to exercise saturation
        x[i] = (iter % 4 == 0) ? cplx_t'($urandom) : cplx_t'{re: 16'($signed($urandom_range(0, 16383)) - 8192),
                                                            im: 16'($signed($urandom_range(0, 16383)) - 8192)};
        op_in[i] = '{v: 1'b1, d: x[i]};
      end
      @(negedge clk);
      idle();
      // idle cycle: the unit must not be clocked
      #1 checks++;
      if (clk_en !== 1'b0) begin failures++; $display("clock enabled while idle"); end
      for (int o = 0; o < 16; o++) begin
        @(negedge clk);
        trig = '{v: 1'b1, d: 32'(o)};
        exp_y = model(x, 4'(o));
        @(negedge clk);
        trig = '0;
        checks++;
        if (y !== exp_y) begin
          failures++;
          if (failures < 10) $display("op %0d: got %h exp %h", o, y, exp_y);
        end
      end
    end
    // Operand moved in the same cycle as the trigger is used.
    @(negedge clk);
    x[0] = cplx_t'{re: 16'sd100, im: -16'sd50};
    op_in[0] = '{v: 1'b1, d: x[0]};
    trig = '{v: 1'b1, d: 32'h0};
    exp_y = model(x, 4'h0);
    @(negedge clk);
    idle();
    checks++;
    if (y !== exp_y) begin failures++; $display("bypass: got %h exp %h", y, exp_y); end
    // Result holds until the next trigger.
    repeat (3) @(negedge clk);
    checks++;
    if (y !== exp_y) begin failures++; $display("result not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
