// tb_alu: self-checking test of the integer unit: every operation on random operands, the
// result read one cycle after the trigger and compared with the same operation written
// here; also reuse of a held operand and a same-cycle operand move.
module tb_alu;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0;
  mv_t opnd, trig;
  alu_op_e op;
  logic [31:0] y, a, b, e, a_held;
  logic clk_en;
  int checks = 0, failures = 0;

  alu dut (.clk, .rst_n, .test_en(1'b0), .opnd, .trig, .op, .y, .clk_en);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opnd = '0; trig = '0; op = ALU_ADD; a_held = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a = $urandom; b = $urandom;
      if (i % 5 == 0) b = b % 40;
      if (i % 7 == 0) b = a;
      op = alu_op_e'(i % 8);
      if (i % 4 == 3) a = a_held; else opnd = '{v: 1'b1, d: a};
      trig = '{v: 1'b1, d: b};
      case (i % 8)
        0: e = a + b;
        1: e = a - b;
        2: e = a & b;
        3: e = a | b;
        4: e = a ^ b;
        5: e = (b[4:0] == 0) ? a : a * (32'd1 << b[4:0]);
        6: e = a / (32'd1 << b[4:0]);
        default: e = ($unsigned(a) < $unsigned(b)) ? 32'd1 : 32'd0;
      endcase
      @(negedge clk);
      opnd = '0; trig = '0;
      a_held = a;
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("op %0d a=%h b=%h got %h exp %h", i % 8, a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
