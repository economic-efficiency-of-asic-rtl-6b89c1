// alu: integer function unit for address and loop arithmetic.
//
// Operand port O holds a; a move to one of the eight trigger sockets supplies b and picks
// the operation (alu_op_e): add, subtract, and, or, xor, shift left, logical shift right
// (by b[4:0]) and unsigned less-than (result 1 or 0). The paper only says the processor
// is programmable; this unit and its operation set are this design's choice of the minimum
// a loop-based FFT program needs. Timing: result readable the cycle after the trigger,
// held until the next trigger; a same-cycle operand move is used. Clock-gated when idle.
module alu
  import fft_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_en,
  input  mv_t           opnd,
  input  mv_t           trig,
  input  alu_op_e       op,
  output logic [DW-1:0] y,
  output logic          clk_en
);
  logic [DW-1:0] a_q, a, b, yn;
  logic          gclk;

  assign clk_en = opnd.v | trig.v;
  clk_gate u_cg (.clk(clk), .en(clk_en), .test_en(test_en), .gclk(gclk));

  assign a = opnd.v ? opnd.d : a_q;
  assign b = trig.d;

  always_comb begin
    unique case (op)
      ALU_ADD: yn = a + b;
      ALU_SUB: yn = a - b;
      ALU_AND: yn = a & b;
      ALU_OR:  yn = a | b;
      ALU_XOR: yn = a ^ b;
      ALU_SHL: yn = a << b[4:0];
      ALU_SHR: yn = a >> b[4:0];
      default: yn = DW'(a < b);
    endcase
  end

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      y   <= '0;
    end else begin
      if (opnd.v) a_q <= opnd.d;
      if (trig.v) y   <= yn;
    end
  end
endmodule
