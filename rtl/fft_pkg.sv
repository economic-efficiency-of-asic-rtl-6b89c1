// fft_pkg: types and constants shared by the transport-triggered FFT processor.
//
// Data words are 32 bits. A complex sample packs a 16-bit real part (upper half) and a
// 16-bit imaginary part (lower half), both two's complement Q1.15 - the 16+16 split is the
// design's stated resolution. The move encoding below (source and destination socket
// numbers, opcode fields) is this design's own choice: the processor is programmed purely
// by data transports, and an operation starts as a side effect of a move to a trigger port.
package fft_pkg;

  localparam int DW = 32;              // bus and register width
  localparam int SRC_W = 5;            // source socket field
  localparam int DST_W = 6;            // destination socket field
  localparam int NSRC = 1 << SRC_W;
  localparam int NDST = 1 << DST_W;

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } cplx_t;

  // One transport arriving at a function-unit port: a strobe and the word moved.
  typedef struct packed {
    logic          v;
    logic [DW-1:0] d;
  } mv_t;

  // One move slot of an instruction: read socket src, write socket dst.
  typedef struct packed {
    logic [SRC_W-1:0] src;
    logic [DST_W-1:0] dst;
  } slot_t;

  // Source (output) sockets. Register file registers occupy 0..15.
  localparam logic [SRC_W-1:0] S_RF   = 5'd0;   // r0..r15 -> 0..15
  localparam logic [SRC_W-1:0] S_IMM  = 5'd16;  // the instruction's long immediate
  localparam logic [SRC_W-1:0] S_ALU  = 5'd17;
  localparam logic [SRC_W-1:0] S_CADD = 5'd18;
  localparam logic [SRC_W-1:0] S_CMUL = 5'd19;
  localparam logic [SRC_W-1:0] S_TFG  = 5'd20;
  localparam logic [SRC_W-1:0] S_LSU0 = 5'd21;
  localparam logic [SRC_W-1:0] S_LSU1 = 5'd22;

  // Destination (input) sockets. 0 is "no move".
  localparam logic [DST_W-1:0] D_NOP     = 6'd0;
  localparam logic [DST_W-1:0] D_CADD_O1 = 6'd1;   // D_CADD_O1 + i : operand O(i+1)
  localparam logic [DST_W-1:0] D_CADD_T  = 6'd5;   // trigger, data = cadd opcode
  localparam logic [DST_W-1:0] D_CMUL_O  = 6'd6;
  localparam logic [DST_W-1:0] D_CMUL_T  = 6'd7;
  localparam logic [DST_W-1:0] D_TFG_O   = 6'd8;   // log2 of the transform length
  localparam logic [DST_W-1:0] D_TFG_T   = 6'd9;   // twiddle index k
  localparam logic [DST_W-1:0] D_LSU0_O  = 6'd10;  // store data
  localparam logic [DST_W-1:0] D_LSU0_LD = 6'd11;  // trigger load,  data = address
  localparam logic [DST_W-1:0] D_LSU0_ST = 6'd12;  // trigger store, data = address
  localparam logic [DST_W-1:0] D_LSU1_O  = 6'd13;
  localparam logic [DST_W-1:0] D_LSU1_LD = 6'd14;
  localparam logic [DST_W-1:0] D_LSU1_ST = 6'd15;
  localparam logic [DST_W-1:0] D_RF      = 6'd16;  // r0..r15 -> 16..31
  localparam logic [DST_W-1:0] D_ALU_O   = 6'd32;
  localparam logic [DST_W-1:0] D_ALU_T   = 6'd40;  // 40..47 : trigger with alu_op_e
  localparam logic [DST_W-1:0] D_GCU_C   = 6'd48;  // branch condition operand
  localparam logic [DST_W-1:0] D_GCU_J   = 6'd49;  // jump, data = target
  localparam logic [DST_W-1:0] D_GCU_BNZ = 6'd50;  // jump if condition != 0
  localparam logic [DST_W-1:0] D_GCU_HLT = 6'd51;  // stop, raise done

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR  = 3'd3,
    ALU_XOR = 3'd4, ALU_SHL = 3'd5, ALU_SHR = 3'd6, ALU_LTU = 3'd7
  } alu_op_e;

  // Complex adder opcode, moved as data to its trigger port.
  //   [1:0] k      output index of the 4-point DFT, y_k = sum_m x_m (-j)^(m k)
  //   [2]   radix2 output the first-level sum O1 + (-j)^k O2 only (2-point butterfly)
  //   [3]   scale  divide the result by 4 (radix-4) or 2 (radix-2), rounding
  typedef struct packed {
    logic       scale;
    logic       radix2;
    logic [1:0] k;
  } cadd_op_t;

  // Twiddle table: one octant of a 16384-point transform, 2049 entries.
  localparam int TW_LOG2N = 14;

endpackage
