// tb_tta_ic: self-checking test of the transport interconnect. Random instructions (random
// source and destination per slot, random immediate, random source values) are applied and
// every destination's strobe and word is compared with a model built here by walking the
// slots; with valid low no destination may see a move.
module tb_tta_ic;
  import fft_pkg::*;
  localparam int NBUS = 4;
  logic valid;
  slot_t slots [NBUS];
  logic [31:0] imm;
  logic [31:0] src_val [NSRC];
  mv_t dst [NDST];
  int checks = 0, failures = 0;

  tta_ic #(.NBUS(NBUS)) dut (.valid, .slots, .imm, .src_val, .dst);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mv_t e [NDST];
  initial begin
    for (int it = 0; it < 3000; it++) begin
      valid = (it % 10 != 9);
      imm = $urandom;
      for (int s = 0; s < NSRC; s++) src_val[s] = $urandom;
      for (int b = 0; b < NBUS; b++) begin
        slots[b].src = SRC_W'($urandom);
        slots[b].dst = (it % 3 == 0) ? DST_W'($urandom_range(0, 3)) : DST_W'($urandom);
      end
      for (int d = 0; d < NDST; d++) e[d] = '0;
      if (valid)
        for (int b = 0; b < NBUS; b++)
          if (slots[b].dst != D_NOP) begin
            e[slots[b].dst].v = 1'b1;
            e[slots[b].dst].d = (slots[b].src == S_IMM) ? imm : src_val[slots[b].src];
          end
      #1;
      for (int d = 0; d < NDST; d++) begin
        checks++;
        if (dst[d] !== e[d]) begin
          failures++;
          if (failures < 10) $display("dst %0d got %h exp %h", d, dst[d], e[d]);
        end
      end
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
