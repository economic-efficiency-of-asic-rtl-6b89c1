// tta_ic: the transport buses of the processor.
//
// Each of the NBUS move slots of the executing instruction reads one source socket (a
// register, the long immediate or a function unit's result register) and drives it onto its
// bus; every destination socket compares each bus's destination field with its own number
// and, on a match, receives that bus's word with a strobe. This is the whole programming
// model: operations happen as a side effect of the data moved to trigger sockets.
// If two buses write the same socket in one cycle the higher-numbered bus wins.
// Combinational: moves reach the function units in the cycle the instruction executes.
// The move-only programming model follows the paper; the bus count and socket numbering
// are this design's choices.
module tta_ic
  import fft_pkg::*;
#(
  parameter int NBUS = 4
) (
  input  logic          valid,         // the instruction is executing
  input  slot_t         slots [NBUS],
  input  logic [DW-1:0] imm,
  input  logic [DW-1:0] src_val [NSRC], // source socket values (S_IMM is overridden)
  output mv_t           dst   [NDST]
);
  logic [DW-1:0] bus [NBUS];

  always_comb begin
    for (int b = 0; b < NBUS; b++)
      bus[b] = (slots[b].src == S_IMM) ? imm : src_val[slots[b].src];
    for (int d = 0; d < NDST; d++) begin
      dst[d] = '0;
      for (int b = 0; b < NBUS; b++)
        if (valid && d != int'(D_NOP) && slots[b].dst == DST_W'(d)) begin
          dst[d].v = 1'b1;
          dst[d].d = bus[b];
        end
    end
  end
endmodule
