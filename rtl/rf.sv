// rf: general register file of the transport core.
//
// NREG registers of DW bits. Every register is a source socket and a destination socket, so
// any bus can read or write any register; a write lands at the clock edge and is readable in
// the next cycle. If several buses write the same register in one cycle the highest-numbered
// bus wins (a program should not do that). Size and port structure are this design's own.
module rf
  import fft_pkg::*;
#(
  parameter int NREG = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mv_t           wr [NREG],
  output logic [DW-1:0] rd [NREG]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) rd[i] <= '0;
    end else begin
      for (int i = 0; i < NREG; i++)
        if (wr[i].v) rd[i] <= wr[i].d;
    end
  end
endmodule
