// sram_sp: single-port data memory bank.
//
// DEPTH words of DW bits with one port: in a cycle with en set it either writes wdata to
// addr (we = 1) or reads addr (we = 0). Reads are synchronous: the word appears on rdata
// after the clock edge and stays there until the next read. The processor has two of these
// banks side by side rather than one dual-port memory, as the paper specifies; the depth
// and the synchronous-read behaviour are this design's choices. Written as an array; a
// memory compiler macro would replace it in silicon.
module sram_sp #(
  parameter int DEPTH = 16384,
  parameter int DW    = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
