// imem: instruction memory.
//
// DEPTH instruction words of IW bits. The write port loads the program before a run; the
// read port is synchronous, so the instruction for the address presented in one cycle is
// executed in the next. Depth and loading scheme are this design's choices; the program
// format is described in fft_tta.
module imem #(
  parameter int DEPTH = 512,
  parameter int IW    = 76,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] rdata
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
