// lsu: load-store unit, the processor's port to one data memory bank.
//
// Operand port O holds the store data. A move to the load trigger reads the word at the
// moved address; a move to the store trigger writes the held (or same-cycle) store data
// there. The unit drives the bank's single port directly, so each bank serves at most one
// access per cycle. Timing: load data comes from the bank's output register and is readable
// the cycle after the load trigger; it holds until the next load. If both triggers arrive
// in one cycle the store is performed. The address is the low AW bits of the moved word.
// One unit per single-port bank follows from the paper's two memories; the rest is this
// design's own.
module lsu
  import fft_pkg::*;
#(
  parameter int AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_en,
  input  mv_t           opnd,
  input  mv_t           ld,
  input  mv_t           st,
  // memory side
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [DW-1:0] mem_wdata,
  input  logic [DW-1:0] mem_rdata,
  output logic [DW-1:0] y,
  output logic          clk_en
);
  logic [DW-1:0] sd_q;
  logic          gclk;

  assign clk_en = opnd.v;
  clk_gate u_cg (.clk(clk), .en(clk_en), .test_en(test_en), .gclk(gclk));

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n)      sd_q <= '0;
    else if (opnd.v) sd_q <= opnd.d;
  end

  assign mem_en    = ld.v | st.v;
  assign mem_we    = st.v;
  assign mem_addr  = st.v ? st.d[AW-1:0] : ld.d[AW-1:0];
  assign mem_wdata = opnd.v ? opnd.d : sd_q;
  assign y         = mem_rdata;
endmodule
