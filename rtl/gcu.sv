// gcu: global control unit - program counter, instruction fetch, jumps and halt.
//
// A start pulse fetches address 0 and sets busy; from the next cycle one instruction is
// executed per cycle. The fetch address for the next instruction is formed in the same
// cycle from the executing instruction: the jump target if it moves to the jump socket, or
// to the branch socket while the condition operand is non-zero, otherwise pc+1. Jumps
// therefore cost no extra cycle. A move to the halt socket ends the run: busy drops and done
// rises (and stays until the next start). `cycles` counts executed instructions of the last
// run. Ports: moves to the condition operand (C), jump (J), branch-if-non-zero (BNZ) and
// halt (HLT) sockets. The branch scheme is this design's own.
module gcu
  import fft_pkg::*;
#(
  parameter int AW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  mv_t           cond,
  input  mv_t           jump,
  input  mv_t           bnz,
  input  mv_t           halt,
  output logic          fetch_en,
  output logic [AW-1:0] fetch_addr,
  output logic          exec,        // the instruction word holds a valid instruction
  output logic [AW-1:0] pc,
  output logic          busy,
  output logic          done,
  output logic [31:0]   cycles,
  output logic          taken        // a jump or branch is taken this cycle
);
  logic [DW-1:0] cond_q, c;

  assign c     = cond.v ? cond.d : cond_q;
  assign exec  = busy;
  assign taken = exec & (jump.v | (bnz.v & (c != '0)));

  always_comb begin
    fetch_en   = 1'b0;
    fetch_addr = '0;
    if (!busy) begin
      fetch_en = start;
    end else if (!halt.v) begin
      fetch_en   = 1'b1;
      fetch_addr = taken ? (jump.v ? jump.d[AW-1:0] : bnz.d[AW-1:0]) : pc + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      pc     <= '0;
      cond_q <= '0;
      cycles <= '0;
    end else begin
      if (exec && cond.v) cond_q <= cond.d;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          done   <= 1'b0;
          pc     <= '0;
          cycles <= '0;
        end
      end else begin
        cycles <= cycles + 1;
        if (halt.v) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          pc <= fetch_addr;
        end
      end
    end
  end

  // A program must not jump and halt in the same instruction.
  a_no_jump_halt: assert property (@(posedge clk) disable iff (!rst_n)
                                   exec && halt.v |-> !(jump.v || bnz.v));
endmodule
