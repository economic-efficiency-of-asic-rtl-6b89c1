// fft_tta: transport-triggered processor specialised for radix-4 / mixed radix-4/2 FFTs.
//
// The core moves data; it does not decode operations. Each instruction holds NBUS move
// slots {src, dst} and one 32-bit long immediate (layout: imm in the top 32 bits, slot b in
// bits [11*b +: 11]). In every cycle all slots read their source sockets and write their
// destination sockets over the buses of tta_ic; a move into a unit's trigger socket starts
// that unit. The function units are
//   cadd  complex adder (4-point and 2-point butterflies, opcode moved as data), latency 1
//   cmul  complex multiplier, latency 1
//   tfg   twiddle-factor generator for lengths 2..16384, two pipeline stages, latency 2
//   alu   integer unit for addresses and loop counters, latency 1
//   lsu0/lsu1  load-store units, each wired to its own single-port data bank, latency 1
//   rf    16 general registers
//   gcu   program counter, jumps, branch-if-non-zero, halt
// Each function unit has its own clock gate, so a unit that receives no move in a cycle
// gets no clock edge; fu_clk_en shows which units were clocked (cadd, cmul, tfg, alu,
// lsu0, lsu1 in bits 0..5).
//
// Host side: the program is written through prog_*; data banks are reached through host_*
// while the core is idle (host_rdata follows one cycle after a read). A start pulse runs the
// program from address 0 until it moves to the halt socket; done then rises, and cycles
// holds the number of instructions executed. The units, the 16+16-bit complex format, the
// 2049-entry two-stage twiddle table, the two single-port data memories and the clock
// gating follow the paper; the instruction format, bus count, register count, memory
// depths, host port and the integer unit are this design's choices.
module fft_tta
  import fft_pkg::*;
#(
  parameter int NBUS       = 4,
  parameter int NREG       = 16,
  parameter int IMEM_DEPTH = 512,
  parameter int DMEM_DEPTH = 16384,   // words per bank
  parameter int LOG2N_MAX  = 14,
  localparam int IW  = DW + NBUS * (SRC_W + DST_W),
  localparam int IAW = $clog2(IMEM_DEPTH),
  localparam int DAW = $clog2(DMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           test_en,
  // program load
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [IW-1:0]  prog_data,
  // host access to the data banks (only while idle)
  input  logic           host_en,
  input  logic           host_we,
  input  logic           host_bank,
  input  logic [DAW-1:0] host_addr,
  input  logic [DW-1:0]  host_wdata,
  output logic [DW-1:0]  host_rdata,
  // run control
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [31:0]    cycles,
  output logic [5:0]     fu_clk_en
);
  // ---------------- fetch and control ----------------
  logic           fetch_en, exec, taken;
  logic [IAW-1:0] fetch_addr, pc;
  logic [IW-1:0]  ir;
  mv_t            dst [NDST];
  logic [DW-1:0]  src_val [NSRC];
  slot_t          slots [NBUS];

  imem #(.DEPTH(IMEM_DEPTH), .IW(IW)) u_imem (
    .clk, .we(prog_we && !busy), .waddr(prog_addr), .wdata(prog_data),
    .re(fetch_en), .raddr(fetch_addr), .rdata(ir)
  );

  gcu #(.AW(IAW)) u_gcu (
    .clk, .rst_n, .start(start && !busy),
    .cond(dst[D_GCU_C]), .jump(dst[D_GCU_J]), .bnz(dst[D_GCU_BNZ]), .halt(dst[D_GCU_HLT]),
    .fetch_en, .fetch_addr, .exec, .pc, .busy, .done, .cycles, .taken
  );

  always_comb
    for (int b = 0; b < NBUS; b++) slots[b] = slot_t'(ir[b*(SRC_W+DST_W) +: SRC_W+DST_W]);

  tta_ic #(.NBUS(NBUS)) u_ic (
    .valid(exec), .slots, .imm(ir[IW-1 -: DW]), .src_val, .dst
  );

  // ---------------- register file ----------------
  mv_t           rf_wr [NREG];
  logic [DW-1:0] rf_rd [NREG];
  always_comb
    for (int i = 0; i < NREG; i++) rf_wr[i] = dst[int'(D_RF) + i];
  rf #(.NREG(NREG)) u_rf (.clk, .rst_n, .wr(rf_wr), .rd(rf_rd));

  // ---------------- function units ----------------
  cplx_t         cadd_y, cmul_y, tfg_w;
  logic [DW-1:0] alu_y, lsu0_y, lsu1_y;
  mv_t           cadd_o [4];
  mv_t           alu_t;
  alu_op_e       alu_op;

  always_comb begin
    for (int i = 0; i < 4; i++) cadd_o[i] = dst[int'(D_CADD_O1) + i];
    alu_t  = '0;
    alu_op = ALU_ADD;
    for (int i = 0; i < 8; i++)
      if (dst[int'(D_ALU_T) + i].v) begin
        alu_t  = dst[int'(D_ALU_T) + i];
        alu_op = alu_op_e'(i);
      end
  end

  cadd u_cadd (.clk, .rst_n, .test_en, .op_in(cadd_o), .trig(dst[D_CADD_T]),
               .y(cadd_y), .clk_en(fu_clk_en[0]));
  cmul u_cmul (.clk, .rst_n, .test_en, .opnd(dst[D_CMUL_O]), .trig(dst[D_CMUL_T]),
               .y(cmul_y), .clk_en(fu_clk_en[1]));
  tfg #(.LOG2N_MAX(LOG2N_MAX)) u_tfg (.clk, .rst_n, .test_en, .opnd(dst[D_TFG_O]),
               .trig(dst[D_TFG_T]), .w(tfg_w), .clk_en(fu_clk_en[2]));
  alu u_alu (.clk, .rst_n, .test_en, .opnd(dst[D_ALU_O]), .trig(alu_t), .op(alu_op),
             .y(alu_y), .clk_en(fu_clk_en[3]));

  // ---------------- data memory: two single-port banks ----------------
  logic           m_en [2], m_we [2], b_en [2], b_we [2];
  logic [DAW-1:0] m_addr [2], b_addr [2];
  logic [DW-1:0]  m_wdata [2], b_wdata [2], b_rdata [2];
  logic [DW-1:0]  lsu_y [2];
  logic           host_bank_q;

  for (genvar g = 0; g < 2; g++) begin : g_bank
    localparam logic [DST_W-1:0] D_O  = g ? D_LSU1_O  : D_LSU0_O;
    localparam logic [DST_W-1:0] D_LD = g ? D_LSU1_LD : D_LSU0_LD;
    localparam logic [DST_W-1:0] D_ST = g ? D_LSU1_ST : D_LSU0_ST;

    lsu #(.AW(DAW)) u_lsu (
      .clk, .rst_n, .test_en, .opnd(dst[D_O]), .ld(dst[D_LD]), .st(dst[D_ST]),
      .mem_en(m_en[g]), .mem_we(m_we[g]), .mem_addr(m_addr[g]), .mem_wdata(m_wdata[g]),
      .mem_rdata(b_rdata[g]), .y(lsu_y[g]), .clk_en(fu_clk_en[4+g])
    );

    // The host owns the banks while the core is idle.
    always_comb begin
      if (busy) begin
        b_en[g] = m_en[g]; b_we[g] = m_we[g]; b_addr[g] = m_addr[g]; b_wdata[g] = m_wdata[g];
      end else begin
        b_en[g]    = host_en && (host_bank == 1'(g));
        b_we[g]    = host_we;
        b_addr[g]  = host_addr;
        b_wdata[g] = host_wdata;
      end
    end

    sram_sp #(.DEPTH(DMEM_DEPTH), .DW(DW)) u_bank (
      .clk, .en(b_en[g]), .we(b_we[g]), .addr(b_addr[g]), .wdata(b_wdata[g]),
      .rdata(b_rdata[g])
    );
  end

  assign lsu0_y = lsu_y[0];
  assign lsu1_y = lsu_y[1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  host_bank_q <= 1'b0;
    else if (host_en && !busy)   host_bank_q <= host_bank;
  assign host_rdata = b_rdata[host_bank_q];

  // ---------------- source sockets ----------------
  always_comb begin
    for (int s = 0; s < NSRC; s++) src_val[s] = '0;
    for (int i = 0; i < NREG && i < 16; i++) src_val[int'(S_RF) + i] = rf_rd[i];
    src_val[S_ALU]  = alu_y;
    src_val[S_CADD] = cadd_y;
    src_val[S_CMUL] = cmul_y;
    src_val[S_TFG]  = tfg_w;
    src_val[S_LSU0] = lsu0_y;
    src_val[S_LSU1] = lsu1_y;
  end

  // Unused: pc and taken are observation points only.
  logic unused;
  assign unused = ^{pc, taken};
endmodule
