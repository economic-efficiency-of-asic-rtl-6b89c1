// fft_sw_pkg: software side of the FFT processor tests.
//
// fft_asm builds move programs: mv()/mvi() add a move to the instruction being built,
// step() closes it (at most NBUS moves and one distinct immediate per instruction).
// gen_fft() emits a complete in-place-free FFT program for N = 2^log2n points: radix-4
// decimation-in-frequency stages, then one radix-2 stage when log2n is odd. Stage s reads
// the bank of load-store unit s%2 and writes the other bank (ping-pong), so the result ends
// in bank (number of stages)%2, in digit-reversed order given by out_pos(). Every butterfly
// output is scaled (1/4 per radix-4 stage, 1/2 per radix-2 stage), so the result is DFT/N.
// gen_copy() emits a bank-to-bank copy that loads and stores in the same cycle.
// ref_fft() is an independent double-precision radix-2 FFT used as the reference.
package fft_sw_pkg;
  import fft_pkg::*;

  localparam int NBUS = 4;
  localparam int IW   = DW + NBUS * (SRC_W + DST_W);
  typedef logic [IW-1:0] instr_t;

  // cadd opcodes
  localparam int OP_SCALE = 8, OP_R2 = 4;

  class fft_asm;
    instr_t      prog [$];
    slot_t       cur [$];
    logic [31:0] cur_imm;
    bit          imm_used;
    int          n_stages;
    int          out_bank;

    function void mv(logic [SRC_W-1:0] src, logic [DST_W-1:0] dst);
      cur.push_back(slot_t'{src: src, dst: dst});
    endfunction

    function void mvi(int val, logic [DST_W-1:0] dst);
      if (imm_used && cur_imm != 32'(val)) $fatal(1, "two immediates in one instruction");
      cur_imm  = 32'(val);
      imm_used = 1;
      mv(S_IMM, dst);
    endfunction

    function void step();
      instr_t w = '0;
      if (cur.size() > NBUS) $fatal(1, "too many moves in one instruction");
      foreach (cur[b]) w[b*(SRC_W+DST_W) +: SRC_W+DST_W] = cur[b];
      w[IW-1 -: DW] = imm_used ? cur_imm : 32'd0;
      prog.push_back(w);
      cur.delete();
      imm_used = 0;
    endfunction

    function int here();
      return prog.size();
    endfunction

    static function logic [SRC_W-1:0] R(int i);
      return S_RF + SRC_W'(i);
    endfunction
    static function logic [DST_W-1:0] W(int i);
      return D_RF + DST_W'(i);
    endfunction
    static function logic [DST_W-1:0] ALU(alu_op_e op);
      return D_ALU_T + DST_W'(op);
    endfunction

    // Registers: r0 group base g, r1 butterfly index n, r2 address of x0, r4/r7/r8
    // twiddles W(n), W(2n), W(3n), r5 = 2n, r6 = 3n, r9 = stride S.
    function void radix4_stage(int log2n, int s_log2, int ib);
      int n = 1 << log2n, s = 1 << s_log2, g0, b0;
      logic [SRC_W-1:0] LI  = ib ? S_LSU1 : S_LSU0;
      logic [DST_W-1:0] LDI = ib ? D_LSU1_LD : D_LSU0_LD;
      logic [DST_W-1:0] OO  = ib ? D_LSU0_O : D_LSU1_O;
      logic [DST_W-1:0] STO = ib ? D_LSU0_ST : D_LSU1_ST;
      mvi(0, W(0)); mvi(0, D_ALU_O); step();
      mvi(s_log2 + 2, D_TFG_O); step();
      mvi(s, W(9)); step();
      g0 = here();                                   // group loop
      mvi(0, W(1)); mvi(0, W(5)); mvi(0, W(6)); step();
      b0 = here();                                   // butterfly loop
      /* c0  */ mv(R(0), D_ALU_O); mv(R(1), ALU(ALU_ADD)); mv(R(1), D_TFG_T); step();
      /* c1  */ mv(S_ALU, LDI); mv(S_ALU, W(2)); mv(S_ALU, D_ALU_O); mvi(s, ALU(ALU_ADD)); step();
      /* c2  */ mv(LI, D_CADD_O1); mv(S_ALU, LDI); mv(S_ALU, D_ALU_O); mvi(s, ALU(ALU_ADD)); step();
      /* c3  */ mv(LI, D_CADD_O1 + 1); mv(S_ALU, LDI); mv(S_ALU, D_ALU_O); mvi(s, ALU(ALU_ADD)); step();
      /* c4  */ mv(LI, D_CADD_O1 + 2); mv(S_ALU, LDI); mv(S_TFG, W(4)); mv(R(5), D_TFG_T); step();
      /* c5  */ mv(LI, D_CADD_O1 + 3); mvi(OP_SCALE | 0, D_CADD_T); mv(R(2), D_ALU_O); mv(R(9), ALU(ALU_ADD)); step();
      /* c6  */ mv(S_CADD, OO); mv(R(2), STO); mvi(OP_SCALE | 1, D_CADD_T); mv(R(6), D_TFG_T); step();
      /* c7  */ mv(S_CADD, D_CMUL_O); mv(R(4), D_CMUL_T); mv(S_TFG, W(7)); mvi(OP_SCALE | 2, D_CADD_T); step();
      /* c8  */ mv(S_CMUL, OO); mv(S_ALU, STO); mv(S_CADD, D_CMUL_O); mv(R(7), D_CMUL_T); step();
      /* c9  */ mv(S_ALU, D_ALU_O); mv(R(9), ALU(ALU_ADD)); mvi(OP_SCALE | 3, D_CADD_T); mv(S_TFG, W(8)); step();
      /* c10 */ mv(S_CMUL, OO); mv(S_ALU, STO); mv(S_CADD, D_CMUL_O); mv(R(8), D_CMUL_T); step();
      /* c11 */ mv(S_ALU, D_ALU_O); mv(R(9), ALU(ALU_ADD)); step();
      /* c12 */ mv(S_CMUL, OO); mv(S_ALU, STO); mv(R(1), D_ALU_O); mvi(1, ALU(ALU_ADD)); step();
      /* c13 */ mv(S_ALU, W(1)); mv(R(5), D_ALU_O); mvi(2, ALU(ALU_ADD)); step();
      /* c14 */ mv(S_ALU, W(5)); mv(R(6), D_ALU_O); mvi(3, ALU(ALU_ADD)); step();
      /* c15 */ mv(S_ALU, W(6)); mv(R(1), D_ALU_O); mv(R(9), ALU(ALU_LTU)); step();
      /* c16 */ mv(S_ALU, D_GCU_C); mvi(b0, D_GCU_BNZ); step();
      // next group
      mv(R(0), D_ALU_O); mvi(4 * s, ALU(ALU_ADD)); step();
      mv(S_ALU, W(0)); mv(S_ALU, D_ALU_O); mvi(n, ALU(ALU_LTU)); step();
      mv(S_ALU, D_GCU_C); mvi(g0, D_GCU_BNZ); step();
    endfunction

    // Final radix-2 stage on pairs (2i, 2i+1); no twiddles are needed.
    function void radix2_stage(int log2n, int ib);
      int n = 1 << log2n, b0;
      logic [SRC_W-1:0] LI  = ib ? S_LSU1 : S_LSU0;
      logic [DST_W-1:0] LDI = ib ? D_LSU1_LD : D_LSU0_LD;
      logic [DST_W-1:0] OO  = ib ? D_LSU0_O : D_LSU1_O;
      logic [DST_W-1:0] STO = ib ? D_LSU0_ST : D_LSU1_ST;
      mvi(0, W(0)); step();
      b0 = here();
      /* c0 */ mv(R(0), LDI); mv(R(0), D_ALU_O); mvi(1, ALU(ALU_ADD)); step();
      /* c1 */ mv(LI, D_CADD_O1); mv(S_ALU, LDI); mv(S_ALU, W(2)); step();
      /* c2 */ mv(LI, D_CADD_O1 + 1); mvi(OP_SCALE | OP_R2 | 0, D_CADD_T); step();
      /* c3 */ mv(S_CADD, OO); mv(R(0), STO); mvi(OP_SCALE | OP_R2 | 2, D_CADD_T); step();
      /* c4 */ mv(S_CADD, OO); mv(R(2), STO); mv(R(0), D_ALU_O); mvi(2, ALU(ALU_ADD)); step();
      /* c5 */ mv(S_ALU, W(0)); mv(S_ALU, D_ALU_O); mvi(n, ALU(ALU_LTU)); step();
      /* c6 */ mv(S_ALU, D_GCU_C); mvi(b0, D_GCU_BNZ); step();
    endfunction

    function void gen_fft(int log2n);
      int s_log2 = log2n - 2, st = 0;
      prog.delete();
      cur.delete();
      imm_used = 0;
      while (s_log2 >= 0) begin
        radix4_stage(log2n, s_log2, st % 2);
        s_log2 -= 2;
        st++;
      end
      if (log2n % 2 == 1) begin
        radix2_stage(log2n, st % 2);
        st++;
      end
      mvi(0, D_GCU_HLT); step();
      n_stages = st;
      out_bank = st % 2;
    endfunction

    // Copy n words from bank 0 to bank 1, one word per loop pass. Each pass stores the word
    // loaded by the previous pass in the same instruction that loads the next one, so both
    // single-port banks are busy in that cycle. r3 starts at a spare address (park) that
    // absorbs the first, empty store.
    function void gen_copy(int n, int park);
      int l0;
      prog.delete();
      cur.delete();
      imm_used = 0;
      mvi(0, W(0)); step();
      mvi(park, W(3)); step();
      l0 = here();
      mv(S_LSU0, D_LSU1_O); mv(R(3), D_LSU1_ST); mv(R(0), D_LSU0_LD); mv(R(0), W(3)); step();
      mv(R(0), D_ALU_O); mvi(1, ALU(ALU_ADD)); step();
      mv(S_ALU, W(0)); mv(S_ALU, D_ALU_O); mvi(n + 1, ALU(ALU_LTU)); step();
      mv(S_ALU, D_GCU_C); mvi(l0, D_GCU_BNZ); step();
      mvi(0, D_GCU_HLT); step();
      out_bank = 1;
    endfunction
  endclass

  // Position of X[k] in the result bank for an N-point transform.
  function automatic int out_pos(int k, int n);
    if (n == 1) return 0;
    if (n == 2) return k;
    return (k % 4) * (n / 4) + out_pos(k / 4, n / 4);
  endfunction

  // In-place iterative radix-2 FFT in double precision (bit-reversed input order).
  function automatic void ref_fft(ref real re [], ref real im [], input int log2n);
    int n = 1 << log2n;
    int j;
    real tr, ti, wr, wi, a;
    for (int i = 0; i < n; i++) begin
      j = 0;
      for (int b = 0; b < log2n; b++) if (i & (1 << b)) j |= 1 << (log2n - 1 - b);
      if (j > i) begin
        tr = re[i]; re[i] = re[j]; re[j] = tr;
        ti = im[i]; im[i] = im[j]; im[j] = ti;
      end
    end
    for (int len = 2; len <= n; len *= 2)
      for (int i = 0; i < n; i += len)
        for (int k = 0; k < len / 2; k++) begin
          a  = -2.0 * 3.14159265358979323846 * real'(k) / real'(len);
          wr = $cos(a); wi = $sin(a);
          tr = re[i+k+len/2] * wr - im[i+k+len/2] * wi;
          ti = re[i+k+len/2] * wi + im[i+k+len/2] * wr;
          re[i+k+len/2] = re[i+k] - tr; im[i+k+len/2] = im[i+k] - ti;
          re[i+k] += tr; im[i+k] += ti;
        end
  endfunction
endpackage
