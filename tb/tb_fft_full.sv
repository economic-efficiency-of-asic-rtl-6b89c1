// tb_fft_full: the FFT processor at its default size, running every length it is rated
// for, 64 to 16384 points (at 16384 both banks are full).
//
// Same procedure as tb_fft_tta. For each transform length in SIZES it generates the move program (fft_sw_pkg), loads it
// through the program port, writes an input (two tones plus random noise) into bank 0
// through the host port, starts the core, waits for done, reads the result bank back and
// compares every bin with a double-precision FFT scaled by 1/N (tolerance TOL LSB). It also
// checks the executed cycle count against the count the program's schedule implies, and
// counts how often each mechanism occurred: radix-4 and radix-2 butterflies, butterfly
// outputs triggered from held operands, twiddle multiplications, twiddles from each of the
// octants an FFT needs, taken branches, loads and stores on both banks, and idle cycles in which
// each unit's clock was gated off. A mechanism that never occurred counts as a failure.
module tb_fft_full;
  import fft_pkg::*;
  import fft_sw_pkg::*;

  localparam int NSIZES = 9;
  localparam int SIZES [NSIZES] = '{64, 128, 256, 512, 1024, 2048, 4096, 8192, 16384};
  localparam int TOL = 3;

  logic clk = 0, rst_n = 0, start = 0;
  logic prog_we = 0;
  logic [8:0] prog_addr = 0;
  instr_t prog_data = '0;
  logic host_en = 0, host_we = 0, host_bank = 0;
  logic [13:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic busy, done;
  logic [31:0] cycles;
  logic [5:0] fu_clk_en;
  int checks = 0, failures = 0;

  fft_tta dut (.clk, .rst_n, .test_en(1'b0), .prog_we, .prog_addr, .prog_data, .host_en,
               .host_we, .host_bank, .host_addr, .host_wdata, .host_rdata, .start, .busy,
               .done, .cycles, .fu_clk_en);

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_r4, n_r2, n_held, n_cmul, n_taken, n_ld [2], n_st [2], n_gated [6];
  int n_oct [8];
  always @(posedge clk) if (busy) begin
    if (dut.u_cadd.trig.v) begin
      if (dut.u_cadd.trig.d[2]) n_r2++; else n_r4++;
      if (!(dut.u_cadd.op_in[0].v || dut.u_cadd.op_in[1].v ||
            dut.u_cadd.op_in[2].v || dut.u_cadd.op_in[3].v)) n_held++;
    end
    if (dut.u_cmul.trig.v) n_cmul++;
    if (dut.u_tfg.v1) n_oct[dut.u_tfg.oct1]++;
    if (dut.taken) n_taken++;
    for (int b = 0; b < 2; b++) begin
      if (dut.b_en[b] && !dut.b_we[b]) n_ld[b]++;
      if (dut.b_en[b] &&  dut.b_we[b]) n_st[b]++;
    end
    for (int u = 0; u < 6; u++) if (!fu_clk_en[u]) n_gated[u]++;
  end

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic int expected_cycles(int log2n);
    int n = 1 << log2n, c = 1;
    for (int sl = log2n - 2; sl >= 0; sl -= 2) begin
      int s = 1 << sl;
      c += 3 + (n / (4 * s)) * (1 + 17 * s + 3);
    end
    if (log2n % 2) c += 1 + (n / 2) * 7;
    return c;
  endfunction

  task automatic run_fft(int log2n);
    fft_asm a = new();
    int n = 1 << log2n;
    real re [], im [];
    cplx_t x [], y;
    int errmax = 0, e;
    a.gen_fft(log2n);
    // load program
    foreach (a.prog[i]) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 9'(i); prog_data = a.prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    // input: two tones and noise
    re = new[n]; im = new[n]; x = new[n];
    for (int i = 0; i < n; i++) begin
      real ph1 = 2.0 * 3.14159265358979323846 * real'((3 * i) % n) / real'(n);
      real ph2 = 2.0 * 3.14159265358979323846 * real'(((n / 2 + 1) * i) % n) / real'(n);
      int xr = $rtoi(9000.0 * $cos(ph1) + 5000.0 * $cos(ph2)) + int'($urandom_range(0, 2000)) - 1000;
      int xi = $rtoi(9000.0 * $sin(ph1) - 5000.0 * $sin(ph2)) + int'($urandom_range(0, 2000)) - 1000;
      x[i] = cplx_t'{re: 16'(xr), im: 16'(xi)};
      re[i] = real'(xr); im[i] = real'(xi);
      host_en = 1; host_we = 1; host_bank = 0; host_addr = 14'(i); host_wdata = x[i];
      @(negedge clk);
    end
    host_en = 0; host_we = 0;
    ref_fft(re, im, log2n);
    // run
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (cycles != 32'(expected_cycles(log2n))) begin
      failures++;
      $display("N=%0d: %0d cycles, expected %0d", n, cycles, expected_cycles(log2n));
    end
    // read back
    for (int k = 0; k < n; k++) begin
      host_en = 1; host_we = 0; host_bank = 1'(a.out_bank); host_addr = 14'(out_pos(k, n));
      @(negedge clk);
      host_en = 0;
      y = cplx_t'(host_rdata);
      e = $rtoi(fabs(real'(y.re) - re[k] / real'(n)) + fabs(real'(y.im) - im[k] / real'(n)));
      if (e > errmax) errmax = e;
      checks++;
      if (e > TOL) begin
        failures++;
        if (failures < 10) $display("N=%0d X[%0d] got (%0d,%0d) exp (%f,%f)", n, k, y.re, y.im,
                                    re[k] / real'(n), im[k] / real'(n));
      end
    end
    $display("N=%0d: %0d stages, %0d instructions, %0d cycles, max error %0d LSB",
             n, a.n_stages, a.prog.size(), cycles, errmax);
  endtask

  task automatic seen(string what, int cnt);
    checks++;
    $display("  %-28s %0d", what, cnt);
    if (cnt == 0) begin failures++; $display("mechanism never occurred: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (SIZES[i]) run_fft($clog2(SIZES[i]));
    $display("mechanisms:");
    seen("radix-4 butterfly outputs", n_r4);
    seen("radix-2 butterfly outputs", n_r2);
    seen("triggers on held operands", n_held);
    seen("twiddle multiplications", n_cmul);
    // A DIF program needs angles up to 3*pi/2 only: octants 0..5 (6 and 7 are checked in tb_tfg).
    for (int o = 0; o < 6; o++) seen($sformatf("twiddles from octant %0d", o), n_oct[o]);
    seen("taken branches", n_taken);
    seen("loads from bank 0", n_ld[0]);
    seen("loads from bank 1", n_ld[1]);
    seen("stores to bank 0", n_st[0]);
    seen("stores to bank 1", n_st[1]);
    foreach (n_gated[u]) seen($sformatf("gated-off cycles, unit %0d", u), n_gated[u]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
