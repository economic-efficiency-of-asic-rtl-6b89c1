// tb_gcu: self-checking test of the control unit. The testbench plays the role of the
// instruction stream: for the executing address it presents the moves of a small program
//   0: cond <- 3        2: bnz 10 (taken)       10: cond <- 0 ; bnz 20 (not taken)
//  11: jump 30          30: cond <- 2 ; bnz 40  40: halt
// and a second run with a counted loop (5 passes through a taken branch). It checks the
// sequence of executed addresses, that the fetch address always names the next executed
// one, the cycle count and done/busy.
module tb_gcu;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  mv_t cond, jump, bnz, halt;
  logic fetch_en, exec, busy, done, taken;
  logic [8:0] fetch_addr, pc;
  logic [31:0] cycles;
  int checks = 0, failures = 0;
  int trace [$];
  int loopc;

  gcu #(.AW(9)) dut (.clk, .rst_n, .start, .cond, .jump, .bnz, .halt, .fetch_en, .fetch_addr,
                     .exec, .pc, .busy, .done, .cycles, .taken);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Combinational "program": moves for the executing address.
  int prog_sel;
  always_comb begin
    cond = '0; jump = '0; bnz = '0; halt = '0;
    if (exec) begin
      if (prog_sel == 0) begin
        case (int'(pc))
          0:  cond = '{v: 1'b1, d: 32'd3};
          2:  bnz  = '{v: 1'b1, d: 32'd10};
          10: begin cond = '{v: 1'b1, d: 32'd0}; bnz = '{v: 1'b1, d: 32'd20}; end
          11: jump = '{v: 1'b1, d: 32'd30};
          30: begin cond = '{v: 1'b1, d: 32'd2}; bnz = '{v: 1'b1, d: 32'd40}; end
          40: halt = '{v: 1'b1, d: 32'd0};
          default: ;
        endcase
      end else begin
        case (int'(pc))
          0: ;
          1: begin cond = '{v: 1'b1, d: 32'(loopc)}; bnz = '{v: 1'b1, d: 32'd0}; end
          2: halt = '{v: 1'b1, d: 32'd0};
          default: ;
        endcase
      end
    end
  end

  logic [8:0] exp_next;
  logic       have_next;
  always @(posedge clk) begin
    if (exec) begin
      trace.push_back(int'(pc));
      if (have_next && pc !== exp_next) begin
        checks++; failures++; $display("executed %0d, fetched %0d", pc, exp_next);
      end
      if (prog_sel == 1 && pc == 1) loopc <= loopc - 1;
    end
    have_next <= fetch_en && busy;
    exp_next  <= fetch_addr;
  end

  int exp0 [] = '{0, 1, 2, 10, 11, 30, 40};
  initial begin
    prog_sel = 0; have_next = 0; loopc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    check(trace.size() == exp0.size(), $sformatf("trace length %0d", trace.size()));
    foreach (exp0[i]) check(i < trace.size() && trace[i] == exp0[i], $sformatf("trace[%0d]", i));
    check(cycles == 7, $sformatf("cycles %0d", cycles));
    check(!busy, "busy after halt");
    // Run 2: counted loop 0,1,0,1,... five taken branches, then fall through to halt.
    trace.delete();
    prog_sel = 1; loopc = 5;
    start = 1;
    @(negedge clk);
    start = 0;
    check(!done, "done cleared by start");
    wait (done);
    @(negedge clk);
    check(trace.size() == 13, $sformatf("loop trace length %0d", trace.size()));
    check(cycles == 13, $sformatf("loop cycles %0d", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
