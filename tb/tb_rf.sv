// tb_rf: self-checking test of the register file: random writes to random registers, with
// several registers written in one cycle, compared with a shadow copy kept here; a register
// not written keeps its value.
module tb_rf;
  import fft_pkg::*;
  localparam int NREG = 16;
  logic clk = 0, rst_n = 0;
  mv_t wr [NREG];
  logic [31:0] rd [NREG];
  logic [31:0] shadow [NREG];
  int checks = 0, failures = 0;

  rf #(.NREG(NREG)) dut (.clk, .rst_n, .wr, .rd);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NREG; i++) begin wr[i] = '0; shadow[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      for (int i = 0; i < NREG; i++) begin
        wr[i] = '0;
        if ($urandom_range(0, 3) == 0) begin
          wr[i] = '{v: 1'b1, d: $urandom};
          shadow[i] = wr[i].d;
        end
      end
      @(negedge clk);
      for (int i = 0; i < NREG; i++) wr[i] = '0;
      for (int i = 0; i < NREG; i++) begin
        checks++;
        if (rd[i] !== shadow[i]) begin
          failures++;
          if (failures < 10) $display("r%0d got %h exp %h", i, rd[i], shadow[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
