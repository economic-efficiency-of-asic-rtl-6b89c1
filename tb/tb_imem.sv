// tb_imem: self-checking test of the instruction memory: loads random 76-bit words, then
// reads them back in random order and checks each one a cycle after its address; a cycle
// without read enable keeps the previous word.
module tb_imem;
  localparam int DEPTH = 512, IW = 76;
  logic clk = 0, we = 0, re = 0;
  logic [8:0] waddr = 0, raddr = 0;
  logic [IW-1:0] wdata = 0, rdata, prev;
  logic [IW-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  imem #(.DEPTH(DEPTH), .IW(IW)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = 9'(i); wdata = {$urandom, $urandom, $urandom};
      shadow[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int it = 0; it < 3000; it++) begin
      re = 1; raddr = 9'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== shadow[raddr]) begin failures++; $display("addr %0d wrong", raddr); end
      prev = rdata;
      if (it % 10 == 0) begin
        re = 0; raddr = raddr + 1;
        @(negedge clk);
        checks++;
        if (rdata !== prev) begin failures++; $display("word changed without read"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
