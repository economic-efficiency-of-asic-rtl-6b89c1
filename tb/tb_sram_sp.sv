// tb_sram_sp: self-checking test of one data bank (1024 words here): random writes and
// reads against a shadow array; read data appears one cycle after the read and holds
// through later writes and idle cycles.
module tb_sram_sp;
  localparam int DEPTH = 1024;
  logic clk = 0, en, we;
  logic [9:0] addr;
  logic [31:0] wdata, rdata, held;
  logic [31:0] shadow [DEPTH];
  logic        known [DEPTH];
  int checks = 0, failures = 0;

  sram_sp #(.DEPTH(DEPTH), .DW(32)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) known[i] = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin   // fill
      en = 1; we = 1; addr = 10'(i); wdata = $urandom; shadow[i] = wdata; known[i] = 1;
      @(negedge clk);
    end
    en = 1; we = 0; addr = 0;
    @(negedge clk);
    held = shadow[0];
    for (int it = 0; it < 20000; it++) begin
      en = 1; addr = 10'($urandom); we = $urandom_range(0, 2) == 0;
      wdata = $urandom;
      if (we) begin
        shadow[addr] = wdata;
        @(negedge clk);
        checks++;
        if (rdata !== held) begin failures++; $display("read data changed on a write"); end
      end else begin
        @(negedge clk);
        held = shadow[addr];
        checks++;
        if (rdata !== held) begin
          failures++;
          if (failures < 10) $display("addr %0d got %h exp %h", addr, rdata, held);
        end
      end
    end
    en = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (rdata !== held) begin failures++; $display("read data not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
