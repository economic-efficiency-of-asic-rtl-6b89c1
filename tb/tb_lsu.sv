// tb_lsu: self-checking test of a load-store unit attached to a 256-word bank: random
// stores (store data moved earlier or in the same cycle as the store trigger) and loads,
// checked against a shadow array one cycle after each load trigger.
module tb_lsu;
  import fft_pkg::*;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0;
  mv_t opnd, ld, st;
  logic mem_en, mem_we, clk_en;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata, y;
  logic [31:0] shadow [1 << AW];
  int checks = 0, failures = 0;

  lsu #(.AW(AW)) dut (.clk, .rst_n, .test_en(1'b0), .opnd, .ld, .st, .mem_en, .mem_we,
                      .mem_addr, .mem_wdata, .mem_rdata, .y, .clk_en);
  sram_sp #(.DEPTH(1 << AW), .DW(32)) u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
                                            .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  logic [AW-1:0] a;
  initial begin
    opnd = '0; ld = '0; st = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      d = $urandom; shadow[i] = d;
      opnd = '{v: 1'b1, d: d};
      st = '{v: 1'b1, d: 32'(i)};
    end
    for (int it = 0; it < 10000; it++) begin
      @(negedge clk);
      opnd = '0; ld = '0; st = '0;
      a = AW'($urandom);
      case ($urandom_range(0, 2))
        0: begin   // store with data moved in an earlier cycle
          d = $urandom;
          opnd = '{v: 1'b1, d: d};
          @(negedge clk);
          opnd = '0;
          st = '{v: 1'b1, d: {$urandom_range(0, 255), 16'h0, a} };
          shadow[a] = d;
        end
        1: begin
          d = $urandom;
          opnd = '{v: 1'b1, d: d};
          st = '{v: 1'b1, d: 32'(a)};
          shadow[a] = d;
        end
        default: begin
          ld = '{v: 1'b1, d: 32'(a)};
          @(negedge clk);
          ld = '0;
          checks++;
          if (y !== shadow[a]) begin
            failures++;
            if (failures < 10) $display("load %0d got %h exp %h", a, y, shadow[a]);
          end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
