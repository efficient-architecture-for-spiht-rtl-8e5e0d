// tb_fifo_scheduler - self-checking test of the FIFO scheduler.
//
// Three units' LIP/LIS/LSP word flags are driven at random. A model keeps
// the two round-robin pointers and the two address counters and predicts,
// every cycle, which FIFO is popped into Mem#1 (LIP/LIS words) and Mem#2
// (LSP words), the write address, the data and the tag. Small memories
// (16 and 8 words) are used so that the full memories, the overflow flag
// and the frame clear are exercised; stall must be the OR of the full
// flags.
`timescale 1ns/1ps
module tb_fifo_scheduler;
  import spiht_pkg::*;
  localparam int NU = 3, D1 = 16, D2 = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, stall, mem1_we, mem2_we, overflow;
  plane_t plane;
  logic [NU-1:0] lip_valid, lis_valid, lsp_valid, lip_full, lis_full, lsp_full;
  logic [NU-1:0] lip_pop, lis_pop, lsp_pop;
  logic [NU-1:0][WORD_W-1:0] lip_word, lis_word, lsp_word;
  logic [3:0] mem1_waddr;
  logic [2:0] mem2_waddr;
  mem_word_t mem1_wdata, mem2_wdata;
  logic [4:0] mem1_count;
  logic [3:0] mem2_count;

  fifo_scheduler #(.NU(NU), .MEM1_DEPTH(D1), .MEM2_DEPTH(D2)) dut (.*);

  int checks = 0, failures = 0, n_ovf = 0, n_w1 = 0, n_w2 = 0;
  int rr1, rr2, c1, c2;
  bit ovf;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; plane = '0;
    lip_valid = '0; lis_valid = '0; lsp_valid = '0;
    lip_full = '0; lis_full = '0; lsp_full = '0;
    lip_word = '0; lis_word = '0; lsp_word = '0;
    rr1 = 0; rr2 = 0; c1 = 0; c2 = 0; ovf = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int g1, g2;
      bit req1 [2 * NU];
      plane = plane_t'($urandom);
      lip_valid = NU'($urandom); lis_valid = NU'($urandom); lsp_valid = NU'($urandom);
      lip_full = ($urandom_range(0, 3) == 0) ? NU'($urandom) : '0;
      lis_full = ($urandom_range(0, 3) == 0) ? NU'($urandom) : '0;
      lsp_full = ($urandom_range(0, 3) == 0) ? NU'($urandom) : '0;
      for (int u = 0; u < NU; u++) begin
        lip_word[u] = WORD_W'($urandom); lis_word[u] = WORD_W'($urandom); lsp_word[u] = WORD_W'($urandom);
        req1[2 * u] = lip_valid[u];
        req1[2 * u + 1] = lis_valid[u];
      end
      #1;
      check(stall == ((|lip_full) || (|lis_full) || (|lsp_full)), "stall");
      g1 = -1;
      for (int i = 0; i < 2 * NU; i++) if (g1 < 0 && req1[(rr1 + i) % (2 * NU)]) g1 = (rr1 + i) % (2 * NU);
      g2 = -1;
      for (int i = 0; i < NU; i++) if (g2 < 0 && lsp_valid[(rr2 + i) % NU]) g2 = (rr2 + i) % NU;
      if (g1 >= 0 && c1 == D1) ovf = 1;
      if (g2 >= 0 && c2 == D2) ovf = 1;
      if (g1 >= 0 && c1 < D1) begin
        int u;
        u = g1 / 2;
        check(mem1_we && int'(mem1_waddr) == c1, "mem1 write/address");
        check(mem1_wdata.tag.plane == plane && int'(mem1_wdata.tag.unit) == u &&
              mem1_wdata.tag.stream == ((g1 % 2) ? STR_LIS : STR_LIP), "mem1 tag");
        check(mem1_wdata.data == ((g1 % 2) ? lis_word[u] : lip_word[u]), "mem1 data");
        check(lip_pop == ((g1 % 2) ? '0 : NU'(1 << u)) && lis_pop == ((g1 % 2) ? NU'(1 << u) : '0), "mem1 pops");
        c1++; rr1 = (g1 + 1) % (2 * NU); n_w1++;
      end else begin
        check(!mem1_we && lip_pop == '0 && lis_pop == '0, "no mem1 write");
      end
      if (g2 >= 0 && c2 < D2) begin
        check(mem2_we && int'(mem2_waddr) == c2, "mem2 write/address");
        check(mem2_wdata.tag.plane == plane && int'(mem2_wdata.tag.unit) == g2 &&
              mem2_wdata.tag.stream == STR_LSP && mem2_wdata.data == lsp_word[g2], "mem2 word");
        check(lsp_pop == NU'(1 << g2), "mem2 pop");
        c2++; rr2 = (g2 + 1) % NU; n_w2++;
      end else begin
        check(!mem2_we && lsp_pop == '0, "no mem2 write");
      end
      @(negedge clk);
      check(int'(mem1_count) == c1 && int'(mem2_count) == c2, "counts");
      check(overflow == ovf, "overflow");
      if (overflow) n_ovf++;
      if (it % 100 == 99) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        c1 = 0; c2 = 0; rr1 = 0; rr2 = 0; ovf = 0;
        check(mem1_count == '0 && mem2_count == '0 && !overflow, "clear");
      end
    end
    check(n_ovf > 0, "overflow seen");
    $display("words: Mem#1 %0d Mem#2 %0d, overflow cycles %0d", n_w1, n_w2, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
