// tb_coef_addr_gen - self-checking test of the coefficient address generator.
//
// Streams a 16x16 image in raster order with random gaps on in_valid and
// checks that every coefficient is written once, with its data, at the
// address given by the offspring rule: address(0,0) = 0 and the offspring
// (2X+i, 2Y+j) of (X, Y) sit at 4*address(X, Y) + 2i + j. Also checks that
// in_ready falls and done pulses after the last coefficient, and that a
// second frame starts over.
`timescale 1ns/1ps
module tb_coef_addr_gen;
  import spiht_pkg::*;
  localparam int DIM = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, in_ready, we, done;
  coef_t in_coef, wdata;
  logic [7:0] waddr;

  coef_addr_gen #(.IMG_DIM(DIM)) dut (.*);

  int checks = 0, failures = 0;
  int written [DIM * DIM];
  coef_t img [DIM][DIM];

  function automatic int ref_addr(int x, int y);
    if (x == 0 && y == 0) return 0;
    return 4 * ref_addr(x / 2, y / 2) + 2 * (x % 2) + (y % 2);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write monitor
  int cur_r, cur_c;
  always @(posedge clk) if (rst_n && we) begin
    check(waddr == 8'(ref_addr(cur_r, cur_c)), $sformatf("addr of (%0d,%0d): %0d", cur_r, cur_c, waddr));
    check(wdata == img[cur_r][cur_c], "data");
    written[waddr]++;
  end

  initial begin
    start = 0; in_valid = 0; in_coef = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      foreach (written[i]) written[i] = 0;
      foreach (img[r, c]) img[r][c] = coef_t'($urandom);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int r = 0; r < DIM; r++)
        for (int c = 0; c < DIM; c++) begin
          while ($urandom_range(0, 2) == 0) @(negedge clk);
          cur_r = r; cur_c = c;
          check(in_ready, "ready during frame");
          in_valid = 1; in_coef = img[r][c];
          @(negedge clk);
          in_valid = 0;
        end
      check(done, "done pulse after the last coefficient");
      check(!in_ready, "ready falls after the frame");
      @(negedge clk);
      check(!done, "done is one cycle");
      foreach (written[i]) check(written[i] == 1, $sformatf("address %0d written %0d times", i, written[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
