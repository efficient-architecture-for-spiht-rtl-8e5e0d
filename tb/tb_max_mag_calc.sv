// tb_max_mag_calc - self-checking test of the maximum magnitude calculator.
//
// A 16x16 random image is held in a model of the coefficient memory (1-D
// order, groups of four, one-cycle reads) and the tree memory is modelled
// the same way. After the run, every node's D-set and L-set maxima are
// compared with a recursive computation on 2-D coordinates, and the image
// maximum and n_max are checked, as is the run time of N/4 + 3 cycles.
`timescale 1ns/1ps
module tb_max_mag_calc;
  import spiht_pkg::*;
  localparam int DIM = 16, N = DIM * DIM, NN = N / 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, coef_re, tree_re, tree_we, busy, done;
  logic [5:0] coef_raddr, tree_waddr;
  logic [3:0] tree_raddr;
  coef_t [3:0] coef_rdata;
  tree_t [3:0] tree_rdata;
  tree_t tree_wdata;
  mag_t gmax;
  plane_t n_max;

  max_mag_calc #(.IMG_DIM(DIM)) dut (.*);

  coef_t cmem [N];
  tree_t tmem [NN];
  coef_t img [DIM][DIM];
  int rmd [DIM][DIM], rml [DIM][DIM];
  int checks = 0, failures = 0;

  always_ff @(posedge clk) begin
    if (coef_re) for (int k = 0; k < 4; k++) coef_rdata[k] <= cmem[4 * coef_raddr + k];
    if (tree_re) for (int k = 0; k < 4; k++) tree_rdata[k] <= tmem[4 * tree_raddr + k];
    if (tree_we) tmem[tree_waddr] <= tree_wdata;
  end

  function automatic int addr(int x, int y);
    int a = 0;
    for (int b = 0; b < 4; b++) a |= (((x >> b) & 1) << (2 * b + 1)) | (((y >> b) & 1) << (2 * b));
    return a;
  endfunction
  function automatic int amag(int v);
    return v < 0 ? -v : v;
  endfunction
  function automatic int rec(int x, int y);
    int m = 0, l = 0;
    if (!(x == 0 && y == 0) && 2 * x < DIM && 2 * y < DIM)
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) begin
          int d = rec(2 * x + i, 2 * y + j);
          int c = amag(int'(img[2 * x + i][2 * y + j]));
          if (c > m) m = c;
          if (d > m) m = d;
          if (d > l) l = d;
        end
    rmd[x][y] = m;
    rml[x][y] = l;
    return m;
  endfunction

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
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int g, np, t;
      foreach (img[x, y]) begin
        int lvl, m;
        lvl = 0;
        m = (x > y) ? x : y;
        while ((2 << lvl) <= m) lvl++;
        img[x][y] = coef_t'($signed($urandom_range(0, (m < 2) ? 3000 >> (2 * f) : (1000 >> lvl))) *
                            ($urandom_range(0, 1) ? 1 : -1));
        cmem[addr(x, y)] = img[x][y];
      end
      foreach (tmem[i]) tmem[i] = '{md: mag_t'($urandom), ml: mag_t'($urandom)};  // stale contents
      g = 0;
      for (int x = 0; x < 2; x++)
        for (int y = 0; y < 2; y++) begin
          int d;
          d = rec(x, y);
          if (amag(int'(img[x][y])) > g) g = amag(int'(img[x][y]));
          if (d > g) g = d;
        end
      np = 0;
      while ((2 << np) <= g) np++;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t = 1;
      while (!done) begin @(negedge clk); t++; end
      check(t == NN + 3, $sformatf("run took %0d cycles", t));
      check(int'(gmax) == g, $sformatf("gmax %0d vs %0d", gmax, g));
      check(int'(n_max) == np, "n_max");
      for (int x = 0; x < DIM / 2; x++)
        for (int y = 0; y < DIM / 2; y++)
          if (!(x == 0 && y == 0)) begin
            check(int'(tmem[addr(x, y)].md) == rmd[x][y], $sformatf("md(%0d,%0d)", x, y));
            check(int'(tmem[addr(x, y)].ml) == rml[x][y], $sformatf("ml(%0d,%0d)", x, y));
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
