// tb_spiht_encoder_sweep - the encoder at other sizes and unit counts.
//
// Three encoders run side by side: 8x8 with one unit, 32x32 with four
// units and 64x64 with two units, each fed its own random wavelet-like
// frame and compared word for word with the spiht_ref model for its size
// and unit count. Each configuration also checks its max magnitude, n_max
// and that no expected word is left over.
`timescale 1ns/1ps
module tb_spiht_encoder_sweep;
  import spiht_pkg::*;
  import spiht_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int finished = 0;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  localparam int NCFG = 3;
  localparam int DIMS [NCFG] = '{8, 32, 64};
  localparam int NUS  [NCFG] = '{1, 4, 2};

  for (genvar gi = 0; gi < NCFG; gi++) begin : g_cfg
    localparam int DIM = DIMS[gi];
    localparam int NU  = NUS[gi];
    logic start, coef_valid, rdy, busy, done, trunc;
    coef_t coef_in;
    plane_t nmax;
    mag_t mx;
    logic [13:0] m1c, m2c;
    logic [12:0] m1ra, m2ra;
    mem_word_t m1d, m2d;
    logic [31:0] cyc;

    spiht_encoder #(.IMG_DIM(DIM), .NU(NU)) dut (
      .clk, .rst_n, .start, .coef_valid, .coef_ready(rdy), .coef_in,
      .busy, .done, .truncated(trunc), .n_max(nmax), .max_mag(mx),
      .mem1_count(m1c), .mem2_count(m2c), .mem1_raddr(m1ra), .mem1_rdata(m1d),
      .mem2_raddr(m2ra), .mem2_rdata(m2d), .code_cycles(cyc)
    );

    initial begin
      spiht_ref r;
      r = new(DIM, NU);
      r.gen(9 + gi);
      r.compute();
      r.encode();
      start = 0; coef_valid = 0; coef_in = '0; m1ra = '0; m2ra = '0;
      wait (rst_n);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      coef_valid = 1;
      for (int row = 0; row < DIM; row++)
        for (int col = 0; col < DIM; col++) begin
          coef_in = coef_t'(r.coef[row][col]);
          @(negedge clk);
        end
      coef_valid = 0;
      wait (done);
      @(negedge clk);
      $display("%0dx%0d, NU=%0d: %0d planes, %0d coding cycles, %0d + %0d words",
               DIM, DIM, NU, r.nmax + 1, cyc, m1c, m2c);
      check(mx == mag_t'(r.gmax) && nmax == plane_t'(r.nmax) && !trunc, $sformatf("cfg %0d frame state", gi));
      for (int a = 0; a < int'(m1c); a++) begin
        bit ok;
        logic [15:0] w;
        m1ra = 13'(a);
        @(negedge clk);
        w = r.next_word(int'(m1d.tag.plane), int'(m1d.tag.unit), int'(m1d.tag.stream), ok);
        check(ok && w == m1d.data, $sformatf("cfg %0d mem1[%0d]", gi, a));
      end
      for (int a = 0; a < int'(m2c); a++) begin
        bit ok;
        logic [15:0] w;
        m2ra = 13'(a);
        @(negedge clk);
        w = r.next_word(int'(m2d.tag.plane), int'(m2d.tag.unit), int'(m2d.tag.stream), ok);
        check(ok && w == m2d.data, $sformatf("cfg %0d mem2[%0d]", gi, a));
      end
      check(r.words_left() == 0, $sformatf("cfg %0d words left over", gi));
      finished++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (finished == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
