// tb_spiht_encoder_full - one full-size frame through the SPIHT encoder
// with every parameter at its default (128x128 image, three coding units,
// 8192-word memories).
//
// A random wavelet-like image with an 11-bit low-pass corner is encoded by
// the spiht_ref model and by the encoder; every word of Mem#1 and Mem#2 is
// compared with the next word of the stream its tag names, and no expected
// word may be left over. It also reports the coding cycles per plane next
// to the ceil(4096/3) = 1366 issue cycles a plane needs at least.
`timescale 1ns/1ps
module tb_spiht_encoder_full;
  import spiht_pkg::*;
  import spiht_ref_pkg::*;

  localparam int DIM = 128;
  localparam int NU  = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, coef_valid, rdy, busy, done, trunc;
  coef_t coef_in;
  plane_t nmax;
  mag_t mx;
  logic [13:0] m1c, m2c;
  logic [12:0] m1ra, m2ra;
  mem_word_t m1d, m2d;
  logic [31:0] cyc;

  spiht_encoder dut (
    .clk, .rst_n, .start, .coef_valid, .coef_ready(rdy), .coef_in,
    .busy, .done, .truncated(trunc), .n_max(nmax), .max_mag(mx),
    .mem1_count(m1c), .mem2_count(m2c), .mem1_raddr(m1ra), .mem1_rdata(m1d),
    .mem2_raddr(m2ra), .mem2_rdata(m2d), .code_cycles(cyc)
  );

  int checks = 0, failures = 0, n_stall = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (dut.stall && (|dut.u_valid)) n_stall++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spiht_ref r;
    int t0, t_load, t_max;
    start = 0;
    coef_valid = 0;
    coef_in = '0;
    m1ra = '0;
    m2ra = '0;
    r = new(DIM, NU);
    r.gen(11);
    r.compute();
    r.encode();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = $time / 10;
    coef_valid = 1;
    for (int row = 0; row < DIM; row++)
      for (int col = 0; col < DIM; col++) begin
        coef_in = coef_t'(r.coef[row][col]);
        @(posedge clk);
        @(negedge clk);
      end
    coef_valid = 0;
    t_load = $time / 10 - t0;
    wait (dut.state == 3'd3);
    t_max = $time / 10 - t0 - t_load;
    wait (done);
    @(negedge clk);
    $display("load %0d cycles, max magnitude %0d cycles, coding %0d cycles for %0d planes (%0d per plane), %0d stall cycles",
             t_load, t_max, cyc, r.nmax + 1, cyc / (r.nmax + 1), n_stall);
    $display("Mem#1 %0d words, Mem#2 %0d words, %0d bits in all", m1c, m2c, 16 * (m1c + m2c));
    check(mx == mag_t'(r.gmax), "max magnitude");
    check(nmax == plane_t'(r.nmax), "n_max");
    check(!trunc, "no truncation expected");
    check(t_load == DIM * DIM, "one coefficient per load cycle");
    check(cyc >= 32'((r.nmax + 1) * 1366), "coding cycle lower bound");
    for (int a = 0; a < int'(m1c); a++) begin
      bit ok;
      logic [15:0] w;
      m1ra = 13'(a);
      @(negedge clk);
      w = r.next_word(int'(m1d.tag.plane), int'(m1d.tag.unit), int'(m1d.tag.stream), ok);
      check(ok && m1d.tag.stream != STR_LSP && w == m1d.data, $sformatf("mem1[%0d]", a));
    end
    for (int a = 0; a < int'(m2c); a++) begin
      bit ok;
      logic [15:0] w;
      m2ra = 13'(a);
      @(negedge clk);
      w = r.next_word(int'(m2d.tag.plane), int'(m2d.tag.unit), int'(m2d.tag.stream), ok);
      check(ok && m2d.tag.stream == STR_LSP && w == m2d.data, $sformatf("mem2[%0d]", a));
    end
    check(r.words_left() == 0, "expected words left over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
