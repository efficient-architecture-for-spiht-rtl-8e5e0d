// tb_spiht_encoder_table1 - two-unit against three-unit configuration.
//
// The same 128x128 wavelet-like frame is coded by an encoder with two
// coding units and one with three. Both bit streams are compared word for
// word with the spiht_ref model for their unit count, and the coding cycle
// counts are reported; three units must need fewer cycles than two, and
// neither may beat its issue-cycle bound of ceil(4096/NU) per plane.
`timescale 1ns/1ps
module tb_spiht_encoder_table1;
  import spiht_pkg::*;
  import spiht_ref_pkg::*;

  localparam int DIM = 128;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, coef_valid;
  coef_t coef_in;
  logic [1:0] rdy, busy, done, trunc;
  plane_t nmax [2];
  mag_t mx [2];
  logic [13:0] m1c [2], m2c [2];
  logic [12:0] m1ra, m2ra;
  mem_word_t m1d [2], m2d [2];
  logic [31:0] cyc [2];

  spiht_encoder #(.NU(2)) dut2 (
    .clk, .rst_n, .start, .coef_valid, .coef_ready(rdy[0]), .coef_in,
    .busy(busy[0]), .done(done[0]), .truncated(trunc[0]), .n_max(nmax[0]), .max_mag(mx[0]),
    .mem1_count(m1c[0]), .mem2_count(m2c[0]), .mem1_raddr(m1ra), .mem1_rdata(m1d[0]),
    .mem2_raddr(m2ra), .mem2_rdata(m2d[0]), .code_cycles(cyc[0])
  );
  spiht_encoder #(.NU(3)) dut3 (
    .clk, .rst_n, .start, .coef_valid, .coef_ready(rdy[1]), .coef_in,
    .busy(busy[1]), .done(done[1]), .truncated(trunc[1]), .n_max(nmax[1]), .max_mag(mx[1]),
    .mem1_count(m1c[1]), .mem2_count(m2c[1]), .mem1_raddr(m1ra), .mem1_rdata(m1d[1]),
    .mem2_raddr(m2ra), .mem2_rdata(m2d[1]), .code_cycles(cyc[1])
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spiht_ref r [2];
    r[0] = new(DIM, 2);
    r[1] = new(DIM, 3);
    r[0].gen(10);
    r[1].coef = r[0].coef;
    for (int i = 0; i < 2; i++) begin
      r[i].compute();
      r[i].encode();
    end
    start = 0; coef_valid = 0; coef_in = '0; m1ra = '0; m2ra = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    coef_valid = 1;
    for (int row = 0; row < DIM; row++)
      for (int col = 0; col < DIM; col++) begin
        coef_in = coef_t'(r[0].coef[row][col]);
        @(negedge clk);
      end
    coef_valid = 0;
    wait (done == 2'b11);
    @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      int nu;
      nu = i + 2;
      $display("NU=%0d: %0d planes, %0d coding cycles (%0d per plane, issue bound %0d), %0d + %0d words",
               nu, r[i].nmax + 1, cyc[i], cyc[i] / (r[i].nmax + 1), (4096 + nu - 1) / nu, m1c[i], m2c[i]);
      check(!trunc[i] && nmax[i] == plane_t'(r[i].nmax), "frame state");
      check(cyc[i] >= 32'((r[i].nmax + 1) * ((4096 + nu - 1) / nu)), "issue-cycle bound");
    end
    check(cyc[1] < cyc[0], "three units faster than two");
    for (int i = 0; i < 2; i++) begin
      for (int a = 0; a < int'(m1c[i]); a++) begin
        bit ok;
        logic [15:0] w;
        m1ra = 13'(a);
        @(negedge clk);
        w = r[i].next_word(int'(m1d[i].tag.plane), int'(m1d[i].tag.unit), int'(m1d[i].tag.stream), ok);
        check(ok && w == m1d[i].data, $sformatf("NU=%0d mem1[%0d]", i + 2, a));
      end
      for (int a = 0; a < int'(m2c[i]); a++) begin
        bit ok;
        logic [15:0] w;
        m2ra = 13'(a);
        @(negedge clk);
        w = r[i].next_word(int'(m2d[i].tag.plane), int'(m2d[i].tag.unit), int'(m2d[i].tag.stream), ok);
        check(ok && w == m2d[i].data, $sformatf("NU=%0d mem2[%0d]", i + 2, a));
      end
      check(r[i].words_left() == 0, "words left over");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
