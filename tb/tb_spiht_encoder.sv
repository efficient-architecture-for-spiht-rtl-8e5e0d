// tb_spiht_encoder - end-to-end test of the SPIHT encoder on 16x16 images.
//
// Two encoders run the same frames: one with memories large enough for the
// whole stream, one whose Mem#1 holds only 48 words so that the frame is
// cut short. Each frame is a random wavelet-like image; the spiht_ref
// model encodes it independently and every word read back from Mem#1 and
// Mem#2 is compared, in the order the memory holds it, with the next word
// of the stream its tag names. At the end no expected word may be left.
// The truncated encoder must hold exactly the first 48 words of the full
// one and report truncated. The test also counts the mechanisms exercised
// (pipeline stalls, end-of-plane flushes of partial words, significant D and
// L sets, sign bits, truncation) and fails if one never happened, and checks
// the number of coding cycles against the issue-cycle lower bound.
`timescale 1ns/1ps
module tb_spiht_encoder;
  import spiht_pkg::*;
  import spiht_ref_pkg::*;

  localparam int DIM = 16;
  localparam int NU  = 3;
  localparam int M1S = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, coef_valid;
  coef_t coef_in;
  logic rdy_a, rdy_b, busy_a, busy_b, done_a, done_b, trunc_a, trunc_b;
  plane_t nmax_a, nmax_b;
  mag_t mx_a, mx_b;
  logic [13:0] m1c_a, m2c_a;
  logic [6:0] m1c_b;
  logic [13:0] m2c_b;
  logic [12:0] m1ra_a, m2ra_a, m2ra_b;
  logic [5:0] m1ra_b;
  mem_word_t m1d_a, m2d_a, m1d_b, m2d_b;
  logic [31:0] cyc_a, cyc_b;

  spiht_encoder #(.IMG_DIM(DIM), .NU(NU)) dut (
    .clk, .rst_n, .start, .coef_valid, .coef_ready(rdy_a), .coef_in,
    .busy(busy_a), .done(done_a), .truncated(trunc_a), .n_max(nmax_a), .max_mag(mx_a),
    .mem1_count(m1c_a), .mem2_count(m2c_a), .mem1_raddr(m1ra_a), .mem1_rdata(m1d_a),
    .mem2_raddr(m2ra_a), .mem2_rdata(m2d_a), .code_cycles(cyc_a)
  );
  spiht_encoder #(.IMG_DIM(DIM), .NU(NU), .MEM1_DEPTH(M1S)) dut_small (
    .clk, .rst_n, .start, .coef_valid, .coef_ready(rdy_b), .coef_in,
    .busy(busy_b), .done(done_b), .truncated(trunc_b), .n_max(nmax_b), .max_mag(mx_b),
    .mem1_count(m1c_b), .mem2_count(m2c_b), .mem1_raddr(m1ra_b), .mem1_rdata(m1d_b),
    .mem2_raddr(m2ra_b), .mem2_rdata(m2d_b), .code_cycles(cyc_b)
  );

  int checks = 0, failures = 0;
  int n_stall = 0, n_partial_flush = 0, n_trunc = 0, n_lsig = 0, n_dsig = 0, n_sign = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.stall && (|dut.u_valid)) n_stall++;
    if (dut.flush && ((|(dut.lip_pop & dut.lip_wv)) || (|(dut.lis_pop & dut.lis_wv)) ||
                      (|(dut.lsp_pop & dut.lsp_wv)))) n_partial_flush++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(int top_bits);
    spiht_ref r;
    mem_word_t full_m1 [$];
    r = new(DIM, NU);
    r.gen(top_bits);
    r.compute();
    r.encode();
    n_lsig += r.n_lbits_sig;
    n_dsig += r.n_dbits_sig;
    n_sign += r.n_sign;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int row = 0; row < DIM; row++)
      for (int col = 0; col < DIM; col++) begin
        coef_valid = 1;
        coef_in = coef_t'(r.coef[row][col]);
        @(posedge clk);
        while (!rdy_a) @(posedge clk);
        @(negedge clk);
        coef_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    wait (done_a && done_b);
    @(negedge clk);
    check(mx_a == mag_t'(r.gmax), $sformatf("max magnitude %0d vs %0d", mx_a, r.gmax));
    check(nmax_a == plane_t'(r.nmax), "n_max");
    check(!trunc_a, "full-size memories must not truncate");
    // cycle count: at least one issue cycle per NU blocks per plane
    check(cyc_a >= 32'((r.nmax + 1) * ((DIM * DIM / 4 + NU - 1) / NU)), "code cycle lower bound");
    $display("frame: n_max=%0d mem1=%0d mem2=%0d words, %0d coding cycles (%0d planes)",
             nmax_a, m1c_a, m2c_a, cyc_a, r.nmax + 1);
    // Mem#1 then Mem#2, compared tag by tag
    for (int a = 0; a < int'(m1c_a); a++) begin
      bit ok;
      logic [15:0] w;
      m1ra_a = 13'(a);
      @(negedge clk);
      w = r.next_word(int'(m1d_a.tag.plane), int'(m1d_a.tag.unit), int'(m1d_a.tag.stream), ok);
      check(ok && m1d_a.tag.stream != STR_LSP, $sformatf("mem1[%0d] unexpected tag", a));
      check(w == m1d_a.data, $sformatf("mem1[%0d] data %h vs %h", a, m1d_a.data, w));
      full_m1.push_back(m1d_a);
    end
    for (int a = 0; a < int'(m2c_a); a++) begin
      bit ok;
      logic [15:0] w;
      m2ra_a = 13'(a);
      @(negedge clk);
      w = r.next_word(int'(m2d_a.tag.plane), int'(m2d_a.tag.unit), int'(m2d_a.tag.stream), ok);
      check(ok && m2d_a.tag.stream == STR_LSP, $sformatf("mem2[%0d] unexpected tag", a));
      check(w == m2d_a.data, $sformatf("mem2[%0d] data %h vs %h", a, m2d_a.data, w));
    end
    check(r.words_left() == 0, $sformatf("%0d expected words never written", r.words_left()));
    // the small encoder
    if (full_m1.size() > M1S) begin
      check(trunc_b, "small Mem#1 must truncate");
      check(int'(m1c_b) == M1S, "small Mem#1 count");
      if (trunc_b) n_trunc++;
      for (int a = 0; a < M1S; a++) begin
        m1ra_b = 6'(a);
        @(negedge clk);
        check(m1d_b == full_m1[a], $sformatf("truncated mem1[%0d]", a));
      end
    end else begin
      check(!trunc_b, "small Mem#1 must not truncate");
    end
  endtask

  initial begin
    start = 0;
    coef_valid = 0;
    coef_in = '0;
    m1ra_a = '0; m2ra_a = '0; m1ra_b = '0; m2ra_b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(11);
    run_frame(7);
    run_frame(13);
    run_frame(3);
    $display("mechanisms: stalls=%0d partial_flushes=%0d truncations=%0d D_sig=%0d L_sig=%0d signs=%0d",
             n_stall, n_partial_flush, n_trunc, n_dsig, n_lsig, n_sign);
    check(n_stall > 0, "no stall happened");
    check(n_partial_flush > 0, "no partial-word flush happened");
    check(n_trunc > 0, "no truncation happened");
    check(n_dsig > 0 && n_lsig > 0 && n_sign > 0, "set expansions not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
