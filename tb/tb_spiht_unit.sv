// tb_spiht_unit - self-checking test of one SPIHT coding unit.
//
// Random 2x2 blocks (magnitudes clustered around the plane threshold so
// that every case occurs) are coded at random bit planes. The expected
// LIP, LIS and LSP bits are built in bit queues from the list rules:
// a coefficient is listed when its block is the root block or the parent's
// D set has reached the threshold; refinement if |c| >= 2T, else S_n and a
// sign; a node's D set is listed when the block is the root block or the
// parent's L set has reached T; it sends S_n(D) until significant, then
// S_n(L) until that is significant. Outputs must appear one cycle after
// the block and hold while adv is low.
`timescale 1ns/1ps
module tb_spiht_unit;
  import spiht_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic adv, in_valid, out_valid;
  blk_t blk;
  plane_t plane;
  logic [7:0] lip_bits, lis_bits;
  logic [3:0] lip_len, lis_len, lsp_bits;
  logic [2:0] lsp_len;

  spiht_unit dut (.*);

  int checks = 0, failures = 0;
  int n_lip = 0, n_lis = 0, n_lsp = 0, n_l = 0;

  function automatic mag_t rmag(int n);
    int t, r;
    t = 1 << n;
    r = $urandom_range(0, 5);
    case (r)
      0: return '0;
      1: return mag_t'($urandom_range(0, t - 1));
      2: return mag_t'(t + $urandom_range(0, t - 1));
      3: return mag_t'(2 * t + $urandom_range(0, 2 * t));
      4: return mag_t'(t);
      default: return mag_t'($urandom);
    endcase
  endfunction

  task automatic expect_bits(input blk_t b, input int n,
                             output bit lip[$], output bit lis[$], output bit lsp[$]);
    longint t;
    t = longint'(1) << n;
    lip = {}; lis = {}; lsp = {};
    for (int k = 0; k < 4; k++) begin
      longint m;
      m = b.coef[k] < 0 ? -longint'(b.coef[k]) : longint'(b.coef[k]);
      if (b.root || b.par_md >= t) begin
        if (m >= 2 * t) lsp.push_back(((m / t) % 2) == 1);
        else if (m >= t) begin lip.push_back(1); lip.push_back(b.coef[k] < 0); end
        else lip.push_back(0);
      end
    end
    for (int k = 0; k < 4; k++)
      if (b.has_d[k] && (b.root || b.par_ml >= t)) begin
        if (b.md[k] < 2 * t) lis.push_back(b.md[k] >= t);
        if (b.has_l[k] && b.md[k] >= t && b.ml[k] < 2 * t) lis.push_back(b.ml[k] >= t);
      end
  endtask

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
    adv = 1; in_valid = 0; blk = '0; plane = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      bit lip[$], lis[$], lsp[$];
      int n;
      n = $urandom_range(0, 15);
      plane = plane_t'(n);
      blk.root = $urandom_range(0, 7) == 0;
      for (int k = 0; k < 4; k++) begin
        mag_t m;
        m = rmag(n);
        blk.coef[k] = $urandom_range(0, 1) ? coef_t'(m) : -coef_t'(m);
        blk.md[k] = rmag(n);
        blk.ml[k] = rmag(n);
        blk.has_d[k] = $urandom_range(0, 3) != 0;
        blk.has_l[k] = blk.has_d[k] && ($urandom_range(0, 2) != 0);
      end
      blk.par_md = rmag(n);
      blk.par_ml = rmag(n);
      in_valid = 1;
      expect_bits(blk, n, lip, lis, lsp);
      @(negedge clk);
      in_valid = 0;
      // hold for a random number of stalled cycles
      adv = 0;
      blk = blk_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                    $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      repeat ($urandom_range(0, 2)) @(negedge clk);
      check(out_valid, "out_valid");
      check(int'(lip_len) == lip.size(), $sformatf("lip_len %0d vs %0d", lip_len, lip.size()));
      check(int'(lis_len) == lis.size(), $sformatf("lis_len %0d vs %0d", lis_len, lis.size()));
      check(int'(lsp_len) == lsp.size(), $sformatf("lsp_len %0d vs %0d", lsp_len, lsp.size()));
      foreach (lip[i]) check(lip_bits[i] == lip[i], "lip bit");
      foreach (lis[i]) check(lis_bits[i] == lis[i], "lis bit");
      foreach (lsp[i]) check(lsp_bits[i] == lsp[i], "lsp bit");
      n_lip += lip.size(); n_lis += lis.size(); n_lsp += lsp.size();
      adv = 1;
    end
    @(negedge clk);
    check(!out_valid, "no output without input");
    $display("bits checked: LIP %0d LIS %0d LSP %0d", n_lip, n_lis, n_lsp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
