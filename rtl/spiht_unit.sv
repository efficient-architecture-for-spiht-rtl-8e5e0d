// spiht_unit - one fixed-order SPIHT coding unit.
//
// Codes one 2x2 block of coefficients (the offspring 4p..4p+3 of node p)
// for one bit plane n per cycle, and emits the block's contribution to the
// three SPIHT streams of that bit plane:
//   LIP: for each coefficient in the list of insignificant pixels, its
//        significance S_n and, if significant, its sign (1 = negative);
//   LIS: for each node in the list of insignificant sets, S_n of its
//        D set and, once that is significant, S_n of its L set;
//   LSP: for each coefficient significant in an earlier plane, bit n of
//        its magnitude (refinement).
// Because the refinement pass comes first in every plane, "earlier plane"
// means |c| >= 2^(n+1) and no per-entry "just added" flag is needed.
//
// List membership is not stored: in fixed order it follows from the tree
// maxima. A coefficient is in LIP/LSP once the D set of its parent became
// significant (md(p) >= 2^n) or always for the roots; a node's D set is in
// the LIS once the L set of its parent became significant (ml(p) >= 2^n)
// or always for the roots; its L set once its own D set is significant.
// Bits are packed LSB first in the order coefficient/node 0..3 of the block.
//
// Timing: combinational coding followed by an output register (the shift
// register stage in front of the variable FIFOs) that loads when adv is
// high, so a block presented in cycle t appears at the outputs in cycle t+1.
// The coding rules and the exchanged pass order follow the design
// description; the bit order inside a block and the derivation of list
// membership from the maxima are this design's choices.
module spiht_unit
  import spiht_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adv,
  input  logic               in_valid,
  input  blk_t               blk,
  input  plane_t             plane,
  output logic               out_valid,
  output logic [LIP_MAX-1:0] lip_bits,
  output logic [3:0]         lip_len,
  output logic [LIS_MAX-1:0] lis_bits,
  output logic [3:0]         lis_len,
  output logic [LSP_MAX-1:0] lsp_bits,
  output logic [2:0]         lsp_len
);

  // significant in this plane / already significant before it
  function automatic logic sig_now(mag_t m, plane_t n);
    return (m >> n) != '0;
  endfunction
  function automatic logic sig_before(mag_t m, plane_t n);
    return (m >> ({1'b0, n} + 5'd1)) != '0;
  endfunction

  logic [LIP_MAX-1:0] lip_c;
  logic [LIS_MAX-1:0] lis_c;
  logic [LSP_MAX-1:0] lsp_c;
  logic [3:0]         lip_n, lis_n;
  logic [2:0]         lsp_n;

  always_comb begin
    logic coef_vis, set_vis;
    lip_c = '0;  lis_c = '0;  lsp_c = '0;
    lip_n = '0;  lis_n = '0;  lsp_n = '0;
    coef_vis = blk.root || sig_now(blk.par_md, plane);
    set_vis  = blk.root || sig_now(blk.par_ml, plane);
    for (int k = 0; k < 4; k++) begin
      mag_t m;
      m = magnitude(blk.coef[k]);
      if (coef_vis) begin
        if (sig_before(m, plane)) begin
          lsp_c[lsp_n[1:0]] = m[plane];
          lsp_n = lsp_n + 1'b1;
        end else begin
          lip_c[lip_n[2:0]] = sig_now(m, plane);
          lip_n = lip_n + 1'b1;
          if (sig_now(m, plane)) begin
            lip_c[lip_n[2:0]] = blk.coef[k][COEF_W-1];
            lip_n = lip_n + 1'b1;
          end
        end
      end
    end
    for (int k = 0; k < 4; k++) begin
      if (set_vis && blk.has_d[k]) begin
        if (!sig_before(blk.md[k], plane)) begin
          lis_c[lis_n[2:0]] = sig_now(blk.md[k], plane);
          lis_n = lis_n + 1'b1;
        end
        if (blk.has_l[k] && sig_now(blk.md[k], plane) && !sig_before(blk.ml[k], plane)) begin
          lis_c[lis_n[2:0]] = sig_now(blk.ml[k], plane);
          lis_n = lis_n + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      lip_bits  <= '0;
      lip_len   <= '0;
      lis_bits  <= '0;
      lis_len   <= '0;
      lsp_bits  <= '0;
      lsp_len   <= '0;
    end else if (adv) begin
      out_valid <= in_valid;
      lip_bits  <= in_valid ? lip_c : '0;
      lip_len   <= in_valid ? lip_n : '0;
      lis_bits  <= in_valid ? lis_c : '0;
      lis_len   <= in_valid ? lis_n : '0;
      lsp_bits  <= in_valid ? lsp_c : '0;
      lsp_len   <= in_valid ? lsp_n : '0;
    end
  end

endmodule
