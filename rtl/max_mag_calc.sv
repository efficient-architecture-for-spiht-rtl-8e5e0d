// max_mag_calc - maximum magnitude calculator.
//
// Walks the spatial orientation trees bottom-up and stores, for every node
// that has offspring, the largest coefficient magnitude among all its
// descendants (md, the D set) and among its descendants below the children
// (ml, the L set). It also finds the largest magnitude in the whole image
// and from it the first bit plane n_max = floor(log2(max |c|)).
//
// How it works: in the 1-D coefficient order the offspring of node a are
// 4a..4a+3, one group of the coefficient memory, and their own md values
// are one group of the tree memory. Nodes are visited from N/4-1 down to 1,
// so a node's offspring are always finished before the node itself:
//   md(a) = max over offspring k of max(|c_k|, md(k))
//   ml(a) = max over offspring k of md(k)
// (md(k) counting as 0 for a leaf k). Node 0 is the top-left root, which
// has no offspring; its group (nodes 0..3, the roots) gives the image
// maximum. One node is issued per cycle, the memories answer one cycle
// later, so a frame takes N/4 + 3 cycles. One idle cycle before node 0
// lets the write of node 1 land before group 0 is read.
//
// Interface: pulse start; done pulses when gmax, n_max and all tree
// entries are valid. Read ports are group addresses (see spiht_ram). The
// function (maxima of the trees, the image maximum and the threshold) is
// from the design description; the bottom-up reverse 1-D visiting order
// is this design's choice.
module max_mag_calc
  import spiht_pkg::*;
#(
  parameter int IMG_DIM = 128,
  localparam int N      = IMG_DIM * IMG_DIM,
  localparam int NN     = N / 4,           // nodes that may have offspring
  localparam int NL     = N / 16,          // nodes that may have grandchildren
  localparam int NAW    = $clog2(NN),      // node address / coefficient group
  localparam int TGW    = $clog2(NL)       // tree-memory group address
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            coef_re,
  output logic [NAW-1:0]  coef_raddr,
  input  coef_t [3:0]     coef_rdata,
  output logic            tree_re,
  output logic [TGW-1:0]  tree_raddr,
  input  tree_t [3:0]     tree_rdata,
  output logic            tree_we,
  output logic [NAW-1:0]  tree_waddr,
  output tree_t           tree_wdata,
  output logic            busy,
  output logic            done,
  output mag_t            gmax,
  output plane_t          n_max
);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_GAP, S_ROOT, S_LAST} state_e;
  state_e         state;
  logic [NAW-1:0] a;       // node being issued
  logic           v2;      // stage 2 holds a node
  logic [NAW-1:0] a2;

  logic issue;
  assign issue      = (state == S_RUN) || (state == S_ROOT);
  assign coef_re    = issue;
  assign coef_raddr = a;
  assign tree_re    = issue;
  assign tree_raddr = (a < NAW'(NL)) ? TGW'(a) : '0;
  assign busy       = (state != S_IDLE);

  // stage 2: combine the four offspring
  mag_t md_c, ml_c;
  always_comb begin
    md_c = '0;
    ml_c = '0;
    for (int k = 0; k < 4; k++) begin
      mag_t ck, dk;
      ck = magnitude(coef_rdata[k]);
      // offspring k of node a2 is node 4*a2+k; it has offspring itself
      // when it lies below N/4 and is not the root 0
      dk = ((a2 < NAW'(NL)) && !(a2 == '0 && k == 0)) ? tree_rdata[k].md : '0;
      if (ck > md_c) md_c = ck;
      if (dk > md_c) md_c = dk;
      if (dk > ml_c) ml_c = dk;
    end
  end

  assign tree_we    = v2 && (a2 != '0);
  assign tree_waddr = a2;
  assign tree_wdata = '{md: md_c, ml: ml_c};

  always_comb begin
    n_max = '0;
    for (int b = 0; b < COEF_W; b++)
      if (gmax[b]) n_max = plane_t'(b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a     <= '0;
      v2    <= 1'b0;
      a2    <= '0;
      gmax  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      v2   <= issue;
      a2   <= a;
      if (v2 && a2 == '0) gmax <= md_c;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          a     <= NAW'(NN - 1);
        end
        S_RUN: begin
          if (a == NAW'(1)) state <= S_GAP;
          else              a     <= a - 1'b1;
        end
        S_GAP: begin
          state <= S_ROOT;
          a     <= '0;
        end
        S_ROOT: state <= S_LAST;
        S_LAST: if (v2) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
