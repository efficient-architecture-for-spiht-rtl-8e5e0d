// spiht_encoder - fixed-order parallel SPIHT image encoder.
//
// Encodes the wavelet coefficients of one IMG_DIM x IMG_DIM image into an
// embedded SPIHT bit stream without dynamic lists. The frame runs in phases:
//   LOAD  coefficients arrive in raster order; coef_addr_gen stores them in
//         1-D order, where a node's four offspring are one memory group;
//   MAXC  max_mag_calc writes the D-set and L-set maxima of every node and
//         finds the first bit plane n_max;
//   SCAN  for each bit plane n = n_max .. 0, all N/4 2x2 blocks are visited
//         in fixed 1-D order, NU blocks per cycle, one per coding unit
//         (block p goes to unit p mod NU). Each unit emits its LIP, LIS and
//         LSP bits for that block and plane into three variable FIFOs;
//   FLUSH at the end of a plane the FIFOs' partial words are written out,
//         then the next plane starts.
// The scheduler writes LIP/LIS words to Mem#1 and LSP words to Mem#2 and
// stalls the pipeline while a FIFO is full. If a memory fills up, the frame
// ends early with truncated set.
//
// Pipeline of the scan (all stages advance together when not stalled):
// cycle t issues memory reads for blocks g*NU .. g*NU+NU-1, t+1 codes them
// in the units, t+2 pushes the bits into the FIFOs. A plane takes
// ceil(N/4 / NU) issue cycles plus 2 drain cycles plus the flush, plus one
// cycle per stall.
//
// Interface: pulse start, then stream IMG_DIM*IMG_DIM coefficients
// (coef_valid/coef_ready). busy is high until done; done stays high until
// the next start. mem1_count / mem2_count words are then valid in the two
// memories, readable through the synchronous read ports (data one cycle
// after the address). code_cycles counts the cycles of the SCAN and FLUSH
// phases. The block structure (address generator, maximum magnitude
// calculator, parallel SPIHT units, variable FIFOs, scheduler, Mem#1 and
// Mem#2) follows the design description; the phase sequence, the per-plane
// flush and the early end on a full memory are this design's choices.
module spiht_encoder
  import spiht_pkg::*;
#(
  parameter int IMG_DIM    = 128,
  parameter int NU         = 3,
  parameter int FIFO_BITS  = 24,                  // LIP and LIS FIFOs
  parameter int LSP_FIFO_BITS = 20,               // LSP FIFOs
  parameter int MEM1_DEPTH = 8192,
  parameter int MEM2_DEPTH = 8192,
  localparam int N         = IMG_DIM * IMG_DIM,
  localparam int NB        = N / 4,               // 2x2 blocks (= nodes that may have offspring)
  localparam int NL        = N / 16,              // tree-memory groups
  localparam int NAW       = $clog2(NB),
  localparam int TGW       = $clog2(NL),
  localparam int NG        = (NB + NU - 1) / NU,  // issue cycles per plane
  localparam int GW        = $clog2(NG + 1),
  localparam int A1W       = $clog2(MEM1_DEPTH),
  localparam int A2W       = $clog2(MEM2_DEPTH),
  localparam int C1W       = $clog2(MEM1_DEPTH + 1),
  localparam int C2W       = $clog2(MEM2_DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            coef_valid,
  output logic            coef_ready,
  input  coef_t           coef_in,
  output logic            busy,
  output logic            done,
  output logic            truncated,
  output plane_t          n_max,
  output mag_t            max_mag,
  output logic [C1W-1:0]  mem1_count,
  output logic [C2W-1:0]  mem2_count,
  input  logic [A1W-1:0]  mem1_raddr,
  output mem_word_t       mem1_rdata,
  input  logic [A2W-1:0]  mem2_raddr,
  output mem_word_t       mem2_rdata,
  output logic [31:0]     code_cycles
);

  typedef enum logic [2:0] {T_IDLE, T_LOAD, T_MAXC, T_SCAN, T_DRAIN, T_FLUSH, T_DONE} state_e;
  state_e state;
  plane_t plane;
  logic [GW-1:0] g;

  logic clear;   // start of a frame: empty the FIFOs, reset the memory counters
  assign clear = start && (state == T_IDLE || state == T_DONE);

  // ---------------------------------------------------------------- load
  logic            ld_we, ld_done;
  logic [NAW+1:0]  ld_waddr;
  coef_t           ld_wdata;

  coef_addr_gen #(.IMG_DIM(IMG_DIM)) u_addr_gen (
    .clk, .rst_n,
    .start    (clear),
    .in_valid (coef_valid),
    .in_ready (coef_ready),
    .in_coef  (coef_in),
    .we       (ld_we),
    .waddr    (ld_waddr),
    .wdata    (ld_wdata),
    .done     (ld_done)
  );

  // ------------------------------------------------------------ memories
  logic [NU-1:0]                 c_re;
  logic [NU-1:0][NAW-1:0]        c_raddr;
  logic [NU-1:0][3:0][COEF_W-1:0] c_rdata;
  logic [2*NU-1:0]               t_re;
  logic [2*NU-1:0][TGW-1:0]      t_raddr;
  logic [2*NU-1:0][3:0][2*COEF_W-1:0] t_rdata;
  logic                          t_we;
  logic [NAW-1:0]                t_waddr;
  tree_t                         t_wdata;

  spiht_ram #(.W(COEF_W), .DEPTH(N), .GROUP(4), .NRD(NU)) u_coef_mem (
    .clk, .we(ld_we), .waddr(ld_waddr), .wdata(ld_wdata),
    .re(c_re), .raddr(c_raddr), .rdata(c_rdata)
  );

  spiht_ram #(.W(2*COEF_W), .DEPTH(NB), .GROUP(4), .NRD(2*NU)) u_tree_mem (
    .clk, .we(t_we), .waddr(t_waddr), .wdata(t_wdata),
    .re(t_re), .raddr(t_raddr), .rdata(t_rdata)
  );

  // ------------------------------------------------ max magnitude calculator
  logic           mm_start, mm_done, mm_busy;
  logic           mm_cre, mm_tre;
  logic [NAW-1:0] mm_caddr;
  logic [TGW-1:0] mm_taddr;
  coef_t [3:0]    mm_cdata;
  tree_t [3:0]    mm_tdata;

  assign mm_start = ld_done;
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      mm_cdata[k] = coef_t'(c_rdata[0][k]);
      mm_tdata[k] = tree_t'(t_rdata[0][k]);
    end
  end

  max_mag_calc #(.IMG_DIM(IMG_DIM)) u_max_mag (
    .clk, .rst_n,
    .start      (mm_start),
    .coef_re    (mm_cre),
    .coef_raddr (mm_caddr),
    .coef_rdata (mm_cdata),
    .tree_re    (mm_tre),
    .tree_raddr (mm_taddr),
    .tree_rdata (mm_tdata),
    .tree_we    (t_we),
    .tree_waddr (t_waddr),
    .tree_wdata (t_wdata),
    .busy       (mm_busy),
    .done       (mm_done),
    .gmax       (max_mag),
    .n_max      (n_max)
  );

  // --------------------------------------------------------- scan / fetch
  logic stall, adv, issue, overflow;
  logic [NU-1:0]           vB;
  logic [NU-1:0][NAW-1:0]  pB;

  assign adv   = !stall;
  assign issue = (state == T_SCAN) && adv;

  always_comb begin
    for (int u = 0; u < NU; u++) begin
      logic [NAW+1:0] p;
      p = (NAW+2)'(g) * (NAW+2)'(NU) + (NAW+2)'(u);
      if (p >= (NAW+2)'(NB)) p = '0;
      c_re[u]          = issue;
      c_raddr[u]       = NAW'(p);
      t_re[2*u]        = issue;
      t_raddr[2*u]     = (p < (NAW+2)'(NL)) ? TGW'(p) : '0;   // the block's own nodes
      t_re[2*u+1]      = issue;
      t_raddr[2*u+1]   = TGW'(p >> 2);                        // the parent node
    end
    if (state == T_MAXC) begin
      c_re[0]    = mm_cre;
      c_raddr[0] = mm_caddr;
      t_re[0]    = mm_tre;
      t_raddr[0] = mm_taddr;
    end
  end

  blk_t [NU-1:0] blk;
  always_comb begin
    for (int u = 0; u < NU; u++) begin
      tree_t par;
      blk[u].root = (pB[u] == '0);
      for (int k = 0; k < 4; k++) begin
        logic [NAW+1:0] node;
        tree_t ti;
        node = {pB[u], 2'(k)};
        ti   = tree_t'(t_rdata[2*u][k]);
        blk[u].coef[k]  = coef_t'(c_rdata[u][k]);
        blk[u].has_d[k] = (node < (NAW+2)'(NB)) && (node != '0);
        blk[u].has_l[k] = (node < (NAW+2)'(NL)) && (node != '0);
        blk[u].md[k]    = blk[u].has_d[k] ? ti.md : '0;
        blk[u].ml[k]    = blk[u].has_l[k] ? ti.ml : '0;
      end
      par = tree_t'(t_rdata[2*u+1][pB[u][1:0]]);
      blk[u].par_md = par.md;
      blk[u].par_ml = par.ml;
    end
  end

  // ----------------------------------------------- coding units and FIFOs
  logic [NU-1:0]                u_valid;
  logic [NU-1:0][LIP_MAX-1:0]   lip_bits;
  logic [NU-1:0][3:0]           lip_len;
  logic [NU-1:0][LIS_MAX-1:0]   lis_bits;
  logic [NU-1:0][3:0]           lis_len;
  logic [NU-1:0][LSP_MAX-1:0]   lsp_bits;
  logic [NU-1:0][2:0]           lsp_len;

  logic [NU-1:0]               lip_wv, lis_wv, lsp_wv;
  logic [NU-1:0][WORD_W-1:0]   lip_w, lis_w, lsp_w;
  logic [NU-1:0]               lip_full, lis_full, lsp_full;
  logic [NU-1:0]               lip_pop, lis_pop, lsp_pop;
  logic [NU-1:0]               lip_empty, lis_empty, lsp_empty;
  logic                        flush, all_empty, push;

  assign flush     = (state == T_FLUSH);
  // bits of a frame cut short by a full memory are dropped, not pushed
  // into the next frame
  assign push      = adv && (state == T_SCAN || state == T_DRAIN);
  assign all_empty = (&lip_empty) && (&lis_empty) && (&lsp_empty);

  logic [NU-1:0] push_u;
  assign push_u = u_valid & {NU{push}};

  for (genvar u = 0; u < NU; u++) begin : g_unit
    spiht_unit u_unit (
      .clk, .rst_n, .adv,
      .in_valid  (vB[u]),
      .blk       (blk[u]),
      .plane     (plane),
      .out_valid (u_valid[u]),
      .lip_bits  (lip_bits[u]), .lip_len(lip_len[u]),
      .lis_bits  (lis_bits[u]), .lis_len(lis_len[u]),
      .lsp_bits  (lsp_bits[u]), .lsp_len(lsp_len[u])
    );

    var_fifo #(.IN_MAX(LIP_MAX), .WORD_W(WORD_W), .FIFO_BITS(FIFO_BITS)) u_lip_fifo (
      .clk, .rst_n, .clear,
      .push (push_u[u]), .in_bits(lip_bits[u]), .in_len(lip_len[u]),
      .flush, .word_valid(lip_wv[u]), .word(lip_w[u]), .pop(lip_pop[u]),
      .full(lip_full[u]), .empty(lip_empty[u])
    );
    var_fifo #(.IN_MAX(LIS_MAX), .WORD_W(WORD_W), .FIFO_BITS(FIFO_BITS)) u_lis_fifo (
      .clk, .rst_n, .clear,
      .push (push_u[u]), .in_bits(lis_bits[u]), .in_len(lis_len[u]),
      .flush, .word_valid(lis_wv[u]), .word(lis_w[u]), .pop(lis_pop[u]),
      .full(lis_full[u]), .empty(lis_empty[u])
    );
    var_fifo #(.IN_MAX(LSP_MAX), .WORD_W(WORD_W), .FIFO_BITS(LSP_FIFO_BITS)) u_lsp_fifo (
      .clk, .rst_n, .clear,
      .push (push_u[u]), .in_bits(lsp_bits[u]), .in_len(lsp_len[u]),
      .flush, .word_valid(lsp_wv[u]), .word(lsp_w[u]), .pop(lsp_pop[u]),
      .full(lsp_full[u]), .empty(lsp_empty[u])
    );
  end

  // ------------------------------------------------ scheduler and Mem#1/#2
  logic            m1_we, m2_we;
  logic [A1W-1:0]  m1_waddr;
  logic [A2W-1:0]  m2_waddr;
  mem_word_t       m1_wdata, m2_wdata;
  logic [0:0][0:0][$bits(mem_word_t)-1:0] m1_rd, m2_rd;

  fifo_scheduler #(.NU(NU), .MEM1_DEPTH(MEM1_DEPTH), .MEM2_DEPTH(MEM2_DEPTH)) u_sched (
    .clk, .rst_n, .clear, .plane,
    .lip_valid(lip_wv), .lip_word(lip_w), .lip_full(lip_full), .lip_pop(lip_pop),
    .lis_valid(lis_wv), .lis_word(lis_w), .lis_full(lis_full), .lis_pop(lis_pop),
    .lsp_valid(lsp_wv), .lsp_word(lsp_w), .lsp_full(lsp_full), .lsp_pop(lsp_pop),
    .stall,
    .mem1_we(m1_we), .mem1_waddr(m1_waddr), .mem1_wdata(m1_wdata),
    .mem2_we(m2_we), .mem2_waddr(m2_waddr), .mem2_wdata(m2_wdata),
    .mem1_count, .mem2_count, .overflow
  );

  spiht_ram #(.W($bits(mem_word_t)), .DEPTH(MEM1_DEPTH), .GROUP(1), .NRD(1)) u_mem1 (
    .clk, .we(m1_we), .waddr(m1_waddr), .wdata(m1_wdata),
    .re(1'b1), .raddr(mem1_raddr), .rdata(m1_rd)
  );
  spiht_ram #(.W($bits(mem_word_t)), .DEPTH(MEM2_DEPTH), .GROUP(1), .NRD(1)) u_mem2 (
    .clk, .we(m2_we), .waddr(m2_waddr), .wdata(m2_wdata),
    .re(1'b1), .raddr(mem2_raddr), .rdata(m2_rd)
  );
  assign mem1_rdata = mem_word_t'(m1_rd[0][0]);
  assign mem2_rdata = mem_word_t'(m2_rd[0][0]);

  // ---------------------------------------------------------- sequencing
  assign busy = (state != T_IDLE) && (state != T_DONE);
  assign done = (state == T_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= T_IDLE;
      plane       <= '0;
      g           <= '0;
      vB          <= '0;
      pB          <= '0;
      truncated   <= 1'b0;
      code_cycles <= '0;
    end else begin
      if (adv) begin
        for (int u = 0; u < NU; u++) begin
          vB[u] <= issue && ((int'(g) * NU + u) < NB);
          pB[u] <= c_raddr[u];
        end
      end
      if (state == T_SCAN || state == T_DRAIN || state == T_FLUSH)
        code_cycles <= code_cycles + 1'b1;
      unique case (state)
        T_IDLE, T_DONE: if (start) begin
          state       <= T_LOAD;
          truncated   <= 1'b0;
          code_cycles <= '0;
        end
        T_LOAD: if (ld_done) state <= T_MAXC;
        T_MAXC: if (mm_done) begin
          plane <= n_max;
          g     <= '0;
          state <= (max_mag == '0) ? T_DONE : T_SCAN;
        end
        T_SCAN: begin
          if (issue) begin
            if (g == GW'(NG - 1)) state <= T_DRAIN;
            else                  g     <= g + 1'b1;
          end
        end
        T_DRAIN: if (adv && vB == '0 && u_valid == '0) state <= T_FLUSH;
        T_FLUSH: if (all_empty) begin
          if (plane == '0) state <= T_DONE;
          else begin
            plane <= plane - 1'b1;
            g     <= '0;
            state <= T_SCAN;
          end
        end
        default: state <= T_IDLE;
      endcase
      if (overflow && (state == T_SCAN || state == T_DRAIN || state == T_FLUSH)) begin
        state     <= T_DONE;
        truncated <= 1'b1;
      end
    end
  end

  initial assert (NU >= 1 && NU <= 4 && IMG_DIM >= 8)
    else $error("unsupported parameters");

endmodule
