// fifo_scheduler - control unit that selects and reads the variable FIFOs.
//
// Each of the NU coding units feeds three variable FIFOs (LIP, LIS, LSP).
// Every cycle the scheduler moves at most one finished 16-bit word into
// each output memory:
//   Mem#1 takes the LIP and LIS words of all units (2*NU requesters),
//   Mem#2 takes the LSP (refinement) words (NU requesters).
// A round-robin pointer per memory picks among the FIFOs holding a word,
// starting after the last one served. The write addresses come from two
// counters (the LIS/LIP and LSP address generators) that step by one per
// word written; clear resets them at the start of a frame. Each word is
// stored with a tag (plane, unit, stream).
//
// The scheduler also stalls the coding pipeline while any FIFO is full.
// When a memory is full and a word is waiting for it, overflow is raised
// (sticky until clear) and the encoder ends the frame there: the embedded
// bit stream is simply cut, which is how the rate is limited.
//
// Timing: pops and memory writes are combinational from the FIFOs' word
// flags; the counters and the round-robin pointers are registered.
// Mem#1 for LIS/LIP words, Mem#2 for LSP words, the two address generators
// and the stall follow the description; round-robin order, tags and the
// memory depths are this design's choices.
module fifo_scheduler
  import spiht_pkg::*;
#(
  parameter int NU         = 3,
  parameter int MEM1_DEPTH = 8192,
  parameter int MEM2_DEPTH = 8192,
  localparam int A1W       = $clog2(MEM1_DEPTH),
  localparam int A2W       = $clog2(MEM2_DEPTH),
  localparam int C1W       = $clog2(MEM1_DEPTH + 1),
  localparam int C2W       = $clog2(MEM2_DEPTH + 1),
  localparam int R1        = 2 * NU,
  localparam int P1W       = $clog2(R1),
  localparam int P2W       = (NU > 1) ? $clog2(NU) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  plane_t                     plane,
  input  logic [NU-1:0]              lip_valid,
  input  logic [NU-1:0][WORD_W-1:0]  lip_word,
  input  logic [NU-1:0]              lip_full,
  output logic [NU-1:0]              lip_pop,
  input  logic [NU-1:0]              lis_valid,
  input  logic [NU-1:0][WORD_W-1:0]  lis_word,
  input  logic [NU-1:0]              lis_full,
  output logic [NU-1:0]              lis_pop,
  input  logic [NU-1:0]              lsp_valid,
  input  logic [NU-1:0][WORD_W-1:0]  lsp_word,
  input  logic [NU-1:0]              lsp_full,
  output logic [NU-1:0]              lsp_pop,
  output logic                       stall,
  output logic                       mem1_we,
  output logic [A1W-1:0]             mem1_waddr,
  output mem_word_t                  mem1_wdata,
  output logic                       mem2_we,
  output logic [A2W-1:0]             mem2_waddr,
  output mem_word_t                  mem2_wdata,
  output logic [C1W-1:0]             mem1_count,
  output logic [C2W-1:0]             mem2_count,
  output logic                       overflow
);

  logic [P1W-1:0] rr1;
  logic [P2W-1:0] rr2;
  logic           full1, full2;
  logic [R1-1:0]  req1;
  logic           gnt1_v, gnt2_v;
  logic [P1W-1:0] gnt1;
  logic [P2W-1:0] gnt2;
  logic [P2W-1:0] gnt1_u;   // unit of the Mem#1 grant

  assign gnt1_u = P2W'(gnt1 >> 1);

  assign stall = (|lip_full) || (|lis_full) || (|lsp_full);
  assign full1 = (mem1_count == C1W'(MEM1_DEPTH));
  assign full2 = (mem2_count == C2W'(MEM2_DEPTH));

  // requester 2u is LIP of unit u, 2u+1 is LIS of unit u
  always_comb begin
    for (int u = 0; u < NU; u++) begin
      req1[2*u]   = lip_valid[u];
      req1[2*u+1] = lis_valid[u];
    end
  end

  // round robin: first requester at or after the pointer
  always_comb begin
    gnt1_v = 1'b0;
    gnt1   = '0;
    for (int i = R1 - 1; i >= 0; i--) begin
      logic [P1W:0] idx;
      idx = (P1W+1)'((int'(rr1) + i) % R1);
      if (req1[idx[P1W-1:0]]) begin
        gnt1_v = 1'b1;
        gnt1   = idx[P1W-1:0];
      end
    end
    gnt2_v = 1'b0;
    gnt2   = '0;
    for (int i = NU - 1; i >= 0; i--) begin
      logic [P2W:0] idx;
      idx = (P2W+1)'((int'(rr2) + i) % NU);
      if (lsp_valid[idx[P2W-1:0]]) begin
        gnt2_v = 1'b1;
        gnt2   = idx[P2W-1:0];
      end
    end
  end

  always_comb begin
    lip_pop = '0;
    lis_pop = '0;
    lsp_pop = '0;
    mem1_we = gnt1_v && !full1;
    mem2_we = gnt2_v && !full2;
    if (mem1_we) begin
      if (gnt1[0]) lis_pop[gnt1_u] = 1'b1;
      else         lip_pop[gnt1_u] = 1'b1;
    end
    if (mem2_we) lsp_pop[gnt2] = 1'b1;
    mem1_waddr = A1W'(mem1_count);
    mem2_waddr = A2W'(mem2_count);
    mem1_wdata.tag.plane  = plane;
    mem1_wdata.tag.unit   = UNIT_W'(gnt1_u);
    mem1_wdata.tag.stream = gnt1[0] ? STR_LIS : STR_LIP;
    mem1_wdata.data       = gnt1[0] ? lis_word[gnt1_u] : lip_word[gnt1_u];
    mem2_wdata.tag.plane  = plane;
    mem2_wdata.tag.unit   = UNIT_W'(gnt2);
    mem2_wdata.tag.stream = STR_LSP;
    mem2_wdata.data       = lsp_word[gnt2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr1        <= '0;
      rr2        <= '0;
      mem1_count <= '0;
      mem2_count <= '0;
      overflow   <= 1'b0;
    end else if (clear) begin
      rr1        <= '0;
      rr2        <= '0;
      mem1_count <= '0;
      mem2_count <= '0;
      overflow   <= 1'b0;
    end else begin
      if (mem1_we) begin
        mem1_count <= mem1_count + 1'b1;
        rr1        <= (gnt1 == P1W'(R1 - 1)) ? '0 : gnt1 + 1'b1;
      end
      if (mem2_we) begin
        mem2_count <= mem2_count + 1'b1;
        rr2        <= (int'(gnt2) == NU - 1) ? '0 : gnt2 + 1'b1;
      end
      if ((gnt1_v && full1) || (gnt2_v && full2)) overflow <= 1'b1;
    end
  end

  initial assert (NU >= 1 && NU <= 4) else $error("NU must be 1..4");

endmodule
