// spiht_ram - on-chip memory used for the coefficient memory, the tree
// information memory and the two bit-stream memories (Mem#1, Mem#2).
//
// One write port writes a single W-bit entry per cycle. NRD read ports each
// read GROUP consecutive entries at once (a group address selects entries
// GROUP*a .. GROUP*a+GROUP-1); with the 1-D coefficient ordering the four
// offspring of a node sit in one such group, so a 2x2 block is one read.
// Reads are synchronous: rdata[r] shows the group addressed in the cycle
// re[r] was high and holds while re[r] is low. Read-during-write to the
// same entry returns the old value. Contents are not reset.
// The memories themselves (coefficient memory, Mem#1, Mem#2) come from the
// design description; their organisation in read groups and the number of
// read ports are this design's choices.
module spiht_ram #(
  parameter int W     = 16,
  parameter int DEPTH = 1024,
  parameter int GROUP = 1,
  parameter int NRD   = 1,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int NG   = DEPTH / GROUP,
  localparam int GAW  = (NG > 1) ? $clog2(NG) : 1
) (
  input  logic                               clk,
  input  logic                               we,
  input  logic [AW-1:0]                      waddr,
  input  logic [W-1:0]                       wdata,
  input  logic [NRD-1:0]                     re,
  input  logic [NRD-1:0][GAW-1:0]            raddr,
  output logic [NRD-1:0][GROUP-1:0][W-1:0]   rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar r = 0; r < NRD; r++) begin : g_rd
    for (genvar e = 0; e < GROUP; e++) begin : g_ent
      always_ff @(posedge clk) begin
        if (re[r]) rdata[r][e] <= mem[AW'(raddr[r]) * AW'(GROUP) + AW'(e)];
      end
    end
  end

endmodule
