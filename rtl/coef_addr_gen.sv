// coef_addr_gen - memory address generator for the DWT coefficients.
//
// The wavelet coefficients of an IMG_DIM x IMG_DIM image arrive in raster
// order (row by row) on a valid/ready stream and are written to the
// coefficient memory in a 1-D order in which the four offspring of a node
// sit at consecutive addresses. The 1-D address of row X, column Y is the
// bit interleave of the two: address bit 2b+1 = X[b], address bit 2b = Y[b].
// With it the offspring rule of the design description
//   a1 = (2X, 2Y), a2 = (2X, 2Y+1), a3 = (2X+1, 2Y), a4 = (2X+1, 2Y+1)
// becomes a shift and an increment: a1..a4 = 4*addr(X,Y) + 0..3, and the
// rule is the same for every image size.
//
// Interface: pulse start to begin a frame; in_ready is high until the
// IMG_DIM*IMG_DIM-th coefficient has been accepted, and done pulses in the
// cycle after that. One coefficient per cycle; the memory write (we, waddr,
// wdata) is combinational from the accepted input. The interleaved 1-D
// ordering follows the description's statement that offspring are stored
// at consecutive addresses; the raster input order is an assumption.
module coef_addr_gen
  import spiht_pkg::*;
#(
  parameter int IMG_DIM = 128,
  localparam int LOGD   = $clog2(IMG_DIM),
  localparam int AW     = 2 * LOGD
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          in_valid,
  output logic          in_ready,
  input  coef_t         in_coef,
  output logic          we,
  output logic [AW-1:0] waddr,
  output coef_t         wdata,
  output logic          done
);

  logic            busy;
  logic [LOGD-1:0] row, col;

  always_comb begin
    for (int b = 0; b < LOGD; b++) begin
      waddr[2*b+1] = row[b];
      waddr[2*b]   = col[b];
    end
  end

  assign in_ready = busy;
  assign we       = busy && in_valid;
  assign wdata    = in_coef;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      row  <= '0;
      col  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        row  <= '0;
        col  <= '0;
      end else if (we) begin
        col <= col + 1'b1;
        if (col == LOGD'(IMG_DIM - 1)) begin
          row <= row + 1'b1;
          if (row == LOGD'(IMG_DIM - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  initial assert (IMG_DIM >= 8 && (1 << LOGD) == IMG_DIM)
    else $error("IMG_DIM must be a power of two of at least 8");

endmodule
