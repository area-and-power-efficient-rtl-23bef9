// bs_mult4: 4-bit bit-serial Modified Booth multiplier.
//
// Two unit-cells in tandem, each handling one radix-4 digit, so a 4-bit
// coefficient needs two cells instead of four. The line bundle leaving the
// second cell carries the product: ProductLow (weights 0..L-1) on .lo during
// the frame, ProductHigh (weights L..L+3) on .hi during the first four
// clocks of the next frame. FIRST_IDX is the digit index of the first cell:
// 0 for a tap's own multiplier, 2 for the shared multiplier that supplies
// digits 2 and 3 of an 8-bit coefficient. Latency through the block is one
// clock per cell on the product wires, three per cell on x and LSBEnable.
//
// NCELL, DW, SHORT_L and LONG_L default to the echo canceller's 4-bit
// multiplier (2 cells, 4-bit data, frames of 4 or 8 clocks). Set NCELL = n/2
// and DW = SHORT_L = LONG_L = n for the stand-alone n x n serial multiplier
// (n/2 cells for an n-bit coefficient, as the Modified Booth recoding
// allows); ProductHigh then carries weights n..2n-1 over n clocks.
module bs_mult4 import bs_pkg::*; #(
  parameter int unsigned FIRST_IDX = 0,
  parameter int unsigned NCELL     = CELLS,
  parameter int unsigned DW        = DATA_W,
  parameter int unsigned SHORT_L   = SMALL_W,
  parameter int unsigned LONG_L    = COEF_W
) (
  input  logic     clk,
  input  logic     rst,
  input  bs_line_t li,
  output bs_line_t lo_line
);
  bs_line_t chain [NCELL+1];

  assign chain[0] = li;
  for (genvar c = 0; c < NCELL; c++) begin : g_cell
    bs_mult_cell #(.IDX(FIRST_IDX + c), .DW(DW), .SHORT_L(SHORT_L), .LONG_L(LONG_L)) u_cell (
      .clk(clk), .rst(rst), .li(chain[c]), .lo_line(chain[c+1])
    );
  end
  assign lo_line = chain[NCELL];
endmodule
