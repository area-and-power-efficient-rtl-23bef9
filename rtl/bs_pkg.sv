// bs_pkg: sizes and the serial line bundle shared by the bit-serial echo
// canceller.
//
// The data term is 4 bits wide and the coefficient term 8 bits wide (the
// document's numbers). A coefficient whose five most significant bits are all
// equal fits in 4 bits and is handled in 4-bit mode; any other coefficient
// needs 8-bit mode, where a tap borrows the shared extra multiplier.
//
// bs_line_t is the set of bit-serial wires that pass from one multiplier
// unit-cell to the next. Every wire carries a "tag" that travels with it and
// says whether the bit belongs to an 8-bit frame; the tags let the 2:1 and
// N:1 multiplexers in front of the shared multiplier pick exactly the bits of
// the tap that is in 8-bit mode. The tags are this design's own choice.
package bs_pkg;

  localparam int unsigned DATA_W   = 4;   // data term width
  localparam int unsigned COEF_W   = 8;   // coefficient width in 8-bit mode
  localparam int unsigned SMALL_W  = 4;   // coefficient width in 4-bit mode
  localparam int unsigned MSB_CMP  = 5;   // coefficient MSBs compared for the mode
  localparam int unsigned CELLS    = 2;   // unit-cells per 4-bit multiplier
  localparam int unsigned PROD_W   = DATA_W + COEF_W; // widest product

  // One multiplier stage boundary. Bit order: LSB first on every serial wire.
  typedef struct packed {
    logic x;    // serial data term, sign-extended over the frame
    logic tx;   // x belongs to an 8-bit frame
    logic lsb;  // LSBEnable: first cycle of a coefficient frame
    logic tl;   // lsb belongs to an 8-bit frame
    logic y;    // serial coefficient term
    logic ty;   // y belongs to an 8-bit frame
    logic lo;   // ProductLow: running partial product, weights 0..L-1
    logic w0;   // marks weight 0 on the lo wire
    logic m8w;  // lo/w0 belong to an 8-bit frame (L = 8, else L = 4)
    logic hi;   // ProductHigh: running partial product, weights L..L+3
    logic thi;  // hi belongs to an 8-bit frame
  } bs_line_t;

  // Radix-4 (Modified Booth) digit as latched by a unit-cell.
  typedef struct packed {
    logic ys;   // sign: subtract
    logic yb;   // magnitude 2
    logic ya;   // magnitude 1
  } booth_digit_t;

  // Table 2.3 of the design: (Y2i+1, Y2i, Y2i-1) -> (Ys, Yb, Ya)
  function automatic booth_digit_t booth_encode(input logic y_hi, input logic y_mid,
                                                input logic y_lo);
    booth_digit_t d;
    d.ys = y_hi;
    d.ya = y_mid ^ y_lo;
    d.yb = ~(y_mid ^ y_lo) & (y_hi ^ y_mid);
    return d;
  endfunction

  // A coefficient needs 8-bit mode unless its MSB_CMP most significant bits
  // are all equal (then it is a sign-extended 4-bit number).
  function automatic logic needs_8bit(input logic [MSB_CMP-1:0] msbs);
    return !((&msbs) || !(|msbs));
  endfunction

endpackage
