// bs_mult_cell: unit-cell of the bit-serial Modified Booth multiplier.
//
// Cell IDX handles radix-4 digit i = IDX of the coefficient. It watches the
// serial coefficient wire and, one clock after LSBEnable, latches the three
// bits (Y2i+1, Y2i, Y2i-1) as the digit (Ys, Yb, Ya) of Table 2.3; the first
// cell (IDX = 0) forces Y-1 = 0, which is Table 2.4. The cell then adds
// Z_i * 4^i * X to the partial product that arrives from the previous cell.
// X arrives two clocks after LSBEnable so that the digit is ready in time.
//
// Frames and the two product wires. A frame is L = 4 (4-bit mode) or L = 8
// (8-bit mode) clocks long and frames follow each other without gaps. The
// product of one frame has L + 4 bits. The "lo" wire (ProductLow) carries
// weights 0..L-1 during the frame; the "hi" wire (ProductHigh) carries
// weights L..L+3 during the first four clocks of the next frame. The cell
// therefore has two bit-serial adders: the lo adder works on the present
// frame while the hi adder finishes the previous one, starting from the lo
// adder's final carry. Bits of X beyond the frame are the frame's sign,
// kept in a flip-flop.
//
// Timing: x, lsb and their tags leave the cell 3 clocks after they enter
// (2 for the 4^i shift of the document's "X shifted by 2i bits", plus 1
// pipeline register); y leaves 1 clock later; lo, hi, w0 and their tags
// leave 1 clock later (registered sums). With these delays all cells of a
// chain see partial products of the same weight on the same clock edge
// offset by one clock per cell.
//
// The Booth tables, the cell chain and the split into ProductLow and
// ProductHigh follow the document; the exact clock offsets, the frame
// tags and the two-adder arrangement are this design's own.
//
// Two inputs are read on purpose by no logic here: the hi adder's carry out
// (the product ends at weight L+DW-1, so that carry has no weight to go to) and
// the incoming thi tag (the cell's own hi window is timed by hcnt; thi is
// regenerated for the next cell).
//
// Sizes. DW is the data width and SHORT_L / LONG_L the frame lengths for a
// low / high m8w marker; the defaults (4, 4, 8) are the echo canceller's.
// Other sizes build the n x n serial multiplier (DW = SHORT_L = LONG_L = n)
// from n/2 cells; the timing above holds as long as DW <= L, so that the
// sign latch of a frame is written before its hi window needs it.
module bs_mult_cell import bs_pkg::*; #(
  parameter int unsigned IDX     = 0,        // digit index i of the coefficient
  parameter int unsigned DW      = DATA_W,   // data term width
  parameter int unsigned SHORT_L = SMALL_W,  // frame length when m8w = 0
  parameter int unsigned LONG_L  = COEF_W    // frame length when m8w = 1
) (
  input  logic     clk,
  input  logic     rst,
  input  bs_line_t li,       // PartialProd, X, Y, LSBEnable from the previous cell
  output bs_line_t lo_line   // Product, Xo, Yo, LSBEnable to the next cell
);
  localparam bit          IS_CELL1 = (IDX == 0);
  localparam int unsigned TWO_I    = 2 * IDX;
  localparam int unsigned CW       = $clog2(LONG_L + 1);   // weight counter width
  localparam logic [CW-1:0] IDLE   = '1;                    // counter parked

  // ---- delay lines for the wires that pass through ---------------------
  logic [2:0] x_d, tx_d, tl_d;
  logic [DW:0] lsb_d;                // [2] leaves the cell, [DW] times the sign latch
  logic       y_d1, y_d2, ty_d1;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_d <= '0; tx_d <= '0; lsb_d <= '0; tl_d <= '0;
      y_d1 <= 1'b0; y_d2 <= 1'b0; ty_d1 <= 1'b0;
    end else begin
      x_d   <= {x_d[1:0],   li.x};
      tx_d  <= {tx_d[1:0],  li.tx};
      lsb_d <= {lsb_d[DW-1:0], li.lsb};
      tl_d  <= {tl_d[1:0],  li.tl};
      y_d1  <= li.y;
      y_d2  <= y_d1;
      ty_d1 <= li.ty;
    end
  end

  // ---- digit and sign latches ------------------------------------------
  // One clock after LSBEnable: li.y = Y2i+1, y_d1 = Y2i, y_d2 = Y2i-1.
  booth_digit_t dig_q, hi_dig_q;
  logic         sign_q;             // sign of the previous frame's X
  logic         y_lo;

  assign y_lo = IS_CELL1 ? 1'b0 : y_d2;

  always_ff @(posedge clk) begin
    if (rst)           dig_q <= '0;
    else if (lsb_d[0]) dig_q <= booth_encode(li.y, y_d1, y_lo);
  end

  // X bit DW-1 (the sign; later bits repeat it) is on the x wire DW+1
  // clocks after LSBEnable, whether or not another frame follows.
  always_ff @(posedge clk) begin
    if (rst)                sign_q <= 1'b0;
    else if (lsb_d[DW])     sign_q <= li.x;
  end

  // ---- weight counter on the lo wire -------------------------------------
  logic [CW-1:0] wcnt_q;
  logic [CW-1:0] cur_w;
  logic [CW-1:0] cur_len;

  assign cur_w   = li.w0 ? '0 : wcnt_q;
  assign cur_len = li.m8w ? CW'(LONG_L) : CW'(SHORT_L);

  always_ff @(posedge clk) begin
    if (rst)                wcnt_q <= IDLE;
    else if (cur_w != IDLE) wcnt_q <= cur_w + 1'b1;
  end

  // ---- lo adder: Z_i * 4^i * X, weights 0..L-1 of the present frame -------
  logic lo_act, lo_mag, lo_a, lo_init, lo_s, lo_cout, lo_sum_q;

  always_comb begin
    lo_act  = (int'(cur_w) >= int'(TWO_I)) && (cur_w < cur_len);
    // x_d[0] is X one weight lower: the operand for magnitude 2.
    lo_mag  = (dig_q.ya & li.x) | (dig_q.yb & (int'(cur_w) > int'(TWO_I)) & x_d[0]);
    lo_a    = lo_act & (dig_q.ys ^ lo_mag);
    lo_init = (cur_w == '0) || (int'(cur_w) == int'(TWO_I));
    lo_s    = (int'(cur_w) == int'(TWO_I)) & dig_q.ys;
  end

  bs_adder u_lo_add (
    .clk(clk), .rst(rst), .a(lo_a), .b(li.lo), .s(lo_s), .lsb_en(lo_init),
    .sum_q(lo_sum_q), .cout(lo_cout)
  );

  // ---- hand-over from the lo adder to the hi adder ------------------------
  // hcnt counts the clocks since the lo window of the previous frame ended;
  // the hi window is hcnt = 0..3. With gap-free frames it coincides with
  // weights 0..3 of the next frame, and it also runs when no frame follows
  // (the shared multiplier after the last 8-bit frame).
  logic       hi_carry_q, hi_len8_q, lo_last;
  logic [CW-1:0] hcnt_q;

  assign lo_last = (cur_w == cur_len - 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      hi_carry_q <= 1'b0;
      hi_len8_q  <= 1'b0;
      hi_dig_q   <= '0;
      hcnt_q     <= IDLE;
    end else begin
      if (lo_last) begin
        hi_carry_q <= lo_cout;
        hi_len8_q  <= li.m8w;
        hi_dig_q   <= dig_q;
        hcnt_q     <= '0;
      end else if (hcnt_q != IDLE) begin
        hcnt_q     <= hcnt_q + 1'b1;
      end
    end
  end

  // ---- hi adder: weights L..L+DW-1 of the previous frame ----------------------
  // Weight L+h uses X bit L+h-2i: still on the x wire while h < 2i, the sign
  // of the previous frame after that.
  logic hi_act, hi_x1, hi_x2, hi_mag, hi_a, hi_b, hi_sum_q, thi_q;

  always_comb begin
    hi_act = (int'(hcnt_q) < int'(DW));
    hi_x1  = (int'(hcnt_q) < int'(TWO_I)) ? li.x   : sign_q;
    hi_x2  = (int'(hcnt_q) < int'(TWO_I + 1)) ? x_d[0] : sign_q;
    hi_mag = (hi_dig_q.ya & hi_x1) | (hi_dig_q.yb & hi_x2);
    hi_a   = hi_act & (hi_dig_q.ys ^ hi_mag);
    hi_b   = hi_act & li.hi;
  end

  bs_adder u_hi_add (
    .clk(clk), .rst(rst), .a(hi_a), .b(hi_b), .s(hi_carry_q), .lsb_en(hcnt_q == '0),
    .sum_q(hi_sum_q), .cout()
  );

  // ---- registered wires of the frame bookkeeping --------------------------
  logic w0_q, m8w_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      w0_q  <= 1'b0;
      m8w_q <= 1'b0;
      thi_q <= 1'b0;
    end else begin
      w0_q  <= li.w0;
      m8w_q <= li.m8w;
      thi_q <= hi_act & hi_len8_q;
    end
  end

  always_comb begin
    lo_line.x   = x_d[2];
    lo_line.tx  = tx_d[2];
    lo_line.lsb = lsb_d[2];
    lo_line.tl  = tl_d[2];
    lo_line.y   = y_d1;
    lo_line.ty  = ty_d1;
    lo_line.lo  = lo_sum_q;
    lo_line.w0  = w0_q;
    lo_line.m8w = m8w_q;
    lo_line.hi  = hi_sum_q;
    lo_line.thi = thi_q;
  end

  // Frames follow each other without gaps: a new weight-0 marker comes
  // exactly when the previous frame has used up its SHORT_L or LONG_L weights.
  a_frames_back_to_back: assert property (@(posedge clk) disable iff (rst)
    li.w0 |-> (wcnt_q == CW'(SHORT_L) || wcnt_q == CW'(LONG_L) || wcnt_q == IDLE));
endmodule
