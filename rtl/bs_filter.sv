// bs_filter: N-tap bit-serial adaptive filter (two taps by default).
//
// Each tap has its own 4-bit serial multiplier. Small echo taps (coefficients
// that fit in 4 bits) run alone in 4-bit mode, one product every 4 clocks.
// A tap whose coefficient needs 8 bits runs in 8-bit mode: its multiplier
// supplies Booth digits 0 and 1, and its serial wires continue into the
// shared multiplier N+1 ("C"), which supplies digits 2 and 3; the product
// then leaves C, one every 8 clocks. Multiplier C is fed through three
// levels of multiplexing, as in the document: per tap a 2:1 ModeSel mux that
// passes the tap's wires only while they belong to an 8-bit frame, an N:1
// MuxSel mux that picks the tap in 8-bit mode (AorBtoC for two taps), and a
// 2:1 Conoff mux that feeds C with zeros when no tap, or more than one,
// wants it. With zeros at its inputs C does not toggle.
//
// The selects are evaluated per wire from the frame tags that travel with
// each wire (see bs_pkg), so a select changes exactly at the frame boundary
// of the wire it steers; this is this design's own way of timing them.
//
// Inputs per tap are the serial data and coefficient from the PSCs, the
// LSBEnable from the coefficient-counter and the tap's ModeSelectBit, all
// aligned to the first clock of a frame. Outputs are the line bundles after
// each tap multiplier and after C; result_collector turns them into words.
module bs_filter import bs_pkg::*; #(
  parameter int unsigned NTAPS = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NTAPS-1:0] ser_data,
  input  logic [NTAPS-1:0] ser_coef,
  input  logic [NTAPS-1:0] lsb_en,
  input  logic [NTAPS-1:0] mode_sel,   // ModeSelectBit: 1 = 8-bit mode
  output bs_line_t         tap_line [NTAPS],
  output bs_line_t         c_line
);
  localparam int unsigned SEL_W = (NTAPS > 1) ? $clog2(NTAPS) : 1;

  // ---- build each tap's line at the first cell -------------------------
  // x and the weight-0 marker start two clocks after LSBEnable.
  bs_line_t   tap_in [NTAPS];
  logic [1:0] x_pre  [NTAPS];
  logic [1:0] lsb_pre[NTAPS];
  logic [1:0] m8_pre [NTAPS];

  for (genvar t = 0; t < NTAPS; t++) begin : g_tap
    always_ff @(posedge clk) begin
      if (rst) begin
        x_pre[t] <= '0; lsb_pre[t] <= '0; m8_pre[t] <= '0;
      end else begin
        x_pre[t]   <= {x_pre[t][0],   ser_data[t]};
        lsb_pre[t] <= {lsb_pre[t][0], lsb_en[t]};
        m8_pre[t]  <= {m8_pre[t][0],  mode_sel[t]};
      end
    end

    always_comb begin
      tap_in[t].x   = x_pre[t][1];
      tap_in[t].tx  = m8_pre[t][1];
      tap_in[t].lsb = lsb_en[t];
      tap_in[t].tl  = mode_sel[t];
      tap_in[t].y   = ser_coef[t];
      tap_in[t].ty  = mode_sel[t];
      tap_in[t].lo  = 1'b0;
      tap_in[t].w0  = lsb_pre[t][1];
      tap_in[t].m8w = m8_pre[t][1];
      tap_in[t].hi  = 1'b0;
      tap_in[t].thi = 1'b0;
    end

    bs_mult4 #(.FIRST_IDX(0)) u_mult (
      .clk(clk), .rst(rst), .li(tap_in[t]), .lo_line(tap_line[t])
    );
  end

  // ---- ModeSel / MuxSel / Conoff multiplexers in front of C ---------------
  // One select per wire group, from the tag that travels with that group.
  function automatic logic exactly_one(input logic [NTAPS-1:0] tags);
    int unsigned n;
    n = 0;
    for (int t = 0; t < NTAPS; t++) n += int'(tags[t]);
    return (n == 1);
  endfunction

  function automatic logic pick(input logic [NTAPS-1:0] tags, input logic [NTAPS-1:0] bits);
    logic             on;      // Conoff: exactly one tap claims C
    logic [SEL_W-1:0] sel;     // MuxSel: which tap
    on  = exactly_one(tags);
    sel = '0;
    for (int t = 0; t < NTAPS; t++) if (tags[t]) sel = SEL_W'(t);
    return on & tags[sel] & bits[sel];
  endfunction

  logic [NTAPS-1:0] t_x, t_l, t_y, t_w, t_h;
  logic [NTAPS-1:0] b_x, b_l, b_y, b_lo, b_w0, b_hi;
  bs_line_t c_in;

  always_comb begin
    for (int t = 0; t < NTAPS; t++) begin
      t_x[t]  = tap_line[t].tx;   b_x[t]  = tap_line[t].x;
      t_l[t]  = tap_line[t].tl;   b_l[t]  = tap_line[t].lsb;
      t_y[t]  = tap_line[t].ty;   b_y[t]  = tap_line[t].y;
      t_w[t]  = tap_line[t].m8w;  b_lo[t] = tap_line[t].lo;  b_w0[t] = tap_line[t].w0;
      t_h[t]  = tap_line[t].thi;  b_hi[t] = tap_line[t].hi;
    end
    c_in.x   = pick(t_x, b_x);
    c_in.tx  = exactly_one(t_x);
    c_in.lsb = pick(t_l, b_l);
    c_in.tl  = exactly_one(t_l);
    c_in.y   = pick(t_y, b_y);
    c_in.ty  = exactly_one(t_y);
    c_in.lo  = pick(t_w, b_lo);
    c_in.w0  = pick(t_w, b_w0);
    c_in.m8w = exactly_one(t_w);
    c_in.hi  = pick(t_h, b_hi);
    c_in.thi = exactly_one(t_h);
  end

  bs_mult4 #(.FIRST_IDX(CELLS)) u_mult_c (
    .clk(clk), .rst(rst), .li(c_in), .lo_line(c_line)
  );
endmodule
