// result_collector: turns a multiplier's serial product into words.
//
// Watches the line bundle leaving a multiplier. From each weight-0 marker it
// shifts the ProductLow wire into a low word for L clocks (L = 8 for an
// 8-bit frame, else 4); during the first four clocks after that frame it
// shifts the ProductHigh wire into a 4-bit high word. It then presents the
// frame's result for one clock with valid high, provided the frame's mode
// matches CAPTURE_8: a tap's own collector keeps 4-bit frames and the shared
// multiplier's collector keeps 8-bit frames. prod is the whole signed
// product, {high, low} with L low bits. The document lists the result
// outputs (ResultHigh, ResultLow per multiplier); how they are assembled
// from the serial wires is this design's own.
//
// Only the product wires and the frame markers of the bundle are read; the
// x, y and lsb wires pass the multiplier but carry nothing for the result.
// The last high bit is taken straight from the wire when the word is
// presented, so the top flip-flop of the high register is written but
// never read.
module result_collector import bs_pkg::*; #(
  parameter bit CAPTURE_8 = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  bs_line_t            li,
  output logic [COEF_W-1:0]   res_low,   // ResultLow (4 bits used in 4-bit mode)
  output logic [DATA_W-1:0]   res_high,  // ResultHigh
  output logic signed [PROD_W-1:0] prod, // whole product, sign-extended
  output logic                valid
);
  logic [3:0]        wcnt_q, hcnt_q, cur_w;
  logic [COEF_W-1:0] cur_low_q, prev_low_q;
  logic [DATA_W-1:0] high_q;
  logic              cur_len8_q, prev_len8_q, cur_seen_q, prev_seen_q;
  logic              lo_last;

  assign cur_w   = li.w0 ? 4'd0 : wcnt_q;
  assign lo_last = cur_seen_q && !li.w0 && (wcnt_q == (cur_len8_q ? 4'd7 : 4'd3));

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt_q      <= 4'd15;
      hcnt_q      <= 4'd15;
      cur_low_q   <= '0;
      prev_low_q  <= '0;
      high_q      <= '0;
      cur_len8_q  <= 1'b0;
      prev_len8_q <= 1'b0;
      cur_seen_q  <= 1'b0;
      prev_seen_q <= 1'b0;
      res_low     <= '0;
      res_high    <= '0;
      prod        <= '0;
      valid       <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (cur_w != 4'd15) wcnt_q <= cur_w + 4'd1;

      // low word of the present frame
      if (li.w0) begin
        cur_low_q  <= {{(COEF_W-1){1'b0}}, li.lo};
        cur_len8_q <= li.m8w;
        cur_seen_q <= 1'b1;
      end else if (cur_seen_q && wcnt_q < (cur_len8_q ? 4'd8 : 4'd4)) begin
        cur_low_q[wcnt_q[2:0]] <= li.lo;
      end

      // high word of the frame that ended four clocks ago
      if (hcnt_q < 4'(DATA_W)) begin
        high_q[hcnt_q[1:0]] <= li.hi;
        hcnt_q <= hcnt_q + 4'd1;
        if (hcnt_q == 4'(DATA_W - 1) && prev_seen_q && prev_len8_q == CAPTURE_8) begin
          valid    <= 1'b1;
          res_low  <= prev_low_q;
          res_high <= {li.hi, high_q[DATA_W-2:0]};
          if (prev_len8_q)
            prod <= {li.hi, high_q[DATA_W-2:0], prev_low_q};
          else
            prod <= PROD_W'(signed'({li.hi, high_q[DATA_W-2:0], prev_low_q[SMALL_W-1:0]}));
        end
      end

      // a frame's low word is complete: its high word follows
      if (lo_last) begin
        prev_low_q  <= cur_low_q;
        prev_low_q[wcnt_q[2:0]] <= li.lo;
        prev_len8_q <= cur_len8_q;
        prev_seen_q <= 1'b1;
        hcnt_q      <= 4'd0;
        cur_seen_q  <= 1'b0;
      end
    end
  end
endmodule
