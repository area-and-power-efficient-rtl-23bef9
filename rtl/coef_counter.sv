// coef_counter: modified 3-bit up-counter giving the select of the
// coefficient PSC's 8:1 multiplexer and the LSBEnable of the filter.
//
// A free-running 3-bit count repeats every 8 clocks. In 4-bit mode the
// select is 0123 0123 and LSBEnable is high on each 0 (two frames per
// period); in 8-bit mode the select is 01234567 and LSBEnable is high only on
// the first clock. frame_end marks the last clock of each frame, when the
// PSCs load the next word; period_end marks clock 7, when the signal
// generator latches the next period's mode. After reset the count is 7.
// Count and LSBEnable pattern from the document; frame_end and period_end
// are this design's own outputs.
module coef_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       mode_sel,    // ModeSelectBit: 1 = 8-bit mode
  output logic [2:0] sel,         // MuxSelectCoefficient, 0..7
  output logic       lsb_en,      // LSBEnable
  output logic       frame_end,
  output logic       period_end
);
  logic [2:0] cnt_q;

  always_ff @(posedge clk) begin
    if (rst) cnt_q <= 3'd7;
    else     cnt_q <= cnt_q + 3'd1;
  end

  always_comb begin
    sel        = mode_sel ? cnt_q : {1'b0, cnt_q[1:0]};
    lsb_en     = mode_sel ? (cnt_q == 3'd0) : (cnt_q[1:0] == 2'd0);
    period_end = (cnt_q == 3'd7);
    frame_end  = mode_sel ? period_end : (cnt_q[1:0] == 2'd3);
  end
endmodule
