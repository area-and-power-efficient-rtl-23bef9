// data_counter: modified 3-bit up-counter giving the select of the data
// PSC's 4:1 multiplexer.
//
// A free-running 3-bit count repeats every 8 clocks (the counting period).
// In 4-bit mode the select is the count modulo 4 (0123 0123): two 4-bit data
// words per period. In 8-bit mode it is 0123 3333: the data word's MSB is
// repeated, which sign-extends the 4-bit data to the 8-bit frame.
// mode_sel must be steady for the whole period. After reset the count is 7,
// the last clock of a period, so the first period starts one clock later.
// Count pattern from the document; the reset value is this design's choice.
module data_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       mode_sel,   // ModeSelectBit: 1 = 8-bit mode
  output logic [2:0] sel         // MuxSelectData, 0..3
);
  logic [2:0] cnt_q;

  always_ff @(posedge clk) begin
    if (rst) cnt_q <= 3'd7;
    else     cnt_q <= cnt_q + 3'd1;
  end

  always_comb begin
    if (!mode_sel)         sel = {1'b0, cnt_q[1:0]};
    else if (cnt_q > 3'd3) sel = 3'd3;
    else                   sel = cnt_q;
  end
endmodule
