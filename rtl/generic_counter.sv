// generic_counter: the pair of counters that sequence one tap.
//
// Holds a data_counter and a coef_counter driven by the tap's ModeSelectBit
// and brings out the PSC selects, the LSBEnable for the filter, and the
// frame/period ends (load strobes). Table 3.5 of the design: per 8 clocks the
// data select runs 01230123 (4-bit mode) or 01233333 (8-bit mode) and the
// coefficient select 01230123 or 01234567. The two counters start together
// at reset and so stay in step.
module generic_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       mode_sel,
  output logic [2:0] sel_data,
  output logic [2:0] sel_coef,
  output logic       lsb_en,
  output logic       frame_end,
  output logic       period_end
);
  data_counter u_data (.clk(clk), .rst(rst), .mode_sel(mode_sel), .sel(sel_data));
  coef_counter u_coef (.clk(clk), .rst(rst), .mode_sel(mode_sel), .sel(sel_coef),
                       .lsb_en(lsb_en), .frame_end(frame_end), .period_end(period_end));
endmodule
