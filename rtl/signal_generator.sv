// signal_generator: derives every control signal of the filter and the PSCs.
//
// For each tap it compares the five MSBs of the coefficient being loaded: if
// they are not all equal the coefficient needs 8 bits and the tap's
// ModeSelectBit is set for the coming 8-clock period (Table 3.1). The bit is
// registered on the last clock of a period, so it is steady for a whole
// period. From the ModeSelectBits it forms (Tables 3.2 to 3.4, generalised
// to N taps):
//   error    more than one tap wants 8-bit mode (AND of the two bits)
//   conoff   exactly one tap wants 8-bit mode: shared multiplier on (XOR)
//   aorbtoc  index of the tap that joins the shared multiplier (for two
//            taps: ModeSelectBitB, so 1 selects B, 0 selects A)
// It also holds one generic_counter per tap for the PSC selects, LSBEnable
// and the load strobes. A word loaded in the middle of a 4-bit period
// (clock 3) is always treated in 4-bit mode; only the word loaded on
// clock 7 can switch a tap to 8-bit mode. That restriction keeps all
// 8-bit frames on period boundaries and is this design's own choice.
module signal_generator import bs_pkg::*; #(
  parameter int unsigned NTAPS = 2,
  localparam int unsigned SEL_W = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [MSB_CMP-1:0] coef_msbs [NTAPS],  // five MSBs of each coefficient input
  output logic [NTAPS-1:0]   mode_sel,           // ModeSelectBit per tap
  output logic [NTAPS-1:0]   lsb_en,             // LSBEnable per tap
  output logic [2:0]         sel_data [NTAPS],   // MuxSelectData per tap
  output logic [2:0]         sel_coef [NTAPS],   // MuxSelectCoefficient per tap
  output logic [NTAPS-1:0]   load,               // PSC load strobe per tap
  output logic               error,
  output logic               conoff,
  output logic [SEL_W-1:0]   aorbtoc
);
  logic [NTAPS-1:0] frame_end, period_end;

  for (genvar t = 0; t < NTAPS; t++) begin : g_tap
    always_ff @(posedge clk) begin
      if (rst)                mode_sel[t] <= 1'b0;
      else if (period_end[t]) mode_sel[t] <= needs_8bit(coef_msbs[t]);
    end

    generic_counter u_gc (
      .clk(clk), .rst(rst), .mode_sel(mode_sel[t]),
      .sel_data(sel_data[t]), .sel_coef(sel_coef[t]), .lsb_en(lsb_en[t]),
      .frame_end(frame_end[t]), .period_end(period_end[t])
    );
  end

  assign load = frame_end;

  always_comb begin
    int unsigned n8;
    n8      = 0;
    aorbtoc = '0;
    for (int t = 0; t < NTAPS; t++) begin
      if (mode_sel[t]) begin
        n8      = n8 + 1;
        aorbtoc = SEL_W'(t);
      end
    end
    error  = (n8 > 1);
    conoff = (n8 == 1);
  end
endmodule
