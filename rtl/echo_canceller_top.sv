// echo_canceller_top: top-level bit-serial echo canceller filter.
//
// Each tap multiplies a 4-bit data term (the locally transmitted symbol) by
// a tap coefficient (an echo voltage). Small echoes give coefficients that
// fit in 4 bits; the tap then works in 4-bit mode and takes a new data /
// coefficient pair every 4 clocks. A large echo gives an 8-bit coefficient;
// for that 8-clock period the tap works in 8-bit mode by joining the shared
// multiplier, so at most one tap at a time can handle a large echo. When
// more than one tap asks for it, error is raised and the shared multiplier
// stays off for that period.
//
// Inside: per tap a data PSC (4 flip-flops + 4:1 mux) and a coefficient PSC
// (8 flip-flops + 8:1 mux), the signal generator (mode bits, Error, Conoff,
// AorBtoC, one generic counter per tap), the bit-serial filter (N 4-bit
// Modified Booth serial multipliers plus the shared one), and result
// collectors that turn the serial ProductLow/ProductHigh wires back into
// words.
//
// Interface and timing. Time runs in 8-clock periods; the first period
// starts on the second clock after reset is released. word_taken[t] is high
// on the clock a tap's data_in/coef_in are sampled: on clock 7 of every
// period and, in 4-bit mode, also on clock 3. Hold each word until it is
// taken. The word sampled on clock 7 decides the tap's mode for the next
// period; a word sampled on clock 3 must fit in 4 bits (the upper coefficient
// bits are not used). A 4-bit product leaves on result_low/high/prod of its
// tap (result_valid high) 13 clocks after its word_taken clock; an 8-bit
// product leaves on result_c_* 19 clocks after it. Results come
// out in the order the words were taken. error, conoff and aorbtoc describe
// the present period. The tap collectors also produce the upper bits of
// an 8-bit-wide result word; a tap's own output only ever holds 4-bit mode
// products, so those upper bits are left unconnected.
module echo_canceller_top import bs_pkg::*; #(
  parameter int unsigned NTAPS = 2,
  localparam int unsigned SEL_W = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [DATA_W-1:0]         data_in  [NTAPS],
  input  logic [COEF_W-1:0]         coef_in  [NTAPS],
  output logic [NTAPS-1:0]          word_taken,
  output logic [SMALL_W-1:0]        result_low   [NTAPS],  // ResultLow of tap t
  output logic [DATA_W-1:0]         result_high  [NTAPS],  // ResultHigh of tap t
  output logic signed [DATA_W+SMALL_W-1:0] result_prod [NTAPS],
  output logic [NTAPS-1:0]          result_valid,
  output logic [COEF_W-1:0]         result_c_low,          // ResultLowC
  output logic [DATA_W-1:0]         result_c_high,         // ResultHighC
  output logic signed [PROD_W-1:0]  result_c_prod,
  output logic                      result_c_valid,
  output logic                      error,
  output logic                      conoff,
  output logic [SEL_W-1:0]          aorbtoc
);
  logic [MSB_CMP-1:0] coef_msbs [NTAPS];
  logic [NTAPS-1:0]   mode_sel, lsb_en, load, ser_data, ser_coef;
  logic [2:0]         sel_data [NTAPS];
  logic [2:0]         sel_coef [NTAPS];
  bs_line_t           tap_line [NTAPS];
  bs_line_t           c_line;

  for (genvar t = 0; t < NTAPS; t++) begin : g_tap
    assign coef_msbs[t] = coef_in[t][COEF_W-1 -: MSB_CMP];

    data_psc u_dpsc (.clk(clk), .rst(rst), .load(load[t]), .data(data_in[t]),
                     .sel(sel_data[t]), .ser_out(ser_data[t]));
    coef_psc u_cpsc (.clk(clk), .rst(rst), .load(load[t]), .coef(coef_in[t]),
                     .sel(sel_coef[t]), .ser_out(ser_coef[t]));

    logic [COEF_W-1:0]          low_w;
    logic signed [PROD_W-1:0]   prod_w;
    result_collector #(.CAPTURE_8(1'b0)) u_col (
      .clk(clk), .rst(rst), .li(tap_line[t]), .res_low(low_w), .res_high(result_high[t]),
      .prod(prod_w), .valid(result_valid[t])
    );
    assign result_low[t]  = low_w[SMALL_W-1:0];
    assign result_prod[t] = prod_w[DATA_W+SMALL_W-1:0];
  end

  assign word_taken = load;

  signal_generator #(.NTAPS(NTAPS)) u_sig (
    .clk(clk), .rst(rst), .coef_msbs(coef_msbs), .mode_sel(mode_sel), .lsb_en(lsb_en),
    .sel_data(sel_data), .sel_coef(sel_coef), .load(load),
    .error(error), .conoff(conoff), .aorbtoc(aorbtoc)
  );

  bs_filter #(.NTAPS(NTAPS)) u_filter (
    .clk(clk), .rst(rst), .ser_data(ser_data), .ser_coef(ser_coef), .lsb_en(lsb_en),
    .mode_sel(mode_sel), .tap_line(tap_line), .c_line(c_line)
  );

  result_collector #(.CAPTURE_8(1'b1)) u_col_c (
    .clk(clk), .rst(rst), .li(c_line), .res_low(result_c_low), .res_high(result_c_high),
    .prod(result_c_prod), .valid(result_c_valid)
  );
endmodule
