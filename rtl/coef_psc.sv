// coef_psc: parallel-to-serial converter for the 8-bit coefficient term.
//
// Eight D flip-flops take the coefficient on load (the last clock of a
// frame); an 8:1 multiplexer steered by the coefficient-counter puts one bit
// per clock on ser_out, LSB first. In 4-bit mode only bits 0..3 are sent.
// ser_out is combinational from the flip-flops and the select.
module coef_psc import bs_pkg::*; (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [COEF_W-1:0] coef,
  input  logic [2:0]        sel,
  output logic              ser_out
);
  logic [COEF_W-1:0] coef_q;

  always_ff @(posedge clk) begin
    if (rst)       coef_q <= '0;
    else if (load) coef_q <= coef;
  end

  assign ser_out = coef_q[sel];
endmodule
