// data_psc: parallel-to-serial converter for the 4-bit data term.
//
// Four D flip-flops take the data word on load (the last clock of a frame);
// a 4:1 multiplexer steered by the data-counter puts one bit per clock on
// ser_out, LSB first. Selects above 3 give bit 3, the sign. ser_out is
// combinational from the flip-flops and the select. Structure from the
// document; the load strobe is this design's choice.
module data_psc import bs_pkg::*; (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic [DATA_W-1:0] data,
  input  logic [2:0]        sel,
  output logic              ser_out
);
  logic [DATA_W-1:0] data_q;

  always_ff @(posedge clk) begin
    if (rst)       data_q <= '0;
    else if (load) data_q <= data;
  end

  assign ser_out = (sel > 3'(DATA_W - 1)) ? data_q[DATA_W-1] : data_q[sel[1:0]];
endmodule
