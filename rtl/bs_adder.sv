// bs_adder: bit-serial adder.
//
// Adds two LSB-first serial operands A and B one bit per clock with a full
// adder and a carry flip-flop. On the cycle where lsb_en is high the stored
// carry is replaced by S, the sign bit of the partial product: loading a 1
// there turns an inverted operand into its two's complement (~A + 1), which
// is how a unit-cell subtracts. The sum bit is registered, so sum_q shows the
// bit added one clock earlier. cout is the combinational carry out of the
// present bit, for a caller that hands the carry on to another adder.
// Ports A, B, S and LsbEn follow the document; the registered sum is this
// design's pipelining choice.
module bs_adder (
  input  logic clk,
  input  logic rst,      // synchronous, active high
  input  logic a,        // partial product bit of this cell
  input  logic b,        // incoming partial product bit
  input  logic s,        // carry loaded at the LSB (sign bit)
  input  logic lsb_en,   // LSB of the operands is present
  output logic sum_q,    // registered sum bit
  output logic cout      // carry out of the present bit
);
  logic carry_q, cin, sum_d;

  assign cin = lsb_en ? s : carry_q;

  full_adder u_fa (.a(a), .b(b), .cin(cin), .sum(sum_d), .cout(cout));

  always_ff @(posedge clk) begin
    if (rst) begin
      carry_q <= 1'b0;
      sum_q   <= 1'b0;
    end else begin
      carry_q <= cout;
      sum_q   <= sum_d;
    end
  end
endmodule
