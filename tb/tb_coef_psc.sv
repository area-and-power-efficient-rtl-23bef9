// tb_coef_psc: loads random coefficients and reads every bit back through
// the 8:1 multiplexer; a word presented without load must not be taken.
module tb_coef_psc;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0, ser_out;
  logic [7:0] coef;
  logic [2:0] sel;
  int checks = 0, failures = 0;

  coef_psc dut (.*);
  always #5 clk = ~clk;

  initial begin
    coef = '0; sel = '0;
    @(negedge clk); rst = 0;
    for (int n = 0; n < 100; n++) begin
      logic [7:0] w;
      w = 8'($urandom);
      coef = w; load = 1;
      @(negedge clk);
      load = 0; coef = 8'($urandom);
      for (int k = 0; k < 8; k++) begin
        sel = 3'(k);
        #1;
        checks++;
        if (ser_out != w[k]) begin
          failures++;
          $display("FAIL word %h sel %0d got %b", w, k, ser_out);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
