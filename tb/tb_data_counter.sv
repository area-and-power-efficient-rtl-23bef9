// tb_data_counter: checks the select sequence of Table 3.6 over several
// 8-clock periods in each mode: 0123 0123 in 4-bit mode, 0123 3333 in
// 8-bit mode.
module tb_data_counter;
  logic clk = 1'b0, rst = 1'b1, mode_sel = 1'b0;
  logic [2:0] sel;
  int checks = 0, failures = 0;
  int exp4 [8] = '{0, 1, 2, 3, 0, 1, 2, 3};
  int exp8 [8] = '{0, 1, 2, 3, 3, 3, 3, 3};

  data_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    @(negedge clk); rst = 0;           // count is 7 here
    @(negedge clk);                    // count 0: first period
    for (int p = 0; p < 6; p++) begin
      mode_sel = p[0];
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'(sel) != (mode_sel ? exp8[k] : exp4[k])) begin
          failures++;
          $display("FAIL period %0d clock %0d sel=%0d", p, k, sel);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
