// tb_generic_counter: checks Table 3.5 of the design: per 8-clock period the
// data select and coefficient select run 01230123 / 01230123 in 4-bit mode
// and 01233333 / 01234567 in 8-bit mode, with LSBEnable on each frame start.
module tb_generic_counter;
  logic clk = 1'b0, rst = 1'b1, mode_sel = 1'b0;
  logic [2:0] sel_data, sel_coef;
  logic lsb_en, frame_end, period_end;
  int checks = 0, failures = 0;

  generic_counter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    @(negedge clk);
    for (int p = 0; p < 8; p++) begin
      mode_sel = (p % 3 == 1);
      for (int k = 0; k < 8; k++) begin
        chk(int'(sel_data) == (mode_sel ? (k > 3 ? 3 : k) : k % 4), $sformatf("data sel p%0d k%0d", p, k));
        chk(int'(sel_coef) == (mode_sel ? k : k % 4), $sformatf("coef sel p%0d k%0d", p, k));
        chk(lsb_en == (mode_sel ? (k == 0) : (k % 4 == 0)), $sformatf("lsb p%0d k%0d", p, k));
        chk(period_end == (k == 7), "period_end");
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
