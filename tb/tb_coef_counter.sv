// tb_coef_counter: checks the select and LSBEnable pattern of Table 3.7 in
// both modes, and the frame_end / period_end strobes.
module tb_coef_counter;
  logic clk = 1'b0, rst = 1'b1, mode_sel = 1'b0;
  logic [2:0] sel;
  logic lsb_en, frame_end, period_end;
  int checks = 0, failures = 0;

  coef_counter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    @(negedge clk); rst = 0;
    chk(period_end && frame_end, "reset leaves the counter at the period end");
    @(negedge clk);
    for (int p = 0; p < 6; p++) begin
      mode_sel = p[0];
      for (int k = 0; k < 8; k++) begin
        int es; bit el, ef;
        es = mode_sel ? k : k % 4;
        el = mode_sel ? (k == 0) : (k % 4 == 0);
        ef = mode_sel ? (k == 7) : (k % 4 == 3);
        chk(int'(sel) == es, $sformatf("sel p%0d k%0d = %0d", p, k, sel));
        chk(lsb_en == el, $sformatf("lsb_en p%0d k%0d", p, k));
        chk(frame_end == ef, $sformatf("frame_end p%0d k%0d", p, k));
        chk(period_end == (k == 7), $sformatf("period_end p%0d k%0d", p, k));
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
