// tb_data_psc: loads random data words and reads them back bit by bit for
// every select value 0..7; selects above 3 must give the sign bit.
module tb_data_psc;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0, ser_out;
  logic [3:0] data;
  logic [2:0] sel;
  int checks = 0, failures = 0;

  data_psc dut (.*);
  always #5 clk = ~clk;

  initial begin
    data = '0; sel = '0;
    @(negedge clk); rst = 0;
    for (int n = 0; n < 100; n++) begin
      logic [3:0] w;
      w = 4'($urandom);
      data = w; load = 1;
      @(negedge clk);
      load = 0; data = 4'($urandom);   // must not be taken without load
      for (int k = 0; k < 8; k++) begin
        sel = 3'(k);
        #1;
        checks++;
        if (ser_out != w[k > 3 ? 3 : k]) begin
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
