// tb_bs_adder: the bit-serial adder adds random 8-bit words sent LSB first.
// Each word is added as A + B + S (S loaded as carry at the LSB); the
// registered sum bits are collected one clock later and compared with the
// integer sum modulo 2^8. Also checks subtraction: A = ~X with S = 1 gives
// B - X.
module tb_bs_adder;
  logic clk = 1'b0, rst = 1'b1;
  logic a, b, s, lsb_en, sum_q, cout;
  int checks = 0, failures = 0;

  bs_adder dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [7:0] wa, wb, got;
    logic       ws;
    a = 0; b = 0; s = 0; lsb_en = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      wa = 8'($urandom); wb = 8'($urandom); ws = 1'($urandom);
      for (int k = 0; k < 8; k++) begin
        a = wa[k]; b = wb[k]; s = ws; lsb_en = (k == 0);
        @(negedge clk);
        got[k] = sum_q;   // sum of bit k, registered
      end
      checks++;
      if (got != 8'(wa + wb + 8'(ws))) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h + %0d = %h", wa, wb, ws, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
