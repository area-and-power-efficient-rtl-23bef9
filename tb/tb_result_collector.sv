// tb_result_collector: feeds a synthetic multiplier output: back-to-back
// frames of random length (4 or 8), each with a random product sent LSB
// first, the low L bits on the lo wire during the frame and the next four
// bits on the hi wire during the four clocks after it. Two collectors
// watch the same wire, one keeping 4-bit frames and one keeping 8-bit
// frames; each result must match the product it was sent, 4 clocks after
// the frame ends.
module tb_result_collector;
  import bs_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  bs_line_t li;
  logic [COEF_W-1:0] low4, low8;
  logic [DATA_W-1:0] high4, high8;
  logic signed [PROD_W-1:0] prod4, prod8;
  logic valid4, valid8;
  int checks = 0, failures = 0;

  result_collector #(.CAPTURE_8(1'b0)) dut4 (.clk(clk), .rst(rst), .li(li), .res_low(low4),
                                             .res_high(high4), .prod(prod4), .valid(valid4));
  result_collector #(.CAPTURE_8(1'b1)) dut8 (.clk(clk), .rst(rst), .li(li), .res_low(low8),
                                             .res_high(high8), .prod(prod8), .valid(valid8));
  always #5 clk = ~clk;

  typedef struct { int p; bit m8; } fr_t;
  fr_t sent [$];
  int n4 = 0, n8 = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // driver: hi bits of the previous frame overlap the next frame's start
  initial begin
    logic [11:0] prev_word;
    bit have_prev;
    li = '0;
    have_prev = 0;
    prev_word = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 300; f++) begin
      bit m8; int L; logic [11:0] w;
      m8 = 1'($urandom);
      L  = m8 ? 8 : 4;
      w  = m8 ? 12'($urandom) : 12'(signed'(8'($urandom)));
      sent.push_back('{int'(signed'(m8 ? w : 12'(signed'(w[7:0])))), m8});
      for (int k = 0; k < L; k++) begin
        li.w0  = (k == 0);
        li.m8w = m8;
        li.lo  = w[k];
        li.hi  = (have_prev && k < 4) ? prev_word[k] : 1'b0;
        @(negedge clk);
      end
      prev_word = w >> L;
      have_prev = 1;
    end
    li = '0;
    for (int k = 0; k < 4; k++) begin li.hi = prev_word[k]; @(negedge clk); end
    li = '0;
    repeat (10) @(negedge clk);
    chk(sent.size() == 0, "every frame collected");
    chk(n4 > 0 && n8 > 0, "both frame kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    chk(!(valid4 && valid8), "one collector at a time");
    if (valid4 || valid8) begin
      fr_t e;
      e = sent.pop_front();
      if (valid4) begin
        n4++;
        chk(!e.m8, "4-bit collector took an 8-bit frame");
        chk(int'(prod4) == e.p, $sformatf("4-bit prod %0d exp %0d", prod4, e.p));
        chk({high4, low4[3:0]} == 8'(e.p), "4-bit high/low");
      end else begin
        n8++;
        chk(e.m8, "8-bit collector took a 4-bit frame");
        chk(int'(prod8) == e.p, $sformatf("8-bit prod %0d exp %0d", prod8, e.p));
        chk({high8, low8} == 12'(e.p), "8-bit high/low");
      end
    end
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
