// tb_echo_canceller_ntap: end-to-end test of the echo canceller built with
// seven taps instead of two.
//
// Same method as the two-tap end-to-end test: random data and coefficients
// period by period, expected products from plain integer multiplication,
// one queue per output, every value and every latency checked. With N taps
// the status outputs take their general form: error = more than one tap
// wants 8-bit mode, conoff = exactly one does, aorbtoc = the index of that
// tap. A tap asks for 8-bit mode with probability 1/8, so most periods have
// zero or one large echo; one period in ten asks for 8-bit mode on every
// tap. Mechanisms counted (each must occur): 4-bit frames, 8-bit frames
// through the shared multiplier for every single tap, mode switches, error
// periods, and the shared multiplier idle.
module tb_echo_canceller_ntap;
  import bs_pkg::*;

  localparam int NT       = 7;
  localparam int SEL_W    = $clog2(NT);
  localparam int NPERIODS = 400;
  localparam int LAT4     = 13;   // word_taken -> result_valid, 4-bit
  localparam int LAT8     = 19;   // word_taken -> result_c_valid, 8-bit

  logic clk = 1'b0, rst = 1'b1;
  logic [DATA_W-1:0] data_in [NT];
  logic [COEF_W-1:0] coef_in [NT];
  logic [NT-1:0]     word_taken, result_valid;
  logic [SMALL_W-1:0] result_low [NT];
  logic [DATA_W-1:0]  result_high [NT];
  logic signed [DATA_W+SMALL_W-1:0] result_prod [NT];
  logic [COEF_W-1:0] result_c_low;
  logic [DATA_W-1:0] result_c_high;
  logic signed [PROD_W-1:0] result_c_prod;
  logic result_c_valid, error, conoff;
  logic [SEL_W-1:0] aorbtoc;

  echo_canceller_top #(.NTAPS(NT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n4 = 0, nerr = 0, nswitch = 0, nidle = 0;
  int n8 [NT];
  initial foreach (n8[t]) n8[t] = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int p; longint t; } exp_t;
  exp_t q4 [NT][$];
  exp_t q8 [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d %s", cyc, what);
    end
  endtask

  function automatic int sx4(input logic [3:0] v); return int'(signed'(v)); endfunction
  function automatic int sx8(input logic [7:0] v); return int'(signed'(v)); endfunction

  function automatic logic [7:0] rand_small();
    return 8'(signed'(4'($urandom)));
  endfunction
  function automatic logic [7:0] rand_large();
    logic [7:0] c;
    do c = 8'($urandom); while (!needs_8bit(c[7:3]));
    return c;
  endfunction

  // ---- stimulus: one word per word_taken, mode chosen per period --------
  logic prev_big [NT];
  logic big_now  [NT];
  initial begin
    for (int t = 0; t < NT; t++) begin
      data_in[t] = '0; coef_in[t] = '0; prev_big[t] = 0; big_now[t] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
  end

  // Decide the words presented on each clock. A word sampled on clock 7 of
  // a period may be large; a word sampled on clock 3 must be small.
  int period_clk;   // 0..7 within a period, clock 7 = period end
  always @(posedge clk) begin
    if (rst) period_clk <= 7;
    else     period_clk <= (period_clk + 1) % 8;
  end

  int nperiod = 0;
  always @(negedge clk) begin
    if (!rst) begin
      // present on the clock before sampling; the period end is clock 7
      if (period_clk == 6 || (rst == 0 && cyc == 3)) begin
        bit both;
        both = ($urandom % 10 == 0);
        for (int t = 0; t < NT; t++) begin
          logic big;
          big = both ? 1'b1 : ($urandom % 8 == 0);
          data_in[t] = 4'($urandom);
          coef_in[t] = big ? rand_large() : rand_small();
        end
      end else if (period_clk == 2) begin
        for (int t = 0; t < NT; t++) begin
          data_in[t] = 4'($urandom);
          coef_in[t] = rand_small();
        end
      end
    end
  end

  // ---- expectations from the words actually taken ------------------------
  always @(posedge clk) begin
    if (!rst) begin
      if (period_clk == 7) begin
        int nbig;
        nbig = 0;
        for (int t = 0; t < NT; t++) begin
          big_now[t] = needs_8bit(coef_in[t][7:3]);
          nbig += big_now[t];
        end
        nperiod++;
        if (nbig > 1) nerr++;
        if (nbig == 0) nidle++;
        for (int t = 0; t < NT; t++) begin
          if (big_now[t] != prev_big[t]) nswitch++;
          prev_big[t] = big_now[t];
          check(word_taken[t], "word_taken on period end");
          if (!big_now[t]) begin
            q4[t].push_back('{sx4(data_in[t]) * sx8(coef_in[t]), cyc});
            n4++;
          end else if (nbig == 1) begin
            q8.push_back('{sx4(data_in[t]) * sx8(coef_in[t]), cyc});
            n8[t]++;
          end
        end
      end else if (period_clk == 3) begin
        for (int t = 0; t < NT; t++) begin
          check(word_taken[t] == !big_now[t], "word_taken on clock 3 only in 4-bit mode");
          if (!big_now[t]) begin
            q4[t].push_back('{sx4(data_in[t]) * sx8(coef_in[t]), cyc});
            n4++;
          end
        end
      end else begin
        for (int t = 0; t < NT; t++) check(!word_taken[t], "no word_taken mid-frame");
      end
    end
  end

  // ---- signal generator status -------------------------------------------
  always @(posedge clk) begin
    if (!rst && period_clk == 1 && nperiod > 0) begin
      int nbig, who;
      nbig = 0; who = 0;
      for (int t = 0; t < NT; t++) if (big_now[t]) begin nbig++; who = t; end
      check(error  == (nbig > 1), "error flag");
      check(conoff == (nbig == 1), "conoff flag");
      if (nbig == 1) check(int'(aorbtoc) == who, "aorbtoc");
    end
  end

  // ---- results -----------------------------------------------------------
  always @(posedge clk) begin
    if (!rst) begin
      for (int t = 0; t < NT; t++) if (result_valid[t]) begin
        if (q4[t].size() == 0) check(0, $sformatf("tap %0d result with nothing expected", t));
        else begin
          exp_t e;
          e = q4[t].pop_front();
          check(int'(result_prod[t]) == e.p,
                $sformatf("tap %0d product %0d expected %0d", t, result_prod[t], e.p));
          check({result_high[t], result_low[t]} == 8'(e.p), "tap high/low split");
          check(cyc - e.t == LAT4, $sformatf("tap %0d latency %0d", t, cyc - e.t));
        end
      end
      if (result_c_valid) begin
        if (q8.size() == 0) check(0, "C result with nothing expected");
        else begin
          exp_t e;
          e = q8.pop_front();
          check(int'(result_c_prod) == e.p,
                $sformatf("C product %0d expected %0d", result_c_prod, e.p));
          check({result_c_high, result_c_low} == 12'(e.p), "C high/low split");
          check(cyc - e.t == LAT8, $sformatf("C latency %0d", cyc - e.t));
        end
      end
    end
  end

  initial begin
    wait (nperiod == NPERIODS);
    repeat (40) @(posedge clk);
    // everything still queued must be younger than its latency
    for (int t = 0; t < NT; t++)
      foreach (q4[t][i]) check(cyc - q4[t][i].t < LAT4, "tap result missing");
    foreach (q8[i]) check(cyc - q8[i].t < LAT8, "C result missing");
    $display("mechanisms: 4bit=%0d switches=%0d error=%0d idleC=%0d", n4, nswitch, nerr, nidle);
    check(n4 > 0,  "4-bit frames occurred");
    for (int t = 0; t < NT; t++) begin
      $display("  8-bit frames of tap %0d: %0d", t, n8[t]);
      check(n8[t] > 0, $sformatf("8-bit frames of tap %0d occurred", t));
    end
    check(nswitch > 0, "mode switches occurred");
    check(nerr > 0, "Error periods occurred");
    check(nidle > 0, "idle shared-multiplier periods occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPERIODS * 8 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
