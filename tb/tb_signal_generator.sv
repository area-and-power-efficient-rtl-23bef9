// tb_signal_generator: random coefficient MSBs each period. Checks that each
// tap's ModeSelectBit takes the value of Table 3.1 (set when the five MSBs
// are not all equal) for the whole next period, that Error, Conoff and
// AorBtoC follow Tables 3.2 to 3.4, and that the load strobes fall on
// clock 7 and, in 4-bit mode, on clock 3.
module tb_signal_generator;
  import bs_pkg::*;
  localparam int NT = 2;
  logic clk = 1'b0, rst = 1'b1;
  logic [MSB_CMP-1:0] coef_msbs [NT];
  logic [NT-1:0] mode_sel, lsb_en, load;
  logic [2:0] sel_data [NT];
  logic [2:0] sel_coef [NT];
  logic error, conoff;
  logic [0:0] aorbtoc;
  int checks = 0, failures = 0;
  int n_err = 0, n_on = 0;

  signal_generator #(.NTAPS(NT)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [4:0] rand_msbs(input bit big);
    logic [4:0] m;
    do m = 5'($urandom); while ((m != 5'h00 && m != 5'h1f) != big);
    return m;
  endfunction

  initial begin
    logic [NT-1:0] exp_mode;
    coef_msbs[0] = '0; coef_msbs[1] = '0;
    @(negedge clk); rst = 0;          // clock 7 of the first period
    exp_mode = '0;
    for (int p = 0; p < 200; p++) begin
      // present the words taken on this clock 7
      logic [NT-1:0] nxt;
      for (int t = 0; t < NT; t++) begin
        nxt[t] = ($urandom % 3 == 0);
        coef_msbs[t] = rand_msbs(nxt[t]);
      end
      chk(load == 2'b11, "load on clock 7");
      @(negedge clk);
      exp_mode = nxt;
      for (int k = 0; k < 7; k++) begin
        for (int t = 0; t < NT; t++) begin
          coef_msbs[t] = 5'($urandom);     // mid-period words never change the mode
          chk(mode_sel[t] == exp_mode[t], $sformatf("mode p%0d k%0d t%0d", p, k, t));
          chk(load[t] == (k == 3 && !exp_mode[t]), $sformatf("load p%0d k%0d t%0d", p, k, t));
          chk(lsb_en[t] == (k == 0 || (k == 4 && !exp_mode[t])), "lsb_en");
        end
        chk(error  == (exp_mode == 2'b11), "Error = A & B");
        chk(conoff == ^exp_mode, "Conoff = A ^ B");
        if (exp_mode != 2'b00) chk(aorbtoc == exp_mode[1], "AorBtoC");
        @(negedge clk);
      end
      if (exp_mode == 2'b11) n_err++;
      if (^exp_mode) n_on++;
    end
    chk(n_err > 0 && n_on > 0, "both Error and Conoff periods occurred");
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
