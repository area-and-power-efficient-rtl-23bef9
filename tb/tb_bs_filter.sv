// tb_bs_filter: the two-tap bit-serial filter driven with serial operands,
// as the PSCs and the signal generator would send them, period by period.
// Each 8-clock period a tap gets either two 4-bit frames or one 8-bit frame.
// Checks, from the recorded output wires:
//   - each tap's 4-bit frames give X * Y (4-bit signed Y) on its own wires
//   - a period with exactly one 8-bit tap gives X * Y (8-bit Y) on the
//     shared multiplier's wires, whichever tap it was (AorBtoC)
//   - a period where both taps want 8-bit mode (Error) gives nothing on the
//     shared multiplier (Conoff off), and idle periods leave it silent.
module tb_bs_filter;
  import bs_pkg::*;
  localparam int NT   = 2;
  localparam int NPER = 300;
  localparam int MAXC = NPER * 8 + 100;

  logic clk = 1'b0, rst = 1'b1;
  logic [NT-1:0] ser_data = '0, ser_coef = '0, lsb_en = '0, mode_sel = '0;
  bs_line_t tap_line [NT];
  bs_line_t c_line;

  bs_filter #(.NTAPS(NT)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit rw0 [NT+1][MAXC], rm8 [NT+1][MAXC], rlo [NT+1][MAXC], rhi [NT+1][MAXC];
  int ncyc = 0;
  always @(posedge clk) if (!rst && ncyc < MAXC) begin
    for (int t = 0; t < NT; t++) begin
      rw0[t][ncyc] = tap_line[t].w0; rm8[t][ncyc] = tap_line[t].m8w;
      rlo[t][ncyc] = tap_line[t].lo; rhi[t][ncyc] = tap_line[t].hi;
    end
    rw0[NT][ncyc] = c_line.w0; rm8[NT][ncyc] = c_line.m8w;
    rlo[NT][ncyc] = c_line.lo; rhi[NT][ncyc] = c_line.hi;
    ncyc++;
  end

  int exp4 [NT][$];
  int exp8 [$];
  int n_a8 = 0, n_b8 = 0, n_err = 0, n_idle = 0;

  initial begin
    logic [3:0] x [NT][2];
    logic [7:0] y [NT][2];
    bit big [NT];
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    for (int p = 0; p < NPER; p++) begin
      int nbig;
      nbig = 0;
      for (int t = 0; t < NT; t++) begin
        big[t] = ($urandom % 3 == 0);
        nbig += big[t];
        for (int h = 0; h < 2; h++) begin
          x[t][h] = 4'($urandom);
          y[t][h] = big[t] ? 8'($urandom) : 8'(signed'(4'($urandom)));
        end
      end
      if (nbig == 2) n_err++;
      if (nbig == 0) n_idle++;
      for (int t = 0; t < NT; t++) begin
        if (!big[t]) begin
          for (int h = 0; h < 2; h++)
            exp4[t].push_back(int'(signed'(x[t][h])) * int'(signed'(y[t][h][3:0])));
        end else if (nbig == 1) begin
          exp8.push_back(int'(signed'(x[t][0])) * int'(signed'(y[t][0])));
          if (t == 0) n_a8++; else n_b8++;
        end
      end
      for (int k = 0; k < 8; k++) begin
        for (int t = 0; t < NT; t++) begin
          int h, j;
          h = big[t] ? 0 : k / 4;
          j = big[t] ? k : k % 4;
          mode_sel[t] = big[t];
          lsb_en[t]   = (j == 0);
          ser_data[t] = x[t][h][j > 3 ? 3 : j];
          ser_coef[t] = y[t][h][j];
        end
        @(negedge clk);
      end
    end
    lsb_en = '0; mode_sel = '0; ser_data = '0; ser_coef = '0;
    repeat (40) @(negedge clk);

    for (int o = 0; o <= NT; o++) begin
      int f;
      f = 0;
      for (int c = 0; c + 12 < ncyc; c++) if (rw0[o][c]) begin
        int L; logic [11:0] v; int got;
        L = rm8[o][c] ? 8 : 4;
        v = '0;
        for (int k = 0; k < L; k++) v[k] = rlo[o][c+k];
        for (int k = 0; k < 4; k++) v[L+k] = rhi[o][c+L+k];
        got = int'(signed'(v << (8 - L))) >>> (8 - L);
        if (o < NT) begin
          if (!rm8[o][c]) begin
            if (f < exp4[o].size())
              chk(got == exp4[o][f], $sformatf("tap %0d frame %0d got %0d exp %0d", o, f, got, exp4[o][f]));
            f++;
          end
        end else begin
          chk(rm8[o][c], "shared multiplier only carries 8-bit frames");
          if (f < exp8.size())
            chk(got == exp8[f], $sformatf("C frame %0d got %0d exp %0d", f, got, exp8[f]));
          f++;
        end
      end
      if (o < NT) chk(f == exp4[o].size(), $sformatf("tap %0d: %0d 4-bit results", o, f));
      else        chk(f == exp8.size(), $sformatf("C: %0d 8-bit results of %0d", f, exp8.size()));
    end
    chk(n_a8 > 0 && n_b8 > 0 && n_err > 0 && n_idle > 0, "A, B, Error and idle periods all occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
