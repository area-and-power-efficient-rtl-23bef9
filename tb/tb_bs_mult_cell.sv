// tb_bs_mult_cell: two unit-cells tested on their own, each fed the wires a
// cell in that position of a chain would see.
//   cell 0 (first cell, Y-1 = 0): its products must be Z0 * X
//   cell 2 (a middle cell):       its products must be Z2 * 16 * X
// where Z_i = -2*Y[2i+1] + Y[2i] + Y[2i-1] is the radix-4 Booth digit of
// Table 2.3, computed here from the integer coefficient. Frames of 4 and 8
// clocks are mixed at random. The output wires are recorded every clock
// and decoded afterwards: L bits of ProductLow from each weight-0 marker,
// then four bits of ProductHigh, as a signed (L+4)-bit number.
module tb_bs_mult_cell;
  import bs_pkg::*;
  localparam int NFR = 300;
  localparam int MAXC = NFR * 8 + 100;

  logic clk = 1'b0, rst = 1'b1;
  // the serial stream as it leaves the PSCs: one bit per clock
  logic g_x = 0, g_y = 0, g_lsb = 0, g_m8 = 0;
  bs_line_t in0, in2, out0, out2;

  bs_mult_cell #(.IDX(0)) dut0 (.clk(clk), .rst(rst), .li(in0), .lo_line(out0));
  bs_mult_cell #(.IDX(2)) dut2 (.clk(clk), .rst(rst), .li(in2), .lo_line(out2));

  always #5 clk = ~clk;

  // delay lines that put each cell at its place in a chain:
  // cell i sees lsb delayed 3i, x delayed 2+3i, y delayed i, w0 delayed 2+i
  logic [15:0] hx, hy, hl, hm;
  always_ff @(posedge clk) begin
    if (rst) begin
      hx <= '0; hy <= '0; hl <= '0; hm <= '0;
    end else begin
      hx <= {hx[14:0], g_x}; hy <= {hy[14:0], g_y};
      hl <= {hl[14:0], g_lsb}; hm <= {hm[14:0], g_m8};
    end
  end
  function automatic logic tap(input logic [15:0] h, input logic now, input int d);
    return (d == 0) ? now : h[d-1];
  endfunction
  always_comb begin
    in0 = '0; in2 = '0;
    in0.x = tap(hx, g_x, 2);  in0.tx = tap(hm, g_m8, 2);
    in0.lsb = g_lsb;          in0.tl = g_m8;
    in0.y = g_y;              in0.ty = g_m8;
    in0.w0 = tap(hl, g_lsb, 2); in0.m8w = tap(hm, g_m8, 2);
    in2.x = tap(hx, g_x, 8);  in2.tx = tap(hm, g_m8, 8);
    in2.lsb = tap(hl, g_lsb, 6); in2.tl = tap(hm, g_m8, 6);
    in2.y = tap(hy, g_y, 2);  in2.ty = tap(hm, g_m8, 2);
    in2.w0 = tap(hl, g_lsb, 4); in2.m8w = tap(hm, g_m8, 4);
  end

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // recorded outputs
  bit rw0 [2][MAXC], rm8 [2][MAXC], rlo [2][MAXC], rhi [2][MAXC];
  int ncyc = 0;
  always @(posedge clk) if (!rst && ncyc < MAXC) begin
    rw0[0][ncyc] = out0.w0; rm8[0][ncyc] = out0.m8w; rlo[0][ncyc] = out0.lo; rhi[0][ncyc] = out0.hi;
    rw0[1][ncyc] = out2.w0; rm8[1][ncyc] = out2.m8w; rlo[1][ncyc] = out2.lo; rhi[1][ncyc] = out2.hi;
    ncyc++;
  end

  function automatic int booth_digit(input logic [7:0] y, input int i);
    int ym1;
    ym1 = (i == 0) ? 0 : int'(y[2*i-1]);
    return -2 * int'(y[2*i+1]) + int'(y[2*i]) + ym1;
  endfunction

  int exp0 [$], exp2 [$];
  bit expm [$];

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      bit m8; int L; logic [3:0] x; logic [7:0] y; int wb;
      m8 = 1'($urandom);
      L  = m8 ? 8 : 4;
      x  = 4'($urandom);
      y  = m8 ? 8'($urandom) : 8'(signed'(4'($urandom)));
      wb = L + 4;
      // expected products, reduced to L+4 bits and read back as signed
      exp0.push_back(int'(signed'(12'(int'(signed'(x)) * booth_digit(y, 0)))) <<< (12 - wb) >>> (12 - wb));
      exp2.push_back(m8 ? int'(signed'(12'(int'(signed'(x)) * booth_digit(y, 2) * 16))) : 0);
      expm.push_back(m8);
      for (int k = 0; k < L; k++) begin
        g_lsb = (k == 0); g_m8 = m8;
        g_x = x[k > 3 ? 3 : k];
        g_y = y[k];
        @(negedge clk);
      end
    end
    g_lsb = 0; g_m8 = 0; g_x = 0; g_y = 0;
    repeat (40) @(negedge clk);

    // decode cell 0: every frame
    begin
      int f;
      f = 0;
      for (int c = 0; c + 12 < ncyc; c++) if (rw0[0][c]) begin
        int L; logic [11:0] v; int got;
        L = rm8[0][c] ? 8 : 4;
        v = '0;
        for (int k = 0; k < L; k++) v[k] = rlo[0][c+k];
        for (int k = 0; k < 4; k++) v[L+k] = rhi[0][c+L+k];
        got = int'(signed'(v << (8 - L))) >>> (8 - L);
        if (f < NFR) begin
          chk(rm8[0][c] == expm[f], $sformatf("cell0 frame %0d length", f));
          chk(got == exp0[f], $sformatf("cell0 frame %0d got %0d exp %0d", f, got, exp0[f]));
        end
        f++;
      end
      chk(f >= NFR, $sformatf("cell0 saw %0d frames", f));
    end
    // decode cell 2: only 8-bit frames carry digit 2
    begin
      int f;
      f = 0;
      for (int c = 0; c + 12 < ncyc; c++) if (rw0[1][c]) begin
        int L; logic [11:0] v; int got;
        L = rm8[1][c] ? 8 : 4;
        v = '0;
        for (int k = 0; k < L; k++) v[k] = rlo[1][c+k];
        for (int k = 0; k < 4; k++) v[L+k] = rhi[1][c+L+k];
        got = (L == 8) ? int'(signed'(v)) : 0;
        if (f < NFR && expm[f])
          chk(got == exp2[f], $sformatf("cell2 frame %0d got %0d exp %0d", f, got, exp2[f]));
        f++;
      end
    end
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
