// tb_bs_mult4: the 4-bit bit-serial Booth multiplier (two cells) on a gap-
// free stream of random frames of 4 and 8 clocks. Each product read from
// the ProductLow/ProductHigh wires must equal X * Y[3:0] (both signed),
// computed here by integer multiplication; the first product must leave
// ProductLow on the fourth clock after its LSBEnable (two clocks of input
// alignment plus one register per cell).
module tb_bs_mult4;
  import bs_pkg::*;
  localparam int NFR = 400;
  localparam int MAXC = NFR * 8 + 100;

  logic clk = 1'b0, rst = 1'b1;
  logic g_x = 0, g_y = 0, g_lsb = 0, g_m8 = 0;
  logic [1:0] dx = '0, dl = '0, dm = '0;
  bs_line_t li, lo_line;

  bs_mult4 #(.FIRST_IDX(0)) dut (.clk(clk), .rst(rst), .li(li), .lo_line(lo_line));
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) begin
      dx <= '0; dl <= '0; dm <= '0;
    end else begin
      dx <= {dx[0], g_x}; dl <= {dl[0], g_lsb}; dm <= {dm[0], g_m8};
    end
  end
  always_comb begin
    li = '0;
    li.x = dx[1]; li.tx = dm[1]; li.lsb = g_lsb; li.tl = g_m8;
    li.y = g_y;   li.ty = g_m8;  li.w0 = dl[1];  li.m8w = dm[1];
  end

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  bit rw0 [MAXC], rm8 [MAXC], rlo [MAXC], rhi [MAXC];
  int ncyc = 0, first_lsb = -1, first_w0 = -1;
  always @(posedge clk) if (!rst && ncyc < MAXC) begin
    rw0[ncyc] = lo_line.w0; rm8[ncyc] = lo_line.m8w; rlo[ncyc] = lo_line.lo; rhi[ncyc] = lo_line.hi;
    if (g_lsb && first_lsb < 0) first_lsb = ncyc;
    if (lo_line.w0 && first_w0 < 0) first_w0 = ncyc;
    ncyc++;
  end

  int expv [$];
  bit expm [$];
  int n4 = 0, n8 = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      bit m8; int L; logic [3:0] x; logic [7:0] y;
      m8 = 1'($urandom);
      L  = m8 ? 8 : 4;
      x  = 4'($urandom);
      y  = 8'($urandom);
      expv.push_back(int'(signed'(x)) * int'(signed'(y[3:0])));
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

    chk(first_w0 - first_lsb == 4, $sformatf("ProductLow starts %0d clocks after LSBEnable", first_w0 - first_lsb));
    begin
      int f;
      f = 0;
      for (int c = 0; c + 12 < ncyc; c++) if (rw0[c]) begin
        int L; logic [11:0] v; int got;
        L = rm8[c] ? 8 : 4;
        v = '0;
        for (int k = 0; k < L; k++) v[k] = rlo[c+k];
        for (int k = 0; k < 4; k++) v[L+k] = rhi[c+L+k];
        got = int'(signed'(v << (8 - L))) >>> (8 - L);
        if (f < NFR) begin
          chk(rm8[c] == expm[f], $sformatf("frame %0d length", f));
          chk(got == expv[f], $sformatf("frame %0d got %0d exp %0d", f, got, expv[f]));
          if (expm[f]) n8++; else n4++;
        end
        f++;
      end
      chk(f == NFR, $sformatf("saw %0d frames", f));
      chk(n4 > 0 && n8 > 0, "both frame lengths seen");
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
