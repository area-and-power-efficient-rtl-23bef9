// tb_serial_mult_nxn: the bit-serial Modified Booth multiplier built as a
// stand-alone n x n multiplier, for n = 8 (4 cells) and n = 16 (8 cells).
//
// For each size a gap-free stream of frames of n clocks is driven: signed
// n-bit X and Y, both LSB first, LSBEnable on the first bit, X and the
// weight-0 marker two clocks behind LSBEnable (the alignment the echo
// canceller's filter front end also uses). The product is read back from
// the last cell: weights 0..n-1 from ProductLow during the frame, weights
// n..2n-1 from ProductHigh during the n clocks after it, and must equal
// X * Y computed here by integer multiplication. The first product must
// leave ProductLow 2 + n/2 clocks after its LSBEnable (two clocks of input
// alignment plus one register per cell).
module tb_serial_mult_nxn;
  import bs_pkg::*;
  localparam int NFR = 300;
  localparam int NS  = 2;
  localparam int SIZES [NS] = '{8, 16};
  localparam int MAXC = NFR * 16 + 200;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit done [NS];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  for (genvar s = 0; s < NS; s++) begin : g_size
    localparam int N = SIZES[s];

    logic g_x = 0, g_y = 0, g_lsb = 0;
    logic [1:0] dx, dl;
    bs_line_t li, lo_line;

    bs_mult4 #(.FIRST_IDX(0), .NCELL(N / 2), .DW(N), .SHORT_L(N), .LONG_L(N)) dut (
      .clk(clk), .rst(rst), .li(li), .lo_line(lo_line)
    );

    always_ff @(posedge clk) begin
      if (rst) begin
        dx <= '0; dl <= '0;
      end else begin
        dx <= {dx[0], g_x}; dl <= {dl[0], g_lsb};
      end
    end
    always_comb begin
      li = '0;
      li.lsb = g_lsb; li.y = g_y; li.x = dx[1]; li.w0 = dl[1];
      li.m8w = 1'b1;  li.tl = 1'b1; li.ty = 1'b1; li.tx = 1'b1;
    end

    bit rw0 [MAXC], rlo [MAXC], rhi [MAXC];
    int ncyc = 0, first_lsb = -1, first_w0 = -1;
    always @(posedge clk) if (!rst && ncyc < MAXC) begin
      rw0[ncyc] = lo_line.w0; rlo[ncyc] = lo_line.lo; rhi[ncyc] = lo_line.hi;
      if (g_lsb && first_lsb < 0) first_lsb = ncyc;
      if (lo_line.w0 && first_w0 < 0) first_w0 = ncyc;
      ncyc++;
    end

    longint expv [$];

    initial begin
      wait (!rst);
      repeat (3) @(negedge clk);
      for (int f = 0; f < NFR; f++) begin
        logic [N-1:0] x, y;
        x = N'({$urandom, $urandom});
        y = N'({$urandom, $urandom});
        expv.push_back(longint'(signed'(x)) * longint'(signed'(y)));
        for (int k = 0; k < N; k++) begin
          g_lsb = (k == 0);
          g_x = x[k];
          g_y = y[k];
          @(negedge clk);
        end
      end
      g_lsb = 0; g_x = 0; g_y = 0;
      repeat (2 * N + 20) @(negedge clk);

      chk(first_w0 - first_lsb == 2 + N / 2,
          $sformatf("n=%0d: ProductLow starts %0d clocks after LSBEnable", N, first_w0 - first_lsb));
      begin
        int f;
        f = 0;
        for (int c = 0; c + 2 * N < ncyc; c++) if (rw0[c]) begin
          logic [2*N-1:0] v;
          for (int k = 0; k < N; k++) v[k]     = rlo[c + k];
          for (int k = 0; k < N; k++) v[N + k] = rhi[c + N + k];
          if (f < NFR)
            chk(longint'(signed'(v)) == expv[f],
                $sformatf("n=%0d frame %0d got %0d exp %0d", N, f, longint'(signed'(v)), expv[f]));
          f++;
        end
        chk(f == NFR, $sformatf("n=%0d: saw %0d frames", N, f));
      end
      done[s] = 1'b1;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
  end

  initial begin
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXC + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
