// tb_ls_dwt: checks the three-level DWT against a reference transform.
//
// Two 256 x 256 tiles of random pixels go through the DWT with random input
// gaps. The reference computes the same transform on arrays: level shift,
// then per level every row and then every column with the lifting equations
// and whole-sample symmetric extension, saturated to sign and 9-bit
// magnitude. (5,3) must match exactly; for (9,7) the reference works in real
// numbers and a deviation of up to TOL97 is allowed. Every coefficient
// position of every band must come out exactly once per tile, and the DWT
// must accept one pixel per cycle when not gapped.
module tb_ls_dwt;
  import jp2k_pkg::*;

  localparam int W = 256;
  localparam int NT = 2;
  localparam int TOL97 = 8;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, pix_v = 1'b0;
  logic [7:0] pix;
  filter_e filt;
  logic [2:0] o_v, o_last;
  logic [2:0][6:0] o_row, o_col;
  logic [2:0][3:0][CW-1:0] o_coef;

  ls_dwt #(.W(W)) dut (.clk, .rst_n, .en, .filt, .pix_v, .pix, .o_v, .o_row, .o_col, .o_coef, .o_last);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real img [W][W];
  real ref_c [3][4][W/2][W/2];
  int  seen [3][4][W/2][W/2];
  int  tile_out [3];

  function automatic void lift53(ref real v[W], input int n);
    real t[W];
    for (int i = 0; i < n; i++) t[i] = v[i];
    for (int i = 1; i < n; i += 2) begin
      real a = t[i-1], b = (i+1 < n) ? t[i+1] : t[i-1];
      t[i] = t[i] - $floor((a + b) / 2.0);
    end
    for (int i = 0; i < n; i += 2) begin
      real a = (i > 0) ? t[i-1] : t[i+1], b = t[i+1];
      t[i] = t[i] + $floor((a + b + 2.0) / 4.0);
    end
    for (int i = 0; i < n/2; i++) begin v[i] = t[2*i]; v[n/2+i] = t[2*i+1]; end
  endfunction

  function automatic void lift97(ref real v[W], input int n);
    real t[W];
    real c[4] = '{-1.586134342, -0.052980118, 0.882911076, 0.443506852};
    for (int i = 0; i < n; i++) t[i] = v[i];
    for (int s = 0; s < 4; s++)
      for (int i = (s % 2 == 0) ? 1 : 0; i < n; i += 2) begin
        real a = (i > 0) ? t[i-1] : t[i+1];
        real b = (i+1 < n) ? t[i+1] : t[i-1];
        t[i] = t[i] + c[s] * (a + b);
      end
    for (int i = 0; i < n/2; i++) begin
      v[i] = t[2*i] / 1.230174105; v[n/2+i] = t[2*i+1] * 1.230174105;
    end
  endfunction

  task automatic reference();
    real a [W][W];
    real v [W];
    int n;
    for (int y = 0; y < W; y++) for (int x = 0; x < W; x++) a[y][x] = img[y][x] - 128.0;
    n = W;
    for (int l = 0; l < 3; l++) begin
      for (int y = 0; y < n; y++) begin
        for (int x = 0; x < n; x++) v[x] = a[y][x];
        if (filt == F53) lift53(v, n); else lift97(v, n);
        for (int x = 0; x < n; x++) a[y][x] = v[x];
      end
      for (int x = 0; x < n; x++) begin
        for (int y = 0; y < n; y++) v[y] = a[y][x];
        if (filt == F53) lift53(v, n); else lift97(v, n);
        for (int y = 0; y < n; y++) a[y][x] = v[y];
      end
      for (int r = 0; r < n/2; r++) for (int c = 0; c < n/2; c++) begin
        ref_c[l][BAND_LL][r][c] = a[r][c];
        ref_c[l][BAND_HL][r][c] = a[r][n/2+c];
        ref_c[l][BAND_LH][r][c] = a[n/2+r][c];
        ref_c[l][BAND_HH][r][c] = a[n/2+r][n/2+c];
      end
      for (int r = 0; r < n/2; r++) for (int c = 0; c < n/2; c++) a[r][c] = ref_c[l][BAND_LL][r][c];
      n = n / 2;
    end
  endtask

  function automatic int sm2int(input logic [CW-1:0] s);
    return s[CW-1] ? -int'(s[CW-2:0]) : int'(s[CW-2:0]);
  endfunction
  function automatic int sat(input real r);
    int i = int'(r);
    if (r < 0.0 && real'(i) != r && filt == F53) i = i; // values are integers for (5,3)
    if (i > 511) i = 511;
    if (i < -511) i = -511;
    return i;
  endfunction

  // Compare as coefficients come out (the reference of the tile in flight).
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < 3; l++)
      if (o_v[l] && en) begin
        for (int b = 0; b < 4; b++) begin
          int got, exp;
          if (b == BAND_LL && l != 2) continue;
          got = sm2int(o_coef[l][b]);
          exp = sat(ref_c[l][b][o_row[l]][o_col[l]]);
          checks++;
          if ((filt == F53 && got != exp) || (filt == F97 && (got - exp > TOL97 || exp - got > TOL97))) begin
            failures++;
            if (failures < 10) $display("FAIL l%0d b%0d (%0d,%0d): got %0d exp %0d", l, b, o_row[l], o_col[l], got, exp);
          end
          seen[l][b][o_row[l]][o_col[l]]++;
        end
        if (o_last[l]) tile_out[l]++;
      end
  end

  task automatic run_tiles(input filter_e f, input bit gaps);
    int cycles;
    filt = f;
    for (int t = 0; t < NT; t++) begin
      for (int y = 0; y < W; y++) for (int x = 0; x < W; x++) img[y][x] = real'($urandom_range(0, 255));
      // Wait until the previous tile has fully left before replacing the reference.
      while (t > 0 && tile_out[2] < t) @(posedge clk);
      reference();
      foreach (seen[l, b, r, c]) seen[l][b][r][c] = 0;
      cycles = 0;
      for (int y = 0; y < W; y++) for (int x = 0; x < W; x++) begin
        if (gaps) while ($urandom_range(0, 3) == 0) begin pix_v <= 1'b0; @(posedge clk); end
        pix_v <= 1'b1; pix <= 8'(int'(img[y][x]));
        @(posedge clk); cycles++;
      end
      pix_v <= 1'b0;
      if (!gaps) begin checks++; if (cycles != W * W) failures++; end
      // Last coefficients: the flush of all three levels needs no more input.
      while (tile_out[2] < t + 1) @(posedge clk);
      repeat (20) @(posedge clk);
      for (int l = 0; l < 3; l++) begin
        int m = W >> (l + 1);
        int bad = 0;
        for (int b = 0; b < 4; b++) begin
          if (b == BAND_LL && l != 2) continue;
          for (int r = 0; r < m; r++) for (int c = 0; c < m; c++) if (seen[l][b][r][c] != 1) bad++;
        end
        checks++;
        if (bad != 0) begin failures++; $display("FAIL level %0d: %0d positions not seen once", l, bad); end
      end
    end
  endtask

  initial begin
    tile_out = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_tiles(F53, 1'b0);
    rst_n = 1'b0; @(posedge clk); rst_n = 1'b1; tile_out = '{0, 0, 0};
    run_tiles(F53, 1'b1);
    rst_n = 1'b0; @(posedge clk); rst_n = 1'b1; tile_out = '{0, 0, 0};
    run_tiles(F97, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
