// tb_col_module: column module (CP1 -> REG2 -> CP2) on a row-transformed
// 9 x 9 block held in a behavioural array. Following the step schedule,
// CP1 takes odd row 2m+1 while CP2, started L + 1 = 4 cycles later, takes
// even row 2m using CP1's results through REG2; rows 0 and n-1 go through
// CP2 unchanged. Every result is compared with an integer (5,3) column
// model; each processor must deliver one result per cycle and CP2's first
// result must follow CP1's by L + 1 cycles. Run for n = 9 and n = 5.
// Then the four-matrix mode: lifting steps 3 and 4 of the (9,7) filter
// along each row, with the boundary samples passed by CP2; results are
// compared with a fixed-point model (14 fraction bits, floor), and CP2 must
// follow CP1 by L cycles. Rows are started back to back, one every n/2 + 1
// cycles; CP2 must then deliver a result every cycle.
module tb_col_module;
  import dwt_pkg::*;

  localparam int N  = 9;
  localparam int AW = $clog2(N);
  localparam int L  = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [AW-1:0] n;
  logic          start1 = 0, start2 = 0, pass2 = 0, busy, mode4m = 0;
  lift_cfg_t     cfg1 = CFG53_HP, cfg2 = CFG53_LP;
  logic [AW-1:0] row1 = '0, row2 = '0;
  logic [AW-1:0] yr_row [4], yr_col [4];
  sample_t       yr_d [4];
  logic [AW-1:0] zr_row, zr_col;
  sample_t       zr_d;
  logic          z1_valid, z2_valid;
  logic [AW-1:0] z1_row, z1_col, z2_row, z2_col;
  sample_t       z1_d, z2_d;

  col_module #(.N(N)) dut (.clk, .rst_n, .n, .mode4m, .cfg_cp1(cfg1), .cfg_cp2(cfg2),
    .start1, .row1, .start2, .row2, .pass2, .busy, .yr_row, .yr_col, .yr_d,
    .zr_row, .zr_col, .zr_d, .z1_valid, .z1_row, .z1_col, .z1_d,
    .z2_valid, .z2_row, .z2_col, .z2_d);

  sample_t y [N][N];
  sample_t zmem [N][N];     // behavioural MEM2_3
  int      z [N][N];
  int      got [N][N];
  int      cnt [N][N];

  always_comb begin
    for (int p = 0; p < 4; p++) yr_d[p] = y[yr_row[p] % N][yr_col[p] % N];
    zr_d = zmem[zr_row % N][zr_col % N];
  end

  int t_first1, t_first2, last1, last2, gaps, gaps1;
  always @(negedge clk) begin
    if (rst_n) begin
      if (z1_valid) begin
        if (t_first1 < 0) t_first1 = cyc;
        if (last1 >= 0 && cyc != last1 + 1 && cyc < last1 + 8) gaps1++;
        last1 = cyc;
        got[z1_row][z1_col] = int'(z1_d);
        cnt[z1_row][z1_col]++;
      end
      if (z2_valid) begin
        if (t_first2 < 0) t_first2 = cyc;
        if (last2 >= 0 && cyc != last2 + 1 && cyc < last2 + 8) gaps++;
        last2 = cyc;
        got[z2_row][z2_col] = int'(z2_d);
        cnt[z2_row][z2_col]++;
      end
    end
  end
  always @(posedge clk) if (z1_valid) zmem[z1_row][z1_col] <= z1_d;

  task automatic run(int nn);
    int h;
    h = nn / 2;
    n = AW'(nn);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        y[r][c] = sample_t'($urandom_range(2047)) - 1024;
        z[r][c] = y[r][c];
        got[r][c] = 0;
        cnt[r][c] = 0;
      end
    for (int c = 0; c < nn; c++) begin
      for (int r = 1; r < nn - 1; r += 2) z[r][c] = y[r][c] - ((int'(y[r-1][c]) + int'(y[r+1][c])) >>> 1);
      for (int r = 2; r < nn - 1; r += 2) z[r][c] = y[r][c] + ((z[r-1][c] + z[r+1][c]) >>> 2);
    end
    t_first1 = -1; t_first2 = -1; last1 = -1; last2 = -1; gaps = 0; gaps1 = 0;
    for (int m = 0; m <= h; m++) begin
      int t0;
      @(negedge clk);
      t0 = cyc;
      if (m < h) begin
        start1 = 1;
        row1 = AW'(2 * m + 1);
      end
      @(negedge clk);
      start1 = 0;
      repeat (L) @(negedge clk);
      start2 = 1;
      row2   = AW'(2 * m);
      pass2  = (m == 0) || (m == h);
      @(negedge clk);
      start2 = 0;
      while (cyc < t0 + nn + 2 * L + 3) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    for (int r = 0; r < nn; r++)
      for (int c = 0; c < nn; c++) begin
        checks++;
        if (cnt[r][c] != 1 || got[r][c] != z[r][c]) begin
          failures++;
          $display("n=%0d z[%0d][%0d] = %0d (x%0d) expected %0d", nn, r, c, got[r][c], cnt[r][c], z[r][c]);
        end
      end
    checks += 2;
    if (t_first2 - t_first1 != L + 1) begin
      failures++;
      $display("CP2 follows CP1 by %0d cycles", t_first2 - t_first1);
    end
    if (gaps + gaps1 != 0) begin
      failures++;
      $display("%0d gaps inside a row", gaps + gaps1);
    end
  endtask

  function automatic int mstep(int x, int l, int r, int coef);
    longint p;
    p = (longint'(l + r) * longint'(coef)) >>> FRAC;
    return int'(sample_t'(longint'(x) + p));
  endfunction

  // four-matrix mode: every row r < nn goes through steps 3 and 4
  task automatic run4(int nn);
    int h;
    h = nn / 2;
    n = AW'(nn);
    mode4m = 1;
    cfg1 = CFG97_C;
    cfg2 = CFG97_D;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        y[r][c] = sample_t'($urandom_range(2047)) - 1024;
        z[r][c] = y[r][c];
        got[r][c] = 0;
        cnt[r][c] = 0;
      end
    for (int r = 0; r < nn; r++) begin
      for (int c = 1; c < nn - 1; c += 2) z[r][c] = mstep(y[r][c], y[r][c-1], y[r][c+1], 14466);
      for (int c = 2; c < nn - 1; c += 2) z[r][c] = mstep(y[r][c], z[r][c-1], z[r][c+1], 7266);
    end
    // rows back to back, one every h + 1 cycles as in the controller's schedule
    t_first1 = -1; t_first2 = -1; last1 = -1; last2 = -1; gaps = 0; gaps1 = 0;
    @(negedge clk);
    for (int r = 0; r < nn; r++) begin
      int t0;
      t0 = cyc;
      start1 = 1;
      row1 = AW'(r);
      @(negedge clk);
      start1 = 0;
      while (cyc < t0 + h + 1) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    for (int r = 0; r < nn; r++)
      for (int c = 0; c < nn; c++) begin
        checks++;
        if (cnt[r][c] != 1 || got[r][c] != z[r][c]) begin
          failures++;
          $display("4M n=%0d z[%0d][%0d] = %0d (x%0d) expected %0d", nn, r, c, got[r][c], cnt[r][c], z[r][c]);
        end
      end
    checks += 2;
    if (t_first2 - t_first1 != L) begin
      failures++;
      $display("4M: CP2 follows CP1 by %0d cycles", t_first2 - t_first1);
    end
    // CP2 delivers h + 1 results per h + 1 cycles; CP1 pauses once per row
    if (gaps != 0 || gaps1 != nn - 1) begin
      failures++;
      $display("4M: CP2 gaps %0d, CP1 gaps %0d (expected %0d)", gaps, gaps1, nn - 1);
    end
    mode4m = 0;
    cfg1 = CFG53_HP;
    cfg2 = CFG53_LP;
  endtask

  initial begin
    n = AW'(N);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(9);
    run(5);
    run4(9);
    run4(5);
    run(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
