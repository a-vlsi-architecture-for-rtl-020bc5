// tb_dwt2d_top: end-to-end test of the multi-level 2D transform, (5,3) and
// (9,7) filters.
//
// Loads random N x N blocks into MEM1, runs transforms of 1, 2 and 3 levels
// with either filter on the top at its default parameters, and compares every
// coefficient leaving out1/out2 with a reference computed here (row lifting
// then column lifting, first and last sample kept, LL quarter compacted for
// the next level). It also checks that each coefficient appears exactly
// once, that bands match row/column parity, and the cycle count from start
// to done against (n/2 + 2) * max(n, 2*TM + 5) + n + 2*TM + 7 per (5,3) level and
// 2 (n P + 4*TM + 13) per (9,7) level, P the line period. The (9,7) model repeats the
// fixed-point arithmetic of the datapath (14 fraction bits, floor).
// Mechanisms counted: level switches, boundary (pass) rows in CP2, LL
// write-back reuse, levels where RP2 has no interior sample to compute
// (n = 3), (9,7) levels, switches from the row pass to the column pass,
// in-place writes of the row pass.
module tb_dwt2d_top;
  import dwt_pkg::*;

  localparam int N  = 9;
  localparam int TM = 1;
  localparam int AW = $clog2(N);
  localparam int L  = TM + 2;
  // step length of a (5,3) level: n cycles, but at least 2L + 1
  // line period of a (9,7) pass: n/2 + 1, at least ceil((3L + 4) / 4) for n >= 7
  function automatic int p4len(int nn);
    return (nn >= 7 && nn / 2 + 1 < (3 * L + 7) / 4) ? (3 * L + 7) / 4 : nn / 2 + 1;
  endfunction
  function automatic int s2len(int nn);
    return nn > 2 * L + 1 ? nn : 2 * L + 1;
  endfunction

  logic          clk = 0, rst_n = 0;
  logic          load_we = 0;
  logic [AW-1:0] load_row = '0, load_col = '0;
  sample_t       load_d = '0;
  logic          start = 0;
  logic [2:0]    levels = 3'd1;
  filter_e       filter = FILT_53;
  bit            f97 = 1'b0;      // filter of the reference model
  logic          busy, done;
  logic          out1_valid, out2_valid;
  logic [2:0]    out1_level, out2_level;
  logic [AW-1:0] out1_row, out1_col, out2_row, out2_col;
  band_e         out1_band, out2_band;
  sample_t       out1_d, out2_d;

  dwt2d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----------------------------------------------------------
  int img  [N][N];
  int ref_c [3][N][N];    // expected coefficients per level
  int got  [3][N][N];
  int seen [3][N][N];

  // one lifting step: x + floor(coef * (l + r) / 2^14), 16-bit result
  function automatic int mstep(int x, int l, int r, int coef);
    longint p;
    p = (longint'(l + r) * longint'(coef)) >>> FRAC;
    return int'(sample_t'(longint'(x) + p));
  endfunction

  function automatic int mscale(int x, int coef);
    return int'(sample_t'((longint'(x) * longint'(coef)) >>> FRAC));
  endfunction

  function automatic void lift_line(ref int v [N], input int n);
    int t [N];
    for (int i = 0; i < n; i++) t[i] = v[i];
    if (!f97) begin
      for (int i = 1; i < n - 1; i += 2) t[i] = v[i] - ((v[i-1] + v[i+1]) >>> 1);
      for (int i = 2; i < n - 1; i += 2) t[i] = v[i] + ((t[i-1] + t[i+1]) >>> 2);
    end else begin
      // (9,7): alpha, beta, gamma, delta, then K / (1/K); ends kept
      for (int i = 1; i < n - 1; i += 2) t[i] = mstep(t[i], t[i-1], t[i+1], -25987);
      for (int i = 2; i < n - 1; i += 2) t[i] = mstep(t[i], t[i-1], t[i+1], -868);
      for (int i = 1; i < n - 1; i += 2) t[i] = mstep(t[i], t[i-1], t[i+1], 14466);
      for (int i = 2; i < n - 1; i += 2) t[i] = mstep(t[i], t[i-1], t[i+1], 7266);
      for (int i = 1; i < n - 1; i += 2) t[i] = mscale(t[i], 20155);
      for (int i = 2; i < n - 1; i += 2) t[i] = mscale(t[i], 13318);
    end
    for (int i = 0; i < n; i++) v[i] = t[i];
  endfunction

  task automatic compute_ref(input int nlev);
    int a [N][N];
    int line [N];
    int n;
    a = img;
    n = N;
    for (int l = 0; l < nlev; l++) begin
      for (int r = 0; r < n; r++) begin
        for (int c = 0; c < n; c++) line[c] = a[r][c];
        lift_line(line, n);
        for (int c = 0; c < n; c++) a[r][c] = line[c];
      end
      for (int c = 0; c < n; c++) begin
        for (int r = 0; r < n; r++) line[r] = a[r][c];
        lift_line(line, n);
        for (int r = 0; r < n; r++) a[r][c] = line[r];
      end
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) ref_c[l][r][c] = a[r][c];
      for (int r = 0; r < n; r += 2)
        for (int c = 0; c < n; c += 2) a[r/2][c/2] = a[r][c];
      n = n / 2 + 1;
    end
  endtask

  // ---- output collection ----------------------------------------------------------
  int n_out = 0;
  always @(posedge clk) begin
    if (rst_n && out1_valid) begin
      got[out1_level][out1_row][out1_col] = int'(out1_d);
      seen[out1_level][out1_row][out1_col]++;
      n_out++;
      checks++;
      if (!out1_row[0] || out1_band != band_e'({out1_row[0], out1_col[0]})) begin
        failures++;
        $display("out1 carries row %0d band %0d", out1_row, out1_band);
      end
    end
    if (rst_n && out2_valid) begin
      got[out2_level][out2_row][out2_col] = int'(out2_d);
      seen[out2_level][out2_row][out2_col]++;
      n_out++;
      checks++;
      if (out2_row[0] || out2_band != band_e'({out2_row[0], out2_col[0]})) begin
        failures++;
        $display("out2 carries row %0d band %0d", out2_row, out2_band);
      end
    end
  end

  // ---- mechanism counters ---------------------------------------------------------
  int cnt_level_switch = 0, cnt_pass_row = 0, cnt_ll_wb = 0, cnt_rp2_idle_level = 0;
  int cnt_97_level = 0, cnt_col_pass = 0, cnt_inplace_wb = 0;
  logic [2:0] level_q = '0;
  always @(posedge clk) begin
    if (dut.busy && dut.level != level_q) cnt_level_switch++;
    level_q <= dut.level;
    if (dut.cp2_start && dut.cp2_pass) cnt_pass_row++;
    if (dut.m1_we[1] && !(dut.mode4m && !dut.xpose)) cnt_ll_wb++;
    if (dut.u_ctrl.pass_end && !dut.xpose) cnt_col_pass++;
    if (dut.m1_we[2]) cnt_inplace_wb++;
  end

  // ---- one transform ------------------------------------------------------------------
  task automatic run(input int nlev, input int seed_mode, input bit use97 = 1'b0);
    int n, exp_cycles, t0, nexp;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        img[r][c] = (seed_mode == 0) ? int'($urandom_range(255)) : int'($urandom_range(255)) - 128;
    for (int l = 0; l < 3; l++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          got[l][r][c] = 0;
          seen[l][r][c] = 0;
        end
    f97 = use97;
    compute_ref(nlev);
    // load the block through the external-memory port
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        load_we  = 1;
        load_row = AW'(r);
        load_col = AW'(c);
        load_d   = sample_t'(img[r][c]);
      end
    @(negedge clk);
    load_we = 0;
    levels  = 3'(nlev);
    filter  = use97 ? FILT_97 : FILT_53;
    start   = 1;
    t0      = cyc;
    @(negedge clk);
    start = 0;
    @(posedge done);
    // cycle count
    exp_cycles = 0;
    n = N;
    nexp = 0;
    for (int l = 0; l < nlev; l++) begin
      if (use97) begin
        exp_cycles += 2 * (n * p4len(n) + 4 * L + 5);
        cnt_97_level++;
      end else begin
        exp_cycles += (n / 2 + 2) * s2len(n) + n + 2 * L + 3;
      end
      nexp += n * n;
      if (n == 3) cnt_rp2_idle_level++;
      n = n / 2 + 1;
    end
    checks++;
    if (cyc - t0 != exp_cycles + 1) begin
      failures++;
      $display("cycle count %0d, expected %0d", cyc - t0, exp_cycles + 1);
    end
    repeat (3) @(posedge clk);
    // compare every coefficient of every level
    n = N;
    for (int l = 0; l < nlev; l++) begin
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          checks++;
          if (seen[l][r][c] != 1 || sample_t'(ref_c[l][r][c]) != sample_t'(got[l][r][c])) begin
            failures++;
            if (failures < 10)
              $display("level %0d (%0d,%0d): got %0d (seen %0d) expected %0d",
                       l, r, c, got[l][r][c], seen[l][r][c], ref_c[l][r][c]);
          end
        end
      n = n / 2 + 1;
    end
    checks++;
    if (n_out != nexp) begin
      failures++;
      $display("%0d coefficients out, expected %0d", n_out, nexp);
    end
    n_out = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    run(3, 0);
    run(1, 1);
    run(3, 1);
    run(1, 0, 1'b1);
    run(3, 0, 1'b1);
    run(3, 1, 1'b1);
    run(2, 0, 1'b0);
    $display("mechanisms: level switches %0d, pass rows %0d, LL write-backs %0d, n=3 levels %0d",
             cnt_level_switch, cnt_pass_row, cnt_ll_wb, cnt_rp2_idle_level);
    $display("(9,7): levels %0d, row-to-column pass switches %0d, in-place row-pass writes %0d",
             cnt_97_level, cnt_col_pass, cnt_inplace_wb);
    checks += 7;
    if (cnt_97_level == 0) failures++;
    if (cnt_col_pass == 0) failures++;
    if (cnt_inplace_wb == 0) failures++;
    if (cnt_level_switch == 0) failures++;
    if (cnt_pass_row == 0) failures++;
    if (cnt_ll_wb == 0) failures++;
    if (cnt_rp2_idle_level == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
