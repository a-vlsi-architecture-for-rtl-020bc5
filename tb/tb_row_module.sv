// tb_row_module: row module (RP1 -> REG1 -> RP2) on a 9 x 9 block held in a
// behavioural array, rows issued back to back in the order 0, 2, 1, 4, 3,
// 6, 5, 8, 7. Checks every odd (RP1), even interior (RP2) and boundary
// sample against an integer (5,3) model, that RP1 delivers one result per
// cycle without gaps between rows, and the (5,3) schedule timing: with RP1
// taking its first pair in cycle 1, RP2 takes its first in cycle 5 and the
// first high-pass result y[0][1] is complete at the end of cycle 3.
// A second pass uses n = 5 on the same module.
module tb_row_module;
  import dwt_pkg::*;

  localparam int N  = 9;
  localparam int AW = $clog2(N);
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
  logic          start = 0, busy;
  logic [AW-1:0] start_row = '0;
  logic [3:0]    rd_en;
  logic [AW-1:0] rd_row [4], rd_col [4];
  sample_t       rd_d [4];
  logic          hp_valid, lp_valid;
  logic [AW-1:0] hp_row, hp_i, lp_row, lp_i;
  sample_t       hp_d, lp_d;
  logic [1:0]    bd_we;
  logic [AW-1:0] bd_row [2];
  sample_t       bd_d [2];

  row_module #(.N(N)) dut (.clk, .rst_n, .n, .cfg_rp1(CFG53_HP), .cfg_rp2(CFG53_LP),
    .start, .start_row, .busy, .rd_en, .rd_row, .rd_col, .rd_d,
    .hp_valid, .hp_row, .hp_i, .hp_d, .lp_valid, .lp_row, .lp_i, .lp_d,
    .bd_we, .bd_row, .bd_d);

  sample_t x [N][N];
  int      y [N][N];
  int      got [N][N];
  int      cnt [N][N];

  always_comb for (int p = 0; p < 4; p++) rd_d[p] = x[rd_row[p] % N][rd_col[p] % N];

  // results seen mid-cycle (registered at the preceding edge)
  int first_rp1_issue = -1, first_rp2_issue = -1, first_hp = -1;
  int hp_last = -1, hp_gaps = 0, n_hp = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (dut.act && first_rp1_issue < 0) first_rp1_issue = cyc;
      if (dut.p2_go && first_rp2_issue < 0) first_rp2_issue = cyc;
      if (hp_valid) begin
        if (first_hp < 0) first_hp = cyc;
        if (hp_last >= 0 && cyc != hp_last + 1) hp_gaps++;
        hp_last = cyc;
        n_hp++;
        got[hp_row][2*hp_i+1] = int'(hp_d);
        cnt[hp_row][2*hp_i+1]++;
      end
      if (lp_valid) begin
        got[lp_row][2*lp_i] = int'(lp_d);
        cnt[lp_row][2*lp_i]++;
      end
    end
  end
  // boundary writes are combinational with the RP1 issue
  int nn_cur = 9;
  always @(posedge clk) begin
    if (rst_n) begin
      if (bd_we[0]) begin got[bd_row[0]][0] = int'(bd_d[0]); cnt[bd_row[0]][0]++; end
      if (bd_we[1]) begin got[bd_row[1]][nn_cur-1] = int'(bd_d[1]); cnt[bd_row[1]][nn_cur-1]++; end
    end
  end

  task automatic run(int nn);
    int order [N];
    int h, k;
    h = nn / 2;
    nn_cur = nn;
    n = AW'(nn);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        x[r][c] = sample_t'($urandom_range(1023)) - 512;
        got[r][c] = 0;
        cnt[r][c] = 0;
      end
    for (int r = 0; r < nn; r++) begin
      for (int c = 0; c < nn; c++) y[r][c] = x[r][c];
      for (int c = 1; c < nn - 1; c += 2) y[r][c] = x[r][c] - ((int'(x[r][c-1]) + int'(x[r][c+1])) >>> 1);
      for (int c = 2; c < nn - 1; c += 2) y[r][c] = x[r][c] + ((y[r][c-1] + y[r][c+1]) >>> 2);
    end
    // row order 0, 2, 1, 4, 3, ...
    k = 0;
    order[k++] = 0;
    order[k++] = 2;
    for (int o = 1; o < nn; o += 2) begin
      order[k++] = o;
      if (o + 3 < nn) order[k++] = o + 3;
    end
    first_rp1_issue = -1; first_rp2_issue = -1; first_hp = -1; hp_last = -1; hp_gaps = 0; n_hp = 0;
    for (int q = 0; q < nn; q++) begin
      @(negedge clk);
      start = 1;
      start_row = AW'(order[q]);
      @(negedge clk);
      start = 0;
      repeat (h - 2) @(negedge clk);
    end
    repeat (12) @(negedge clk);
    for (int r = 0; r < nn; r++)
      for (int c = 0; c < nn; c++) begin
        checks++;
        if (cnt[r][c] != ((h == 1 && c != 1 && c != 0 && c != nn - 1) ? 0 : 1) || got[r][c] != y[r][c]) begin
          failures++;
          $display("n=%0d y[%0d][%0d] = %0d (x%0d) expected %0d", nn, r, c, got[r][c], cnt[r][c], y[r][c]);
        end
      end
    checks += 3;
    if (first_rp2_issue - first_rp1_issue != 4) begin
      failures++;
      $display("RP2 starts %0d cycles after RP1", first_rp2_issue - first_rp1_issue);
    end
    if (first_hp - first_rp1_issue != 3) begin
      failures++;
      $display("first RP1 result after %0d cycles", first_hp - first_rp1_issue);
    end
    if (hp_gaps != 0 || n_hp != nn * h) begin
      failures++;
      $display("RP1 results %0d, gaps %0d", n_hp, hp_gaps);
    end
  endtask

  initial begin
    n = AW'(N);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(9);
    run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
