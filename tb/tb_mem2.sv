// tb_mem2: writes row-transformed rows through the RP1, RP2 and boundary
// ports and reads them back per sample (row, j) on the column-processor
// ports, for row lengths 9 and 5, with six rows alive at once (four even,
// two odd, the window the schedule needs). Also checks the CP1 row bank.
module tb_mem2;
  import dwt_pkg::*;

  localparam int N  = 9;
  localparam int AW = $clog2(N);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [AW-1:0] n;
  logic          hp_we = 0, lp_we = 0, z_we = 0;
  logic [AW-1:0] hp_row = '0, hp_i = '0, lp_row = '0, lp_i = '0;
  sample_t       hp_d = '0, lp_d = '0;
  logic [1:0]    bd_we = '0;
  logic [AW-1:0] bd_row [2];
  sample_t       bd_d [2];
  logic [AW-1:0] yr_row [4], yr_col [4];
  sample_t       yr_d [4];
  logic [AW-1:0] z_row = '0, z_col = '0, zr_row = '0, zr_col = '0;
  sample_t       z_d = '0, zr_d;

  mem2 #(.N(N)) dut (.*);

  sample_t y [N][N];
  sample_t z [N][N];

  task automatic write_row(int r, int nn);
    int h;
    h = nn / 2;
    for (int j = 0; j < nn; j++) y[r][j] = sample_t'($urandom);
    for (int i = 0; i < h; i++) begin
      @(negedge clk);
      hp_we = 1; hp_row = AW'(r); hp_i = AW'(i); hp_d = y[r][2*i+1];
      lp_we = (i >= 1); lp_row = AW'(r); lp_i = AW'(i); lp_d = y[r][2*i];
      bd_we = {i == h - 1, i == 0};
      bd_row[0] = AW'(r); bd_d[0] = y[r][0];
      bd_row[1] = AW'(r); bd_d[1] = y[r][nn-1];
    end
    @(negedge clk);
    hp_we = 0; lp_we = 0; bd_we = '0;
  endtask

  task automatic read_row(int r, int nn);
    for (int j = 0; j < nn; j++) begin
      for (int p = 0; p < 4; p++) begin
        yr_row[p] = AW'(r);
        yr_col[p] = AW'((j + p) % nn);
      end
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (yr_d[p] != y[r][(j + p) % nn]) begin
          failures++;
          $display("n=%0d y[%0d][%0d] = %0d expected %0d", nn, r, (j + p) % nn, yr_d[p],
                   y[r][(j + p) % nn]);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int rows [6];
    for (int p = 0; p < 2; p++) begin bd_row[p] = '0; bd_d[p] = '0; end
    for (int p = 0; p < 4; p++) begin yr_row[p] = '0; yr_col[p] = '0; end
    foreach (rows[k]) rows[k] = 0;
    for (int sz = 0; sz < 2; sz++) begin
      int nn;
      nn = (sz == 0) ? 9 : 5;
      n = AW'(nn);
      // sliding window: even rows 2m .. 2m+6 and odd rows 2m+1, 2m+3
      for (int m = 0; m + 3 <= (nn - 1) / 2; m++) begin
        rows = '{2*m, 2*m+2, 2*m+4, 2*m+6, 2*m+1, 2*m+3};
        foreach (rows[k]) if (rows[k] < nn) write_row(rows[k], nn);
        foreach (rows[k]) if (rows[k] < nn) read_row(rows[k], nn);
      end
      if (nn == 5) begin
        rows = '{0, 2, 4, 1, 3, 0};
        for (int k = 0; k < 5; k++) write_row(rows[k], nn);
        for (int k = 0; k < 5; k++) read_row(rows[k], nn);
      end
    end
    // CP1 rows: two odd rows alive
    for (int r = 1; r < 5; r += 2) begin
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        z_we = 1; z_row = AW'(r); z_col = AW'(j); z_d = sample_t'($urandom);
        z[r][j] = z_d;
      end
    end
    @(negedge clk);
    z_we = 0;
    for (int r = 1; r < 5; r += 2)
      for (int j = 0; j < N; j++) begin
        zr_row = AW'(r); zr_col = AW'(j);
        #1;
        checks++;
        if (zr_d != z[r][j]) begin failures++; $display("z[%0d][%0d]", r, j); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
