// col_module: the column module, CP1 -> REG2 -> CP2.
//
// The column transform is computed row by row, so that the column
// processors need not wait for the whole row transform to finish. With y the
// row-transformed block in MEM2 and z the result, for the (5,3) filter:
//   CP1 (odd row 2m+1):  z[2m+1][j] = y[2m+1][j] - (y[2m][j] + y[2m+2][j]) / 2
//   CP2 (even row 2m):   z[2m][j]   = y[2m][j]   + (z[2m-1][j] + z[2m+1][j]) / 4
// for every column j = 0 .. n-1. The first and last rows are kept:
// z[0][j] = y[0][j], z[n-1][j] = y[n-1][j]; CP2 produces them with its lifting
// operands forced to zero ('pass2'), so they leave with the same latency.
//
// How it works: 'start1' begins CP1 on odd row 'row1'; each cycle CP1 takes
// column j, reading y[row1-1][j], y[row1+1][j] and y[row1][j] from MEM2.
// Its result goes to REG2 and leaves on the z1 port (the caller stores it in
// MEM2_3 and sends it out). 'start2' begins CP2 on even row 'row2'; started
// L + 1 cycles after CP1 on row 2m+1, it finds z[2m+1][j] in REG2 in the
// cycle it takes column j, reads z[2m-1][j] from MEM2_3 (written during the
// previous row pair) and y[2m][j] from MEM2. An assertion checks that REG2
// holds the expected sample.
//
// Four-matrix mode (mode4m, used for the (9,7) filter): here the column
// module carries out lifting steps 3 and 4 along the row that the row module
// is working on (steps 1 and 2), a few cycles behind it, reading that row
// from MEM2 as the row module reads MEM1:
//   CP1: z[2i+1] = y[2i+1] + c3 (y[2i] + y[2i+2])          i = 0 .. H-1
//   CP2: z[2i]   = y[2i]   + c4 (z[2i-1] + z[2i+1])        i = 1 .. H-1
// 'start1' with 'row1' begins the row; CP2 is triggered by each CP1 result,
// taking the previous one from REG2. CP2 also emits the boundary samples
// z[0] = y[0] (with CP1's first result) and z[n-1] = y[n-1] (one cycle
// after CP1's last), as pass operations, so rows may follow each other
// every H + 1 cycles. start2/row2/pass2 are unused in this mode. Result tags carry (row, element index).
//
// Timing: one column (or element) per cycle per processor; results leave
// L = TM + 2 cycles after the processor took their operands. Results are
// unscaled.
module col_module
  import dwt_pkg::*;
#(
  parameter int unsigned N  = 9,
  parameter int unsigned TM = 1,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] n,
  input  logic          mode4m,
  input  lift_cfg_t     cfg_cp1,
  input  lift_cfg_t     cfg_cp2,
  input  logic          start1,
  input  logic [AW-1:0] row1,
  input  logic          start2,
  input  logic [AW-1:0] row2,
  input  logic          pass2,
  output logic          busy,
  // MEM2 row-transformed reads: 0 = y[row1-1], 1 = y[row1+1], 2 = y[row1],
  // 3 = y[row2]; in mode4m 0 = y[row1][2i], 1 = y[row1][2i+2],
  // 2 = y[row1][2i+1], 3 = y[row1][2i] for CP2
  output logic [AW-1:0] yr_row [4],
  output logic [AW-1:0] yr_col [4],
  input  sample_t       yr_d   [4],
  // MEM2_3 read: z[row2-1][j]
  output logic [AW-1:0] zr_row,
  output logic [AW-1:0] zr_col,
  input  sample_t       zr_d,
  // CP1 result z[row][col] (odd rows)
  output logic          z1_valid,
  output logic [AW-1:0] z1_row,
  output logic [AW-1:0] z1_col,
  output sample_t       z1_d,
  // CP2 result z[row][col] (even rows)
  output logic          z2_valid,
  output logic [AW-1:0] z2_row,
  output logic [AW-1:0] z2_col,
  output sample_t       z2_d
);

  localparam int unsigned TAG_W = 2 * AW;

  // ---- CP1 column counter ---------------------------------------------------
  logic          act1, act2, pass_q;
  logic [AW-1:0] r1_q, j1_q, r2_q, j2_q;
  logic          last1, last2;
  logic [AW-1:0] h;
  assign h     = n >> 1;
  assign last1 = act1 && (mode4m ? (j1_q == h - 1'b1) : (j1_q == n - 1'b1));
  assign last2 = act2 && (j2_q == n - 1'b1);
  assign busy  = act1 || act2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      act1 <= 1'b0;
      j1_q <= '0;
    end else if (start1) begin
      act1 <= 1'b1;
      j1_q <= '0;
      r1_q <= row1;
    end else if (act1) begin
      act1 <= !last1;
      j1_q <= j1_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      act2   <= 1'b0;
      j2_q   <= '0;
      pass_q <= 1'b0;
    end else if (start2) begin
      act2   <= 1'b1;
      j2_q   <= '0;
      r2_q   <= row2;
      pass_q <= pass2;
    end else if (act2) begin
      act2 <= !last2;
      j2_q <= j2_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(start1 && act1 && !last1)) else $error("col_module: CP1 restarted mid-row");
      assert (!(start2 && act2 && !last2)) else $error("col_module: CP2 restarted mid-row");
    end
  end

  // ---- CP1 -------------------------------------------------------------------
  logic             c1_valid;
  sample_t          c1_y;
  logic [TAG_W-1:0] c1_tag;

  lift_proc #(.TM(TM), .TAG_W(TAG_W)) u_cp1 (
    .clk, .rst_n, .cfg(cfg_cp1),
    .in_valid(act1), .in_a(yr_d[0]), .in_b(yr_d[1]), .in_c(yr_d[2]),
    .in_tag(mode4m ? {r1_q, AW'({j1_q, 1'b1})} : {r1_q, j1_q}),
    .out_valid(c1_valid), .out_y(c1_y), .out_tag(c1_tag));

  // ---- REG2 ------------------------------------------------------------------
  sample_t          r2_d   [1];
  logic [TAG_W-1:0] r2_tag [1];
  logic [0:0]       r2_vld;

  reg_file #(.DEPTH(1), .TAG_W(TAG_W)) u_reg2 (
    .clk, .rst_n, .in_valid(c1_valid), .in_d(c1_y), .in_tag(c1_tag),
    .q(r2_d), .q_tag(r2_tag), .q_valid(r2_vld));

  always_ff @(posedge clk) begin
    if (rst_n && !mode4m && act2 && !pass_q) begin
      assert (r2_vld[0] && r2_tag[0] == {r2_q + 1'b1, j2_q})
        else $error("col_module: REG2 does not hold z[%0d][%0d]", r2_q + 1'b1, j2_q);
    end
  end

  // ---- CP2 -------------------------------------------------------------------
  // Four-matrix mode: CP2 follows CP1's results; 'tail' issues the last
  // boundary sample one cycle after CP1's last result of the row.
  logic [AW-1:0] c1_row, c1_col, c1_i;
  logic          tail_q;
  logic [AW-1:0] tail_row;
  assign {c1_row, c1_col} = c1_tag;
  assign c1_i = c1_col >> 1;

  always_ff @(posedge clk) begin
    if (!rst_n) tail_q <= 1'b0;
    else        tail_q <= mode4m && c1_valid && (c1_i == h - 1'b1);
    tail_row <= c1_row;
  end

  always_ff @(posedge clk) begin
    if (rst_n && mode4m && c1_valid && c1_i != '0) begin
      assert (r2_vld[0] && r2_tag[0] == {c1_row, AW'(c1_col - 2'd2)})
        else $error("col_module: REG2 does not hold the left neighbour");
    end
  end

  logic             m_go, m_pass;
  logic [AW-1:0]    m_row, m_i;
  always_comb begin
    m_go   = tail_q || c1_valid;
    m_pass = tail_q || (c1_i == '0);
    m_row  = tail_q ? tail_row : c1_row;
    m_i    = tail_q ? h : c1_i;
  end

  logic             cp2_go, cp2_pass;
  logic [TAG_W-1:0] cp2_tag;
  sample_t          cp2_a, cp2_b;
  always_comb begin
    if (mode4m) begin
      cp2_go   = m_go;
      cp2_pass = m_pass;
      cp2_tag  = {m_row, AW'({m_i, 1'b0})};
      cp2_a    = r2_d[0];
      cp2_b    = c1_y;
    end else begin
      cp2_go   = act2;
      cp2_pass = pass_q;
      cp2_tag  = {r2_q, j2_q};
      cp2_a    = zr_d;
      cp2_b    = r2_d[0];
    end
    if (cp2_pass) begin
      cp2_a = '0;
      cp2_b = '0;
    end
  end

  logic             c2_valid;
  sample_t          c2_y;
  logic [TAG_W-1:0] c2_tag;

  lift_proc #(.TM(TM), .TAG_W(TAG_W)) u_cp2 (
    .clk, .rst_n, .cfg(cfg_cp2),
    .in_valid(cp2_go), .in_a(cp2_a), .in_b(cp2_b), .in_c(yr_d[3]),
    .in_tag(cp2_tag),
    .out_valid(c2_valid), .out_y(c2_y), .out_tag(c2_tag));

  // ---- memory requests and results ---------------------------------------------
  always_comb begin
    if (mode4m) begin
      yr_row[0] = r1_q;
      yr_row[1] = r1_q;
      yr_row[2] = r1_q;
      yr_row[3] = m_row;
      yr_col[0] = AW'({j1_q, 1'b0});
      yr_col[1] = AW'({j1_q, 1'b0} + 2'd2);
      yr_col[2] = AW'({j1_q, 1'b1});
      yr_col[3] = tail_q ? n - 1'b1 : AW'({m_i, 1'b0});
    end else begin
      yr_row[0] = r1_q - 1'b1;
      yr_row[1] = r1_q + 1'b1;
      yr_row[2] = r1_q;
      yr_row[3] = r2_q;
      for (int p = 0; p < 3; p++) yr_col[p] = j1_q;
      yr_col[3] = j2_q;
    end
    zr_row    = r2_q - 1'b1;
    zr_col    = j2_q;

    z1_valid = c1_valid;
    {z1_row, z1_col} = c1_tag;
    z1_d     = c1_y;
    z2_valid = c2_valid;
    {z2_row, z2_col} = c2_tag;
    z2_d     = c2_y;
  end

endmodule
