// dwt2d_top: multi-level 2D lifting wavelet transform of an N x N block,
// (5,3) or (9,7) filter ('filter'), computed row-column.
//
// The block (N odd; N = 2^k + 1 for several levels) is first written into
// MEM1 through the load port. After 'start' each level runs as follows:
//   row module  (RP1 -> REG1 -> RP2) reads MEM1 and lifts along the rows;
//               its results pass through two S/M units into MEM2;
//   column module (CP1 -> REG2 -> CP2) reads MEM2 and lifts along the
//               columns, working row by row: CP1 produces the odd rows,
//               CP2 the even rows; CP1 keeps its rows in MEM2_3 for CP2.
// Every result leaves through an S/M unit on one of two output ports (out1
// from CP1: odd rows, the LH and HH bands; out2 from CP2: even rows, the LL
// and HL bands), and CP2 writes the LL quarter back into MEM1 as the input
// of the next level. Coordinates on the output ports are those of the
// in-place (interleaved) layout of the level: row and column parity give
// the band. The first and last row and column of each level are kept
// unchanged (block transform with one sample of overlap).
//
// (5,3): y_odd = x_odd - floor((x_left + x_right)/2) and
// y_even = x_even + floor((y_left + y_right)/4), integer arithmetic on DW-bit
// samples; the S/M units are set to 1.
//
// (9,7): four lifting steps and a scaling, so one line needs all four
// processors. A level then takes two passes: the row pass lifts every row
// (RP1, RP2: steps 1 and 2; CP1, CP2 on the same row a few cycles later:
// steps 3 and 4) and writes the rows back into MEM1 in place; the column pass does
// the same with the MEM1 addresses transposed, so each "row" is a column of
// the block. The S/M units after CP1 and CP2 scale high pass samples by K
// and interior low pass samples by 1/K (the boundary samples are kept). The
// outputs carry only the column pass, with its coordinates swapped back;
// its LL samples are written into MEM1 for the next level. Coefficients are
// fixed point with FRAC fraction bits, products rounded down.
//
// Timing: see dwt_ctrl. A (5,3) level of size n takes
// (n/2 + 2) * max(n, 2*TM + 5) + n + 2*TM + 7 cycles, a (9,7) level
// 2 (n P + 4*TM + 13) with the line period P = n/2 + 1 (more for TM >= 4);
// 'done' pulses one cycle after the last level. Output ports carry up to one
// coefficient each per cycle. Load only while 'busy' is low.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned N  = 9,
  parameter int unsigned TM = 1,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned LW = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  // external memory side: write the input block into MEM1
  input  logic          load_we,
  input  logic [AW-1:0] load_row,
  input  logic [AW-1:0] load_col,
  input  sample_t       load_d,
  // control
  input  logic          start,
  input  logic [LW-1:0] levels,
  input  filter_e       filter,
  output logic          busy,
  output logic          done,
  // results of CP1 (odd rows) and CP2 (even rows)
  output logic          out1_valid,
  output logic [LW-1:0] out1_level,
  output logic [AW-1:0] out1_row,
  output logic [AW-1:0] out1_col,
  output band_e         out1_band,
  output sample_t       out1_d,
  output logic          out2_valid,
  output logic [LW-1:0] out2_level,
  output logic [AW-1:0] out2_row,
  output logic [AW-1:0] out2_col,
  output band_e         out2_band,
  output sample_t       out2_d
);

  localparam int unsigned TW = 2 * AW;

  // ---- controller ------------------------------------------------------------
  logic [LW-1:0] level;
  logic [AW-1:0] n;
  logic          mode4m, xpose;
  logic          row_start, cp1_start, cp2_start, cp2_pass;
  logic [AW-1:0] row_row, cp1_row, cp2_row;

  dwt_ctrl #(.N(N), .TM(TM)) u_ctrl (
    .clk, .rst_n, .start, .levels, .filter, .mode4m, .xpose, .busy, .done, .level, .n,
    .row_start, .row_row, .cp1_start, .cp1_row, .cp2_start, .cp2_row, .cp2_pass);

  // ---- MEM1 ------------------------------------------------------------------
  logic [2:0]    m1_we;
  logic [AW-1:0] m1_wrow [3];
  logic [AW-1:0] m1_wcol [3];
  sample_t       m1_wd   [3];
  logic [3:0]    m1_re;
  logic [AW-1:0] m1_rrow [4];
  logic [AW-1:0] m1_rcol [4];
  logic [AW-1:0] rp_row  [4];
  logic [AW-1:0] rp_col  [4];
  sample_t       m1_rd   [4];

  // The column pass of a four-matrix filter reads MEM1 transposed; all four
  // reads of a cycle then fall in one bank, next to a possible LL write, so
  // this instance allows 5 accesses per bank and cycle.
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      m1_rrow[p] = xpose ? rp_col[p] : rp_row[p];
      m1_rcol[p] = xpose ? rp_row[p] : rp_col[p];
    end
  end

  mem1 #(.N(N), .NRD(4), .NWR(3), .MAX_ACC(5)) u_mem1 (
    .clk, .we(m1_we), .wrow(m1_wrow), .wcol(m1_wcol), .wd(m1_wd),
    .re(m1_re), .rrow(m1_rrow), .rcol(m1_rcol), .rd(m1_rd));

  // ---- row module --------------------------------------------------------------
  logic          hp_valid, lp_valid;
  logic [AW-1:0] hp_row, hp_i, lp_row, lp_i;
  sample_t       hp_d, lp_d;
  logic [1:0]    bd_we;
  logic [AW-1:0] bd_row [2];
  sample_t       bd_d   [2];
  logic          row_busy;

  row_module #(.N(N), .TM(TM)) u_row (
    .clk, .rst_n, .n,
    .cfg_rp1(mode4m ? CFG97_A : CFG53_HP), .cfg_rp2(mode4m ? CFG97_B : CFG53_LP),
    .start(row_start), .start_row(row_row), .busy(row_busy),
    .rd_en(m1_re), .rd_row(rp_row), .rd_col(rp_col), .rd_d(m1_rd),
    .hp_valid, .hp_row, .hp_i, .hp_d,
    .lp_valid, .lp_row, .lp_i, .lp_d,
    .bd_we, .bd_row, .bd_d);

  // ---- S/M after RP1 and RP2 -------------------------------------------------------
  logic          smh_valid, sml_valid;
  logic [TW-1:0] smh_tag, sml_tag;
  sample_t       smh_d, sml_d;
  logic [AW-1:0] smh_row, smh_i, sml_row, sml_i;

  sm_unit #(.TAG_W(TW)) u_sm_rp1 (
    .clk, .rst_n, .cfg(SM_UNITY), .in_valid(hp_valid), .in_d(hp_d),
    .in_tag({hp_row, hp_i}), .out_valid(smh_valid), .out_d(smh_d), .out_tag(smh_tag));
  sm_unit #(.TAG_W(TW)) u_sm_rp2 (
    .clk, .rst_n, .cfg(SM_UNITY), .in_valid(lp_valid), .in_d(lp_d),
    .in_tag({lp_row, lp_i}), .out_valid(sml_valid), .out_d(sml_d), .out_tag(sml_tag));
  assign {smh_row, smh_i} = smh_tag;
  assign {sml_row, sml_i} = sml_tag;

  // ---- MEM2 ------------------------------------------------------------------
  logic [AW-1:0] yr_row [4];
  logic [AW-1:0] yr_col [4];
  sample_t       yr_d   [4];
  logic          z1_valid, z2_valid;
  logic [AW-1:0] z1_row, z1_col, z2_row, z2_col, zr_row, zr_col;
  sample_t       z1_d, z2_d, zr_d;

  mem2 #(.N(N), .NRD(4)) u_mem2 (
    .clk, .n,
    .hp_we(smh_valid), .hp_row(smh_row), .hp_i(smh_i), .hp_d(smh_d),
    .lp_we(sml_valid), .lp_row(sml_row), .lp_i(sml_i), .lp_d(sml_d),
    .bd_we, .bd_row, .bd_d,
    .yr_row, .yr_col, .yr_d,
    .z_we(z1_valid), .z_row(z1_row), .z_col(z1_col), .z_d(z1_d),
    .zr_row, .zr_col, .zr_d);

  // ---- column module ----------------------------------------------------------------
  logic col_busy;

  col_module #(.N(N), .TM(TM)) u_col (
    .clk, .rst_n, .n, .mode4m,
    .cfg_cp1(mode4m ? CFG97_C : CFG53_HP), .cfg_cp2(mode4m ? CFG97_D : CFG53_LP),
    .start1(cp1_start), .row1(cp1_row),
    .start2(cp2_start), .row2(cp2_row), .pass2(cp2_pass), .busy(col_busy),
    .yr_row, .yr_col, .yr_d, .zr_row, .zr_col, .zr_d,
    .z1_valid, .z1_row, .z1_col, .z1_d,
    .z2_valid, .z2_row, .z2_col, .z2_d);

  // ---- S/M after CP1 and CP2 ---------------------------------------------------------
  // (9,7): high pass x K, low pass x 1/K, boundary samples unchanged.
  sm_cfg_t       sm1_cfg, sm2_cfg;
  logic          s1_valid, s2_valid;
  logic [TW-1:0] s1_tag, s2_tag;
  sample_t       s1_d, s2_d;
  logic [AW-1:0] s1_row, s1_col, s2_row, s2_col;

  always_comb begin
    sm1_cfg = mode4m ? SM97_HI : SM_UNITY;
    sm2_cfg = (mode4m && z2_col != '0 && z2_col != n - 1'b1) ? SM97_LO : SM_UNITY;
  end

  sm_unit #(.TAG_W(TW)) u_sm_cp1 (
    .clk, .rst_n, .cfg(sm1_cfg), .in_valid(z1_valid), .in_d(z1_d),
    .in_tag({z1_row, z1_col}), .out_valid(s1_valid), .out_d(s1_d), .out_tag(s1_tag));
  sm_unit #(.TAG_W(TW)) u_sm_cp2 (
    .clk, .rst_n, .cfg(sm2_cfg), .in_valid(z2_valid), .in_d(z2_d),
    .in_tag({z2_row, z2_col}), .out_valid(s2_valid), .out_d(s2_d), .out_tag(s2_tag));
  assign {s1_row, s1_col} = s1_tag;
  assign {s2_row, s2_col} = s2_tag;

  // ---- outputs: all of a 2M level, the column pass of a 4M level --------------------
  // In the column pass the tags are (column, element) and are swapped back.
  logic out_en;
  assign out_en = !mode4m || xpose;

  always_comb begin
    out1_valid = s1_valid && out_en;
    out2_valid = s2_valid && out_en;
    out1_d     = s1_d;
    out2_d     = s2_d;
    out1_row   = mode4m ? s1_col : s1_row;
    out1_col   = mode4m ? s1_row : s1_col;
    out2_row   = mode4m ? s2_col : s2_row;
    out2_col   = mode4m ? s2_row : s2_col;
    out1_level = level;
    out2_level = level;
    out1_band  = band_e'({out1_row[0], out1_col[0]});
    out2_band  = band_e'({out2_row[0], out2_col[0]});
  end

  // ---- MEM1 writes: external load, row-pass results (4M), LL write-back -------------
  always_comb begin
    m1_we[0]   = load_we && !busy;
    m1_wrow[0] = load_row;
    m1_wcol[0] = load_col;
    m1_wd[0]   = load_d;
    if (mode4m && !xpose) begin
      // row pass: results back in place
      m1_we[1]   = s2_valid;
      m1_wrow[1] = s2_row;
      m1_wcol[1] = s2_col;
      m1_we[2]   = s1_valid;
      m1_wrow[2] = s1_row;
      m1_wcol[2] = s1_col;
    end else begin
      // LL quarter, compacted, as the next level's input
      m1_we[1]   = out2_valid && !out2_col[0];
      m1_wrow[1] = out2_row >> 1;
      m1_wcol[1] = out2_col >> 1;
      m1_we[2]   = 1'b0;
      m1_wrow[2] = '0;
      m1_wcol[2] = '0;
    end
    m1_wd[1] = s2_d;
    m1_wd[2] = s1_d;
  end

  // Activity that must stay inside a busy period.
  always_ff @(posedge clk) begin
    if (rst_n && !busy) begin
      assert (!row_busy && !col_busy) else $error("dwt2d_top: processors active while idle");
    end
  end

endmodule
