// mem2: MEM2, the buffer between the row module and the column module.
//
// Four banks, organised as in the reference memory organisation:
//   MEM2_0  odd elements of row-transformed rows   (RP1 results, N/2 words)
//   MEM2_1  even interior elements 2 .. n-3         (RP2 results)
//   MEM2_2  the two boundary elements 0 and n-1     (passed through unchanged)
//   MEM2_3  complete odd rows after the column step (CP1 results, read by CP2)
// Only a window of rows is alive at a time, so rows are stored in slots: an
// even row 2m uses slot m mod 4, an odd row 2m+1 slot 4 + (m mod 2) in banks
// 0..2, and in MEM2_3 an odd row 2m+1 uses slot m mod 2. These slot counts
// follow from this design's step schedule (see dwt_ctrl); the reference
// gives per-filter sizes derived from its own cycle-level schedule.
//
// Interface: the writers address their own bank directly (row, index). The
// column processors read a row-transformed sample by (row, column j) on
// NRD combinational ports; the bank is chosen from j and the current row
// length n (j odd: MEM2_0; j = 0 or n-1: MEM2_2; otherwise MEM2_1). MEM2_3
// has its own write and read port.
module mem2
  import dwt_pkg::*;
#(
  parameter int unsigned N   = 9,
  parameter int unsigned NRD = 4,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic [AW-1:0] n,              // current row/column length (odd)
  // RP1 (via its S/M unit): odd element 2i+1 of a row
  input  logic          hp_we,
  input  logic [AW-1:0] hp_row,
  input  logic [AW-1:0] hp_i,
  input  sample_t       hp_d,
  // RP2 (via its S/M unit): even element 2i of a row, 1 <= i <= n/2 - 1
  input  logic          lp_we,
  input  logic [AW-1:0] lp_row,
  input  logic [AW-1:0] lp_i,
  input  sample_t       lp_d,
  // boundary elements: port 0 element 0, port 1 element n-1
  input  logic [1:0]    bd_we,
  input  logic [AW-1:0] bd_row [2],
  input  sample_t       bd_d   [2],
  // column processors: row-transformed sample (row, j)
  input  logic [AW-1:0] yr_row [NRD],
  input  logic [AW-1:0] yr_col [NRD],
  output sample_t       yr_d   [NRD],
  // CP1 results (odd rows after the column step)
  input  logic          z_we,
  input  logic [AW-1:0] z_row,
  input  logic [AW-1:0] z_col,
  input  sample_t       z_d,
  input  logic [AW-1:0] zr_row,
  input  logic [AW-1:0] zr_col,
  output sample_t       zr_d
);

  localparam int unsigned H    = N / 2;
  localparam int unsigned C1   = (H > 2) ? H - 1 : 1;
  localparam int unsigned SLOT = 6;
  localparam int unsigned SW   = 3;
  localparam int unsigned C0W  = (H > 1) ? $clog2(H) : 1;
  localparam int unsigned C1W  = (C1 > 1) ? $clog2(C1) : 1;

  function automatic logic [SW-1:0] slot_of(logic [AW-1:0] r);
    logic [AW-1:0] m;
    m = r >> 1;
    if (r[0]) return {1'b1, 1'b0, m[0]};
    else      return SW'(m & AW'(3));
  endfunction

  // ---- bank 0: odd elements ----------------------------------------------
  logic [SW-1:0]  b0_wrow [1];
  logic [C0W-1:0] b0_wcol [1];
  sample_t        b0_wd   [1];
  logic [SW-1:0]  rslot   [NRD];
  logic [C0W-1:0] b0_rcol [NRD];
  sample_t        b0_rd   [NRD];
  // ---- bank 1: even interior elements ------------------------------------
  logic [SW-1:0]  b1_wrow [1];
  logic [C1W-1:0] b1_wcol [1];
  sample_t        b1_wd   [1];
  logic [C1W-1:0] b1_rcol [NRD];
  sample_t        b1_rd   [NRD];
  // ---- bank 2: boundary elements -----------------------------------------
  logic [SW-1:0]  b2_wrow [2];
  logic [0:0]     b2_wcol [2];
  logic [0:0]     b2_rcol [NRD];
  sample_t        b2_rd   [NRD];
  // ---- bank 3: CP1 rows ---------------------------------------------------
  logic [0:0]     b3_wrow [1];
  logic [AW-1:0]  b3_wcol [1];
  sample_t        b3_wd   [1];
  logic [0:0]     b3_rrow [1];
  logic [AW-1:0]  b3_rcol [1];
  sample_t        b3_rd   [1];

  logic [AW-1:0] jh [NRD];

  always_comb begin
    b0_wrow[0] = slot_of(hp_row);
    b0_wcol[0] = C0W'(hp_i);
    b0_wd[0]   = hp_d;
    b1_wrow[0] = slot_of(lp_row);
    b1_wcol[0] = C1W'(lp_i - 1'b1);
    b1_wd[0]   = lp_d;
    for (int k = 0; k < 2; k++) begin
      b2_wrow[k] = slot_of(bd_row[k]);
      b2_wcol[k] = 1'(k);
    end
    b3_wrow[0] = z_row[1];
    b3_wcol[0] = z_col;
    b3_wd[0]   = z_d;
    b3_rrow[0] = zr_row[1];
    b3_rcol[0] = zr_col;
    zr_d       = b3_rd[0];
    for (int p = 0; p < NRD; p++) begin
      rslot[p]   = slot_of(yr_row[p]);
      jh[p]      = yr_col[p] >> 1;
      b0_rcol[p] = C0W'(jh[p]);
      b1_rcol[p] = C1W'(jh[p] - 1'b1);
      b2_rcol[p] = 1'(yr_col[p] != 0);
      if (yr_col[p][0])                           yr_d[p] = b0_rd[p];
      else if (yr_col[p] == 0 || yr_col[p] == n - 1'b1) yr_d[p] = b2_rd[p];
      else                                        yr_d[p] = b1_rd[p];
    end
  end

  mem_bank #(.ROWS(SLOT), .COLS(H),  .NRD(NRD), .NWR(1)) u_bank0 (
    .clk, .we(hp_we), .wrow(b0_wrow), .wcol(b0_wcol), .wd(b0_wd),
    .rrow(rslot), .rcol(b0_rcol), .rd(b0_rd));
  mem_bank #(.ROWS(SLOT), .COLS(C1), .NRD(NRD), .NWR(1)) u_bank1 (
    .clk, .we(lp_we), .wrow(b1_wrow), .wcol(b1_wcol), .wd(b1_wd),
    .rrow(rslot), .rcol(b1_rcol), .rd(b1_rd));
  mem_bank #(.ROWS(SLOT), .COLS(2),  .NRD(NRD), .NWR(2)) u_bank2 (
    .clk, .we(bd_we), .wrow(b2_wrow), .wcol(b2_wcol), .wd(bd_d),
    .rrow(rslot), .rcol(b2_rcol), .rd(b2_rd));
  mem_bank #(.ROWS(2),    .COLS(N),  .NRD(1),   .NWR(1)) u_bank3 (
    .clk, .we(z_we), .wrow(b3_wrow), .wcol(b3_wcol), .wd(b3_wd),
    .rrow(b3_rrow), .rcol(b3_rcol), .rd(b3_rd));

endmodule
