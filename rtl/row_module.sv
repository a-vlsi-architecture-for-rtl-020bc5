// row_module: the row module, RP1 -> REG1 -> RP2, one-dimensional lifting
// along one row of the block held in MEM1.
//
// For the (5,3) filter a row x[0..n-1] (n odd, H = n/2 rounded down) becomes
//   RP1: y[2i+1] = x[2i+1] - (x[2i] + x[2i+2]) / 2      i = 0 .. H-1
//   RP2: y[2i]   = x[2i]   + (y[2i-1] + y[2i+1]) / 4    i = 1 .. H-1
//   y[0] = x[0], y[n-1] = x[n-1]   (block transform, boundary samples kept)
// The processors are programmed through cfg_rp1/cfg_rp2, so other steps
// with three-tap bands run the same way; for the (9,7) filter the row module
// carries out lifting steps 1 and 2 (coefficients alpha and beta).
//
// How it works: 'start' with 'start_row' begins a row; RP1 then takes one i
// per cycle for H cycles, reading x[2i] and x[2i+2] from MEM1 bank 0 and
// x[2i+1] from bank 1. Each RP1 result enters REG1; when result i >= 1
// appears at RP1's output, RP2 combines it with the previous one held in
// REG1 and with x[2i] read from MEM1. The boundary samples, read by RP1 for
// i = 0 and i = H-1 anyway, are written out unchanged on the bd ports. A new
// 'start' may arrive in the cycle that RP1 takes its last i, so rows follow
// each other without a gap.
//
// Timing (TM = multiplier/shifter latency, processor latency L = TM + 2):
// RP1 result i leaves the module L cycles after RP1 took i; RP2 starts
// L + 1 cycles after RP1 (cycle 5 when RP1 starts in cycle 1 and TM = 1, as
// in the reference's (5,3) schedule) and its result i appears L cycles
// after that. Results are unscaled: the S/M units outside apply K1/K2.
module row_module
  import dwt_pkg::*;
#(
  parameter int unsigned N  = 9,
  parameter int unsigned TM = 1,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] n,
  input  lift_cfg_t     cfg_rp1,
  input  lift_cfg_t     cfg_rp2,
  input  logic          start,
  input  logic [AW-1:0] start_row,
  output logic          busy,
  // MEM1 reads: 0 = x[2i], 1 = x[2i+2], 2 = x[2i+1] (RP1), 3 = x[2i] (RP2)
  output logic [3:0]    rd_en,
  output logic [AW-1:0] rd_row [4],
  output logic [AW-1:0] rd_col [4],
  input  sample_t       rd_d   [4],
  // RP1 result y[2i+1]
  output logic          hp_valid,
  output logic [AW-1:0] hp_row,
  output logic [AW-1:0] hp_i,
  output sample_t       hp_d,
  // RP2 result y[2i]
  output logic          lp_valid,
  output logic [AW-1:0] lp_row,
  output logic [AW-1:0] lp_i,
  output sample_t       lp_d,
  // boundary samples: port 0 = y[0], port 1 = y[n-1]
  output logic [1:0]    bd_we,
  output logic [AW-1:0] bd_row [2],
  output sample_t       bd_d   [2]
);

  localparam int unsigned TAG_W = 2 * AW;

  logic [AW-1:0] h;
  assign h = n >> 1;

  // ---- RP1 issue counter --------------------------------------------------
  logic          act;
  logic [AW-1:0] row_q, i_q;
  logic          last;
  assign last = act && (i_q == h - 1'b1);
  assign busy = act;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      act <= 1'b0;
      i_q <= '0;
    end else if (start) begin
      act   <= 1'b1;
      i_q   <= '0;
      row_q <= start_row;
    end else if (act) begin
      act <= !last;
      i_q <= i_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && start) begin
      assert (!act || last) else $error("row_module: start while a row is in progress");
    end
  end

  // ---- RP1 ----------------------------------------------------------------
  logic             p1_valid;
  sample_t          p1_y;
  logic [TAG_W-1:0] p1_tag;

  lift_proc #(.TM(TM), .TAG_W(TAG_W)) u_rp1 (
    .clk, .rst_n, .cfg(cfg_rp1),
    .in_valid(act), .in_a(rd_d[0]), .in_b(rd_d[1]), .in_c(rd_d[2]),
    .in_tag({row_q, i_q}),
    .out_valid(p1_valid), .out_y(p1_y), .out_tag(p1_tag));

  // ---- REG1 -----------------------------------------------------------------
  sample_t          r1_q   [1];
  logic [TAG_W-1:0] r1_tag [1];
  logic [0:0]       r1_vld;

  reg_file #(.DEPTH(1), .TAG_W(TAG_W)) u_reg1 (
    .clk, .rst_n, .in_valid(p1_valid), .in_d(p1_y), .in_tag(p1_tag),
    .q(r1_q), .q_tag(r1_tag), .q_valid(r1_vld));

  // ---- RP2 ------------------------------------------------------------------
  logic [AW-1:0] p1_row, p1_i;
  logic          p2_go;
  assign {p1_row, p1_i} = p1_tag;
  assign p2_go = p1_valid && (p1_i != '0);

  always_ff @(posedge clk) begin
    if (rst_n && p2_go) begin
      assert (r1_vld[0] && r1_tag[0] == {p1_row, p1_i - 1'b1})
        else $error("row_module: REG1 does not hold the left neighbour");
    end
  end

  logic             p2_valid;
  sample_t          p2_y;
  logic [TAG_W-1:0] p2_tag;

  lift_proc #(.TM(TM), .TAG_W(TAG_W)) u_rp2 (
    .clk, .rst_n, .cfg(cfg_rp2),
    .in_valid(p2_go), .in_a(r1_q[0]), .in_b(p1_y), .in_c(rd_d[3]),
    .in_tag(p1_tag),
    .out_valid(p2_valid), .out_y(p2_y), .out_tag(p2_tag));

  // ---- memory requests and results ------------------------------------------
  always_comb begin
    rd_en     = {p2_go, act, act, act};
    rd_row[0] = row_q;
    rd_row[1] = row_q;
    rd_row[2] = row_q;
    rd_row[3] = p1_row;
    rd_col[0] = AW'({i_q, 1'b0});
    rd_col[1] = AW'({i_q, 1'b0} + 2'd2);
    rd_col[2] = AW'({i_q, 1'b1});
    rd_col[3] = AW'({p1_i, 1'b0});

    hp_valid = p1_valid;
    {hp_row, hp_i} = p1_tag;
    hp_d     = p1_y;
    lp_valid = p2_valid;
    {lp_row, lp_i} = p2_tag;
    lp_d     = p2_y;

    bd_we[0]  = act && (i_q == '0);
    bd_we[1]  = last;
    bd_row[0] = row_q;
    bd_row[1] = row_q;
    bd_d[0]   = rd_d[0];
    bd_d[1]   = rd_d[1];
  end

endmodule
