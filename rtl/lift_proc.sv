// lift_proc: one row or column processor (RP1, RP2, CP1 or CP2).
//
// Each processor holds two adders, one multiplier and one shifter, arranged
// as in the reference architecture's processor diagram: the first adder
// forms s = a + b, the multiplier (s * coef >>> FRAC) or the shifter
// (s >>> shift) scales it, and the second adder returns
// y = c + scaled, or y = c - scaled when cfg.sub is set. One such operation
// is one lifting step of a banded lifting matrix, e.g. for the (5,3) filter
// y[2i+1] = x[2i+1] - (x[2i] + x[2i+2])/2.
//
// Timing: fully pipelined, one operation accepted per cycle. The adders take
// one cycle each; the multiplier/shifter stage takes TM cycles, the same for
// both paths so that the latency does not depend on the programming (the
// reference counts the shift of the (5,3) filter with the multiplier delay
// as well). A sample presented with in_valid in cycle t appears on out_y
// with out_valid in cycle t + TM + 2. The third operand c, sampled together
// with a and b, is held in a delay line (the input register "REG" of the
// reference) until the second adder needs it. in_tag travels alongside the
// data so that the caller knows where a result belongs.
//
// Own choices: operand widths, floor rounding of the shift (arithmetic
// shift, no rounding offset), wrap-around on overflow of the DW-bit result,
// and the active-low synchronous reset that clears only the valid bits.
module lift_proc
  import dwt_pkg::*;
#(
  parameter int unsigned TM    = 1,   // multiplier/shifter stage latency
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  lift_cfg_t        cfg,
  input  logic             in_valid,
  input  sample_t          in_a,
  input  sample_t          in_b,
  input  sample_t          in_c,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output sample_t          out_y,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned SW = DW + 1;          // width of a + b
  localparam int unsigned PW = SW + CW;         // width of the product
  localparam int unsigned D  = TM + 1;          // stages before adder 2

  // ---- stage 1: adder 1 -------------------------------------------------
  logic signed [SW-1:0] sum_q;
  always_ff @(posedge clk) begin
    sum_q <= SW'(in_a) + SW'(in_b);
  end

  // ---- stage 2: multiplier or shifter, TM cycles --------------------------
  logic signed [PW-1:0] prod;
  logic signed [SW-1:0] scaled;
  always_comb begin
    prod = PW'(sum_q) * PW'(cfg.coef);
    if (cfg.use_mult) scaled = SW'(prod >>> FRAC);
    else              scaled = sum_q >>> cfg.shift;
  end

  logic signed [SW-1:0] scl_q [TM];
  always_ff @(posedge clk) begin
    scl_q[0] <= scaled;
    for (int k = 1; k < TM; k++) scl_q[k] <= scl_q[k-1];
  end

  // ---- delay line for c, tag and valid (REG) -------------------------------
  sample_t          c_q   [D];
  logic [TAG_W-1:0] tag_q [D];
  logic [D-1:0]     vld_q;
  always_ff @(posedge clk) begin
    c_q[0]   <= in_c;
    tag_q[0] <= in_tag;
    for (int k = 1; k < D; k++) begin
      c_q[k]   <= c_q[k-1];
      tag_q[k] <= tag_q[k-1];
    end
  end
  always_ff @(posedge clk) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[D-2:0], in_valid};
  end

  // ---- stage 3: adder 2 ---------------------------------------------------
  logic signed [SW:0] res;
  always_comb begin
    if (cfg.sub) res = (SW+1)'(c_q[D-1]) - (SW+1)'(scl_q[TM-1]);
    else         res = (SW+1)'(c_q[D-1]) + (SW+1)'(scl_q[TM-1]);
  end

  always_ff @(posedge clk) begin
    out_y   <= DW'(res);
    out_tag <= tag_q[D-1];
  end
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= vld_q[D-1];
  end

endmodule
