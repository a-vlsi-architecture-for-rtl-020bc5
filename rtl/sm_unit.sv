// sm_unit: shift and multiply unit (S/M) at a processor output.
//
// It applies the constant diagonal matrix of a lifting factorisation:
// low-pass samples are scaled by K1 and high-pass samples by K2. K is
// programmed per sample through cfg: unity (the (5,3) filter has no diagonal
// matrix), a left or right arithmetic shift (the (2,6) and (2,10) filters
// use K = 2 and K = 0.5), or a fixed-point multiply by coef / 2^FRAC (the
// (9,7) and (6,10) filters). The result wraps to DW bits.
//
// Timing: one register stage, result and tag one cycle after the input.
module sm_unit
  import dwt_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  sm_cfg_t          cfg,
  input  logic             in_valid,
  input  sample_t          in_d,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output sample_t          out_d,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned PW = DW + CW;

  logic signed [PW-1:0] prod;
  sample_t              res;
  always_comb begin
    prod = PW'(in_d) * PW'(cfg.coef);
    unique case (cfg.mode)
      SM_SHL:  res = in_d <<< cfg.shift;
      SM_SHR:  res = in_d >>> cfg.shift;
      SM_MULT: res = DW'(prod >>> FRAC);
      default: res = in_d;
    endcase
  end

  always_ff @(posedge clk) begin
    out_d   <= res;
    out_tag <= in_tag;
  end
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
