// reg_file: register file between two processors (REG1 between RP1 and
// RP2, REG2 between CP1 and CP2).
//
// The first processor's results are shifted in, one per cycle when in_valid
// is set, and the last DEPTH results are visible in parallel on q (q[0] the
// newest) with their tags. The second processor thus takes two neighbouring
// high-pass values of a row from REG1, or the column result of the row below
// from REG2, without a memory access. The reference sizes the files per
// filter (for (5,3): REG1 = 2 and REG2 = 1 entries); DEPTH defaults to the
// larger of the two. q_valid[k] tells whether entry k has been written since
// reset. Writing takes one clock edge; reads are combinational.
module reg_file
  import dwt_pkg::*;
#(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  sample_t          in_d,
  input  logic [TAG_W-1:0] in_tag,
  output sample_t          q       [DEPTH],
  output logic [TAG_W-1:0] q_tag   [DEPTH],
  output logic [DEPTH-1:0] q_valid
);

  always_ff @(posedge clk) begin
    if (in_valid) begin
      q[0]     <= in_d;
      q_tag[0] <= in_tag;
      for (int k = 1; k < DEPTH; k++) begin
        q[k]     <= q[k-1];
        q_tag[k] <= q_tag[k-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        q_valid <= '0;
    else if (in_valid) q_valid <= DEPTH'({q_valid, 1'b1});
  end

endmodule
