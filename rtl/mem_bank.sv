// mem_bank: one bank of MEM1 or MEM2, a ROWS x COLS array of samples.
//
// NWR write ports (written on the clock edge) and NRD read ports
// (combinational, register-file style) so that every processor that needs
// the bank in a cycle gets its own access. Addresses are (row, col). Two
// writes to the same word in one cycle are a scheduling error and are
// flagged by an assertion; the higher-numbered port wins.
module mem_bank
  import dwt_pkg::*;
#(
  parameter int unsigned ROWS = 9,
  parameter int unsigned COLS = 5,
  parameter int unsigned NRD  = 4,
  parameter int unsigned NWR  = 1,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CLW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic           clk,
  input  logic [NWR-1:0] we,
  input  logic [RW-1:0]  wrow [NWR],
  input  logic [CLW-1:0] wcol [NWR],
  input  sample_t        wd   [NWR],
  input  logic [RW-1:0]  rrow [NRD],
  input  logic [CLW-1:0] rcol [NRD],
  output sample_t        rd   [NRD]
);

  sample_t mem [ROWS][COLS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++) begin
      if (we[p]) mem[wrow[p]][wcol[p]] <= wd[p];
    end
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) rd[p] = mem[rrow[p]][rcol[p]];
  end

  // Scheduling rules: addresses in range, no two writes to one word.
  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++) begin
      if (we[p]) begin
        assert (int'(wrow[p]) < ROWS && int'(wcol[p]) < COLS)
          else $error("mem_bank: write out of range (%0d,%0d)", wrow[p], wcol[p]);
        for (int q = p + 1; q < NWR; q++) begin
          assert (!(we[q] && wrow[q] == wrow[p] && wcol[q] == wcol[p]))
            else $error("mem_bank: ports %0d and %0d write the same word", p, q);
        end
      end
    end
  end

endmodule
