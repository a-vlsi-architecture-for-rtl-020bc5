// mem1: MEM1, the on-chip copy of the N x N block being transformed.
//
// Following the reference organisation it is split by column parity into
// two banks: MEM1_0 holds the even columns ((N/2 + 1) x N words) and MEM1_1
// the odd columns (N/2 x N words, N/2 rounded down). A row processor needs
// three samples per cycle (x[2i], x[2i+2] from MEM1_0 and x[2i+1] from
// MEM1_1) and RP2 one more even sample, while the column processor writes LL
// results back for the next level, so one bank alone could not serve a cycle.
//
// Interface: ports address samples by (row, col) of the block; the bank and
// the word inside it are derived here (bank = col[0], word = col >> 1). NRD
// combinational read ports with an enable each (the enables only feed the
// access-count check), NWR write ports written on the clock edge. An
// assertion checks the reference's assumption of at most MAX_ACC accesses
// (reads plus writes) per bank per cycle.
module mem1
  import dwt_pkg::*;
#(
  parameter int unsigned N       = 9,
  parameter int unsigned NRD     = 4,
  parameter int unsigned NWR     = 2,
  parameter int unsigned MAX_ACC = 4,
  localparam int unsigned AW     = $clog2(N)
) (
  input  logic           clk,
  input  logic [NWR-1:0] we,
  input  logic [AW-1:0]  wrow [NWR],
  input  logic [AW-1:0]  wcol [NWR],
  input  sample_t        wd   [NWR],
  input  logic [NRD-1:0] re,
  input  logic [AW-1:0]  rrow [NRD],
  input  logic [AW-1:0]  rcol [NRD],
  output sample_t        rd   [NRD]
);

  localparam int unsigned C0  = N / 2 + 1;
  localparam int unsigned C1  = N / 2;
  localparam int unsigned CLW = (C0 > 1) ? $clog2(C0) : 1;
  localparam int unsigned C1W = (C1 > 1) ? $clog2(C1) : 1;

  logic [NWR-1:0] we0, we1;
  logic [AW-1:0]  wcol_w [NWR];
  logic [CLW-1:0] wc0    [NWR];
  logic [C1W-1:0] wc1    [NWR];
  logic [AW-1:0]  rcol_w [NRD];
  logic [CLW-1:0] rc0    [NRD];
  logic [C1W-1:0] rc1    [NRD];
  sample_t        rd0    [NRD];
  sample_t        rd1    [NRD];

  always_comb begin
    for (int p = 0; p < NWR; p++) begin
      we0[p]    = we[p] & ~wcol[p][0];
      we1[p]    = we[p] &  wcol[p][0];
      wcol_w[p] = wcol[p] >> 1;
      wc0[p]    = CLW'(wcol_w[p]);
      wc1[p]    = C1W'(wcol_w[p]);
    end
    for (int p = 0; p < NRD; p++) begin
      rcol_w[p] = rcol[p] >> 1;
      rc0[p]    = CLW'(rcol_w[p]);
      rc1[p]    = C1W'(rcol_w[p]);
      rd[p]     = rcol[p][0] ? rd1[p] : rd0[p];
    end
  end

  mem_bank #(.ROWS(N), .COLS(C0), .NRD(NRD), .NWR(NWR)) u_bank0 (
    .clk, .we(we0), .wrow, .wcol(wc0), .wd, .rrow, .rcol(rc0), .rd(rd0));
  mem_bank #(.ROWS(N), .COLS(C1), .NRD(NRD), .NWR(NWR)) u_bank1 (
    .clk, .we(we1), .wrow, .wcol(wc1), .wd, .rrow, .rcol(rc1), .rd(rd1));

  // Bandwidth rule of the memory organisation.
  int unsigned acc0, acc1;
  always_comb begin
    acc0 = 0;
    acc1 = 0;
    for (int p = 0; p < NWR; p++) begin
      acc0 += int'(we0[p]);
      acc1 += int'(we1[p]);
    end
    for (int p = 0; p < NRD; p++) begin
      if (re[p]) begin
        if (rcol[p][0]) acc1++;
        else            acc0++;
      end
    end
  end
  always_ff @(posedge clk) begin
    assert (acc0 <= MAX_ACC && acc1 <= MAX_ACC)
      else $error("mem1: %0d/%0d accesses on banks 0/1 exceed %0d", acc0, acc1, MAX_ACC);
  end

endmodule
