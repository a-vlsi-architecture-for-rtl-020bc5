// dwt_ctrl: controller of the multi-level 2D transform.
//
// It sequences the rows of one decomposition level through the row module
// and the column module, then the levels. Rows are not taken top to bottom:
// an odd row can be column-transformed only when both even neighbours have
// been row-transformed, so the row module takes rows in the order
// 0, 2, 1, 4, 3, 6, 5, ... (for the (5,3) filter).
//
// Schedule: a level of size n (odd, H = n/2 rounded down) runs in H + 3
// steps (L = TM + 2, the processor latency). In step k:
//   cycle 0      row module: row 0 (k = 0) or row 2k-1 (1 <= k <= H)
//   cycle H      row module: row 2 (k = 0) or row 2k+2 (1 <= k <= H-1)
//   cycle 0      CP1: odd row 2k-3                    (2 <= k <= H+1)
//   cycle L+1    CP2: even row 2k-4                   (2 <= k <= H+2),
//                kept unchanged (pass) for the first and last row
// so the column module works one step behind the row module, and CP2
// follows CP1 by L + 1 cycles to find CP1's result in REG2. Steps last
// S = max(n, 2L + 1) cycles: the row module needs n - 1 cycles for its two
// rows and each column processor n for its row, so all four processors
// run back to back across steps. Work started in one step may still be
// running in the next one. This is safe because a column processor reads
// sample j of a row only at cycle j + 1 of its step. By then the row
// module has written that sample. The tightest case is x[2] of a row: it is
// readable in MEM2 2L + 4 cycles after the row started, and CP1 reads it
// S + 3 cycles after that start, hence S >= 2L + 1.
// The last step of a level lasts n + 2L + 3 cycles, so that CP2's last
// results, and with them the LL quarter, are in MEM1 before the next
// level reads it.
// After a level the LL quarter, (H+1) x (H+1), has been written back to
// MEM1 and becomes the next level's input, while levels remain and the LL
// size is odd and at least 3.
//
// Four-matrix filters ('filter' = FILT_97): a level takes two passes, the
// first over the rows, the second over the columns (the top transposes the
// MEM1 addresses). In a pass the row module starts line k (lifting steps 1
// and 2) at cycle k * P, P = n/2 + 1, and CP1 starts the same line (steps 3
// and 4, from MEM2) D4 = 2L + 3 cycles later, as soon as the first samples
// it needs are in MEM2; a delay line carries the line number. P is one
// cycle more than the row module needs, because a line has n results and
// the two output ports take two per cycle: CP2 passes the last boundary
// sample in that cycle. Lines four apart share MEM2 row slots (n >= 7);
// CP2 reads the last boundary sample of line k D4 + H + L + 1 cycles after
// the line started, and line k + 4 overwrites it 4P + H cycles after that
// start, so P is raised to P4MIN = ceil((3L + 4) / 4) where n/2 + 1 is
// smaller (only for TM >= 4 on a 9 x 9 block). After the last line the pass
// waits DR = D4 + 2L + 2 cycles until the last result is written. A pass
// takes n * P + DR cycles.
// 'xpose' marks the second pass and 'mode4m' this way of working.
//
// The row order and the two-pass (9,7) flow follow the reference; the step
// lengths and start offsets (the reference does not publish its full
// schedule) are this design's own choice.
//
// Interface: 'start' (while idle) begins a transform of 'levels' levels on
// an N x N block. 'busy' is high until 'done' pulses, one cycle after the
// last step. 'level' and 'n' describe the level in progress.
module dwt_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned N  = 9,
  parameter int unsigned TM = 1,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned LW = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] levels,
  input  filter_e       filter,
  output logic          mode4m,
  output logic          xpose,
  output logic          busy,
  output logic          done,
  output logic [LW-1:0] level,
  output logic [AW-1:0] n,
  // row module
  output logic          row_start,
  output logic [AW-1:0] row_row,
  // column module
  output logic          cp1_start,
  output logic [AW-1:0] cp1_row,
  output logic          cp2_start,
  output logic [AW-1:0] cp2_row,
  output logic          cp2_pass
);

  localparam int unsigned L  = TM + 2;
  localparam int unsigned S2MIN = 2 * L + 1;
  localparam int unsigned D4 = 2 * L + 3;
  localparam int unsigned P4MIN = (3 * L + 7) / 4;
  localparam int unsigned DR = D4 + 2 * L + 2;
  localparam int unsigned SMAX = N + DR + 2 * L + 3;
  localparam int unsigned CNTW = $clog2(SMAX + 1);
  localparam int unsigned KW = $clog2(N + 2);

  logic [AW-1:0] h;
  logic [CNTW-1:0] c_q, s_len;
  logic [KW-1:0] k_q;
  logic [AW-1:0] kk;       // k_q widened to row-index width
  logic          step_end, pass_end, level_end, more;
  logic [AW-1:0] n_next;
  logic [CNTW-1:0] s2;     // two-matrix step length, max(n, 2L + 1)

  assign s2 = (CNTW'(n) > CNTW'(S2MIN)) ? CNTW'(n) : CNTW'(S2MIN);

  // four-matrix line period, max(n/2 + 1, P4MIN) once lines share MEM2 slots
  logic [CNTW-1:0] p4;
  assign p4 = (32'(n) >= 32'd7 && CNTW'(h) + 1'b1 < CNTW'(P4MIN)) ? CNTW'(P4MIN) : CNTW'(h) + 1'b1;

  assign h         = n >> 1;
  // four-matrix mode: steps k < n last P cycles, step n is the drain
  assign s_len     = mode4m ? ((kk == n) ? CNTW'(DR) : p4)
                            : ((KW'(h) + KW'(2) == k_q) ? CNTW'(n) + CNTW'(2 * L + 3) : s2);
  assign kk        = AW'(k_q);
  assign step_end  = busy && (c_q == s_len - 1'b1);
  assign pass_end  = step_end && mode4m && (kk == n);
  assign level_end = mode4m ? (pass_end && xpose) : (step_end && (KW'(h) + KW'(2) == k_q));
  assign n_next    = h + 1'b1;
  assign more      = (level + 1'b1 < levels) && !h[0] && (h >= AW'(2));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      mode4m <= 1'b0;
      xpose <= 1'b0;
      c_q   <= '0;
      k_q   <= '0;
      level <= '0;
      n     <= AW'(N);
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          mode4m <= (filter == FILT_97);
          xpose <= 1'b0;
          c_q   <= '0;
          k_q   <= '0;
          level <= '0;
          n     <= AW'(N);
        end
      end else if (level_end) begin
        c_q   <= '0;
        k_q   <= '0;
        xpose <= 1'b0;
        if (more) begin
          level <= level + 1'b1;
          n     <= n_next;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (pass_end) begin
        c_q   <= '0;
        k_q   <= '0;
        xpose <= 1'b1;
      end else if (step_end) begin
        c_q <= '0;
        k_q <= k_q + 1'b1;
      end else begin
        c_q <= c_q + 1'b1;
      end
    end
  end

  // four-matrix mode: CP1 follows each row-module start by D4 cycles
  logic          dl_v [D4];
  logic [AW-1:0] dl_r [D4];
  always_ff @(posedge clk) begin
    if (!rst_n) dl_v[0] <= 1'b0;
    else        dl_v[0] <= row_start && mode4m;
    dl_r[0] <= row_row;
    for (int d = 1; d < int'(D4); d++) begin
      if (!rst_n) dl_v[d] <= 1'b0;
      else        dl_v[d] <= dl_v[d-1];
      dl_r[d] <= dl_r[d-1];
    end
  end

  always_comb begin
    row_start = 1'b0;
    row_row   = '0;
    cp1_start = 1'b0;
    cp1_row   = '0;
    cp2_start = 1'b0;
    cp2_row   = '0;
    cp2_pass  = 1'b0;
    if (busy && mode4m) begin
      if (c_q == '0 && kk < n) begin
        row_start = 1'b1;
        row_row   = kk;
      end
      cp1_start = dl_v[D4-1];
      cp1_row   = dl_r[D4-1];
    end else if (busy) begin
      if (c_q == '0) begin
        if (k_q == '0) begin
          row_start = 1'b1;
          row_row   = '0;
        end else if (kk <= h) begin
          row_start = 1'b1;
          row_row   = AW'({kk, 1'b0} - 1'b1);
        end
        if (k_q >= KW'(2) && kk <= h + 1'b1) begin
          cp1_start = 1'b1;
          cp1_row   = AW'({kk, 1'b0} - 2'd3);
        end
      end
      if (c_q == CNTW'(h)) begin
        if (k_q == '0) begin
          row_start = 1'b1;
          row_row   = AW'(2);
        end else if (kk + 1'b1 <= h) begin
          row_start = 1'b1;
          row_row   = AW'({kk, 1'b0} + 2'd2);
        end
      end
      if (c_q == CNTW'(L + 1) && k_q >= KW'(2)) begin
        cp2_start = 1'b1;
        cp2_row   = AW'({kk, 1'b0} - 3'd4);
        cp2_pass  = (k_q == KW'(2)) || (k_q == KW'(h) + KW'(2));
      end
    end
  end

endmodule
