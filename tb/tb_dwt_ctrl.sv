// tb_dwt_ctrl: checks the controller's sequence for a 3-level transform of
// a 9 x 9 block and a 1-level one: the row order 0, 2, 1, 4, 3, ... per
// level, the odd rows for CP1 and the even rows for CP2 (first and last
// flagged as pass rows), the offsets of the starts inside a step (row
// module at cycles 0 and n/2, CP1 at 0, CP2 at L+1), the level sizes 9, 5,
// 3 and the cycle count (n/2 + 2) max(n, 2L + 1) + n + 2L + 3 per level
// until 'done'.
// For the (9,7) filter: two passes per level (the second with 'xpose'),
// each taking lines 0 .. n-1 in order on the row module, one every
// n/2 + 1 cycles, and on CP1, 2L + 3 cycles after the row module started
// the same line; the cycle count 2 (n (n/2 + 1) + 4L + 5) per level.
module tb_dwt_ctrl;
  import dwt_pkg::*;
  localparam int N  = 9;
  localparam int AW = $clog2(N);
  localparam int L  = 3;
  // step length of a (5,3) level: n cycles, but at least 2L + 1
  function automatic int s2len(int nn);
    return nn > 2 * L + 1 ? nn : 2 * L + 1;
  endfunction
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          start = 0, busy, done;
  logic [2:0]    levels = 3'd3, level;
  logic [AW-1:0] n;
  logic          row_start, cp1_start, cp2_start, cp2_pass;
  filter_e       filter = FILT_53;
  logic          mode4m, xpose;
  logic [AW-1:0] row_row, cp1_row, cp2_row;

  dwt_ctrl #(.N(N)) dut (.*);

  int rows_seen [3][$], cp1_seen [3][$], cp2_seen [3][$], pass_seen [3][$];
  int n_seen [3];
  int t_level [3];
  int bad_offset = 0;
  int xpose_on [3];
  int t_row [N];

  always @(negedge clk) begin
    if (rst_n && busy) begin
      if (row_start) begin
        rows_seen[level].push_back(int'(row_row));
        t_row[row_row] = cyc;
        if (dut.c_q != 0 && (mode4m || int'(dut.c_q) != int'(n) / 2)) bad_offset++;
      end
      if (cp1_start) begin
        cp1_seen[level].push_back(int'(cp1_row));
        if (mode4m ? (cyc - t_row[cp1_row] != 2 * L + 3) : (dut.c_q != 0)) bad_offset++;
      end
      if (cp2_start) begin
        cp2_seen[level].push_back(int'(cp2_row));
        if (cp2_pass) pass_seen[level].push_back(int'(cp2_row));
        if (int'(dut.c_q) != L + 1) bad_offset++;
      end
      if (xpose && dut.c_q == 0 && dut.k_q == 0) xpose_on[level]++;
      n_seen[level] = int'(n);
      t_level[level]++;
    end
  end

  task automatic expect_q(string what, int got [$], int exp [$]);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %p expected %p", what, got, exp);
    end
  endtask

  task automatic run97(int nreq);
    int nlev, t0, total, nn;
    nlev = nreq > 3 ? 3 : nreq;
    for (int l = 0; l < 3; l++) begin
      rows_seen[l] = {}; cp1_seen[l] = {}; cp2_seen[l] = {}; pass_seen[l] = {};
      t_level[l] = 0;
      xpose_on[l] = 0;
    end
    @(negedge clk);
    levels = 3'(nreq);
    filter = FILT_97;
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    checks++;
    if (!mode4m) begin failures++; $display("mode4m not set"); end
    @(posedge done);
    @(negedge clk);
    filter = FILT_53;
    total = 0;
    nn = N;
    for (int l = 0; l < nlev; l++) begin
      int r [$];
      for (int pass = 0; pass < 2; pass++)
        for (int i = 0; i < nn; i++) r.push_back(i);
      expect_q($sformatf("9/7 level %0d row-module lines", l), rows_seen[l], r);
      expect_q($sformatf("9/7 level %0d CP1 lines", l), cp1_seen[l], r);
      checks += 4;
      if (cp2_seen[l].size() != 0) begin failures++; $display("9/7 level %0d: CP2 started", l); end
      if (n_seen[l] != nn) begin failures++; $display("9/7 level %0d n = %0d", l, n_seen[l]); end
      if (xpose_on[l] != 1) begin failures++; $display("9/7 level %0d: %0d column passes", l, xpose_on[l]); end
      if (t_level[l] != 2 * (nn * (nn / 2 + 1) + 4 * L + 5)) begin
        failures++;
        $display("9/7 level %0d took %0d cycles", l, t_level[l]);
      end
      total += 2 * (nn * (nn / 2 + 1) + 4 * L + 5);
      nn = nn / 2 + 1;
    end
    checks++;
    if (cyc - t0 != total + 1) begin failures++; $display("9/7 done after %0d, expected %0d", cyc - t0, total + 1); end
  endtask

  task automatic run(int nreq);
    int nlev, t0, total, nn;
    nlev = nreq;
    // a 9 x 9 block allows three levels (9, 5, 3)
    if (nlev > 3) nlev = 3;
    for (int l = 0; l < 3; l++) begin
      rows_seen[l] = {}; cp1_seen[l] = {}; cp2_seen[l] = {}; pass_seen[l] = {};
      t_level[l] = 0;
    end
    @(negedge clk);
    levels = 3'(nreq);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    @(posedge done);
    @(negedge clk);
    total = 0;
    nn = N;
    for (int l = 0; l < nlev; l++) begin
      int r [$], c1 [$], c2 [$];
      r = {0, 2};
      for (int o = 1; o < nn; o += 2) begin
        r.push_back(o);
        if (o + 3 < nn) r.push_back(o + 3);
      end
      for (int o = 1; o < nn; o += 2) c1.push_back(o);
      for (int e = 0; e < nn; e += 2) c2.push_back(e);
      expect_q($sformatf("level %0d row order", l), rows_seen[l], r);
      expect_q($sformatf("level %0d CP1 rows", l), cp1_seen[l], c1);
      expect_q($sformatf("level %0d CP2 rows", l), cp2_seen[l], c2);
      expect_q($sformatf("level %0d pass rows", l), pass_seen[l], {0, nn - 1});
      checks += 2;
      if (n_seen[l] != nn) begin failures++; $display("level %0d n = %0d", l, n_seen[l]); end
      if (t_level[l] != (nn / 2 + 2) * s2len(nn) + nn + 2 * L + 3) begin
        failures++;
        $display("level %0d took %0d cycles", l, t_level[l]);
      end
      total += (nn / 2 + 2) * s2len(nn) + nn + 2 * L + 3;
      nn = nn / 2 + 1;
    end
    for (int l = nlev; l < 3; l++) begin
      checks++;
      if (t_level[l] != 0) begin failures++; $display("level %0d ran", l); end
    end
    checks += 2;
    if (cyc - t0 != total + 1) begin failures++; $display("done after %0d, expected %0d", cyc - t0, total + 1); end
    if (busy) begin failures++; $display("still busy"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(3);
    run(1);
    run(7);   // more levels than the block allows: stops after n = 3
    run97(1);
    run97(3);
    run(2);
    checks++;
    if (bad_offset != 0) begin failures++; $display("%0d starts at wrong offsets", bad_offset); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
