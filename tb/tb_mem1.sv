// tb_mem1: writes a random N x N block through both write ports and reads
// it back on all four read ports, checking the split into even/odd column
// banks is invisible to the user of (row, col) addresses.
module tb_mem1;
  import dwt_pkg::*;

  localparam int N  = 9;
  localparam int AW = $clog2(N);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0]    we = '0;
  logic [AW-1:0] wrow [2], wcol [2];
  sample_t       wd [2];
  logic [3:0]    re = '0;
  logic [AW-1:0] rrow [4], rcol [4];
  sample_t       rd [4];

  mem1 #(.N(N)) dut (.*);

  sample_t model [N][N];

  initial begin
    for (int p = 0; p < 2; p++) begin wrow[p] = '0; wcol[p] = '0; wd[p] = '0; end
    for (int p = 0; p < 4; p++) begin rrow[p] = '0; rcol[p] = '0; end
    for (int pass = 0; pass < 3; pass++) begin
      // write: port 0 the even-numbered words, port 1 the odd-numbered ones
      for (int w = 0; w < N * N; w += 2) begin
        @(negedge clk);
        for (int p = 0; p < 2; p++) begin
          int a;
          a = w + p;
          we[p] = (a < N * N);
          if (a < N * N) begin
            wrow[p] = AW'(a / N);
            wcol[p] = AW'(a % N);
            wd[p]   = sample_t'($urandom);
            model[a / N][a % N] = wd[p];
          end
        end
      end
      @(negedge clk);
      we = '0;
      // read back, random addresses on the four ports
      for (int k = 0; k < 200; k++) begin
        re = 4'b0111;
        for (int p = 0; p < 4; p++) begin
          rrow[p] = AW'($urandom_range(N - 1));
          rcol[p] = AW'($urandom_range(N - 1));
        end
        #1;
        for (int p = 0; p < 4; p++) begin
          checks++;
          if (rd[p] != model[rrow[p]][rcol[p]]) begin
            failures++;
            $display("port %0d (%0d,%0d): %0d expected %0d", p, rrow[p], rcol[p], rd[p],
                     model[rrow[p]][rcol[p]]);
          end
        end
        @(negedge clk);
      end
      re = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
