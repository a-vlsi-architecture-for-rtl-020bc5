// tb_reg_file: checks that the register file keeps the last DEPTH samples
// and tags in order, shifts only on in_valid, and reports which entries
// have been filled since reset.
module tb_reg_file;
  import dwt_pkg::*;

  localparam int D = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          in_valid = 0;
  sample_t       in_d = '0;
  logic [7:0]    in_tag = '0;
  sample_t       q [D];
  logic [7:0]    q_tag [D];
  logic [D-1:0]  q_valid;

  reg_file #(.DEPTH(D), .TAG_W(8)) dut (.*);

  sample_t hist [$];
  int      nw = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (q_valid != '0) begin failures++; $display("valid after reset"); end
    for (int k = 0; k < 300; k++) begin
      in_valid = ($urandom_range(2) != 0);
      in_d     = sample_t'($urandom);
      in_tag   = 8'(k);
      if (in_valid) begin
        hist.push_front(in_d);
        nw++;
      end
      @(negedge clk);
      for (int e = 0; e < D; e++) begin
        checks++;
        if (e < nw) begin
          if (!q_valid[e] || q[e] != hist[e]) begin
            failures++;
            $display("step %0d entry %0d: %0d expected %0d", k, e, q[e], hist[e]);
          end
        end else if (q_valid[e]) begin
          failures++;
          $display("entry %0d valid too early", e);
        end
      end
      checks++;
      if (in_valid && q_tag[0] != 8'(k)) begin failures++; $display("tag"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
