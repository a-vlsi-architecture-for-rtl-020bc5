// tb_sm_unit: checks the four scaling modes of the shift/multiply unit
// (unity, K = 2^s, K = 2^-s, fixed-point K) against an integer model, and
// its one-cycle latency.
module tb_sm_unit;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sm_cfg_t     cfg;
  logic        in_valid = 0, out_valid;
  sample_t     in_d = '0, out_d;
  logic [7:0]  in_tag = '0, out_tag;

  sm_unit #(.TAG_W(8)) dut (.*);

  function automatic sample_t model(sm_cfg_t k, sample_t d);
    case (k.mode)
      SM_SHL:  return sample_t'(longint'(d) <<< k.shift);
      SM_SHR:  return sample_t'(longint'(d) >>> k.shift);
      SM_MULT: return sample_t'((longint'(d) * longint'(k.coef)) >>> FRAC);
      default: return d;
    endcase
  endfunction

  initial begin
    sample_t e;
    cfg = SM_UNITY;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 800; k++) begin
      cfg.mode  = sm_mode_e'(k % 4);
      cfg.shift = 4'($urandom_range(3));
      cfg.coef  = coef_t'($urandom_range(32767)) - coef_t'(16384);
      in_d      = sample_t'($urandom_range(8191)) - 4096;
      in_tag    = 8'(k);
      in_valid  = 1;
      e = model(cfg, in_d);
      @(negedge clk);
      checks += 3;
      if (!out_valid) begin failures++; $display("no valid"); end
      if (out_tag != 8'(k)) begin failures++; $display("tag"); end
      if (out_d != e) begin
        failures++;
        $display("mode %0d d %0d: %0d expected %0d", cfg.mode, in_d, out_d, e);
      end
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
