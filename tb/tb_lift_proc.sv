// tb_lift_proc: checks the processor's lifting operation y = c +/- K(a+b)
// in shifter and multiplier mode against an integer model, one operation
// per cycle, and its latency of TM + 2 cycles, for TM = 1 and TM = 3.
module tb_lift_proc;
  import dwt_pkg::*;

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

  lift_cfg_t        cfg;
  logic             in_valid = 0;
  sample_t          a, b, c;
  logic [15:0]      tag;
  logic             v1, v3;
  sample_t          y1, y3;
  logic [15:0]      t1, t3;

  lift_proc #(.TAG_W(16)) dut1 (.clk, .rst_n, .cfg, .in_valid, .in_a(a), .in_b(b), .in_c(c),
    .in_tag(tag), .out_valid(v1), .out_y(y1), .out_tag(t1));
  lift_proc #(.TM(3), .TAG_W(16)) dut3 (.clk, .rst_n, .cfg, .in_valid, .in_a(a), .in_b(b), .in_c(c),
    .in_tag(tag), .out_valid(v3), .out_y(y3), .out_tag(t3));

  sample_t exp_y [65536];
  int      exp_t [65536];

  function automatic sample_t model(lift_cfg_t k, sample_t a, sample_t b, sample_t c);
    longint s, m;
    s = longint'(a) + longint'(b);
    if (k.use_mult) m = (s * longint'(k.coef)) >>> FRAC;
    else            m = s >>> k.shift;
    return k.sub ? sample_t'(longint'(c) - m) : sample_t'(longint'(c) + m);
  endfunction

  int n_out1 = 0, n_out3 = 0;
  // sampled mid-cycle: a result registered at edge t is seen with cyc = t
  always @(negedge clk) begin
    if (rst_n && v1) begin
      checks += 2;
      n_out1++;
      if (y1 !== exp_y[t1]) begin
        failures++;
        $display("TM=1 tag %0d: y %0d expected %0d", t1, y1, exp_y[t1]);
      end
      if (cyc - exp_t[t1] != 3) begin
        failures++;
        $display("TM=1 latency %0d tag %0d", cyc - exp_t[t1], t1);
      end
    end
    if (rst_n && v3) begin
      checks += 2;
      n_out3++;
      if (y3 !== exp_y[t3]) begin
        failures++;
        $display("TM=3 tag %0d: y %0d expected %0d", t3, y3, exp_y[t3]);
      end
      if (cyc - exp_t[t3] != 5) begin
        failures++;
        $display("TM=3 latency %0d", cyc - exp_t[t3]);
      end
    end
  end

  initial begin
    cfg = CFG53_HP;
    a = '0; b = '0; c = '0; tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 4; mode++) begin
      repeat (8) @(negedge clk);
      case (mode)
        0: cfg = CFG53_HP;
        1: cfg = CFG53_LP;
        2: cfg = '{use_mult: 1'b1, shift: 4'd0, coef: coef_t'(-26007), sub: 1'b0};  // about -1.587
        3: cfg = '{use_mult: 1'b1, shift: 4'd0, coef: coef_t'(14529), sub: 1'b1};   // about 0.887
      endcase
      for (int k = 0; k < 200; k++) begin
        a   = sample_t'($urandom_range(4095)) - 2048;
        b   = sample_t'($urandom_range(4095)) - 2048;
        c   = sample_t'($urandom_range(4095)) - 2048;
        tag = 16'(mode * 1000 + k);
        exp_y[tag] = model(cfg, a, b, c);
        exp_t[tag] = cyc;
        in_valid = ($urandom_range(3) != 0);
        @(negedge clk);
      end
      in_valid = 0;
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (n_out1 != n_out3 || n_out1 < 400) begin
      failures++;
      $display("output counts %0d %0d", n_out1, n_out3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
