// tb_ptm_fractal: offers a new random input every cycle and checks that
// exactly one is taken per four cycles, that each result equals
// 8 * sum 2^-i P_i (|P_i| in turbulence mode) from the reference model,
// arrives 9 cycles after acceptance with its tag, and that both modes ran.
module tb_ptm_fractal;
  import ptm_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, use_abs = 0, out_valid;
  logic [15:0] u, v, w;
  logic [7:0] in_tag, out_tag;
  logic signed [11:0] fractal;
  int checks = 0, failures = 0, cyc = 0, n_abs = 0, n_sum = 0;
  typedef struct { int val; int tag; int t; } exp_t;
  exp_t expq [$];
  bit took = 0;

  ptm_fractal #(.TAG_W(8)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && in_ready) begin
      expq.push_back('{ptm_ref_pkg::fractal(u, v, w, use_abs), int'(in_tag), cyc});
      if (use_abs) n_abs++; else n_sum++;
      took = 1;
    end
    if (rst_n && out_valid) begin
      exp_t e;
      e = expq.pop_front();
      checks++;
      if (int'(fractal) != e.val || int'(out_tag) != e.tag || cyc - e.t != 9) begin
        failures++;
        $display("FAIL f=%0d exp=%0d tag=%0d/%0d lat=%0d", fractal, e.val, out_tag, e.tag, cyc - e.t);
      end
    end
  end

  initial begin
    int taken = 0, start_cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    start_cyc = cyc;
    u = 16'($urandom); v = 16'($urandom); w = 16'($urandom);
    in_tag = 0; use_abs = 0; in_valid = 1;
    while (taken < 400) begin
      @(posedge clk); #1;
      if (took) begin
        took = 0;
        taken++;
        u = 16'($urandom); v = 16'($urandom); w = 16'($urandom);
        in_tag = 8'(taken); use_abs = taken[0];
      end
    end
    in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_abs < 10 || n_sum < 10) begin
      failures++; $display("FAIL left=%0d abs=%0d sum=%0d", expq.size(), n_abs, n_sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rate: with input always offered, acceptances are exactly 4 cycles apart
  int last_take = -1;
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    if (last_take >= 0 && cyc - last_take != 4) begin
      checks++; failures++;
      $display("FAIL accept spacing %0d", cyc - last_take);
    end
    last_take = cyc;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
