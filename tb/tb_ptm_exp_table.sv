// tb_ptm_exp_table: checks every entry against round(511 * exp(-k/64))
// (within 1 for the fixed-point recurrence), the enable and the one-cycle
// read latency.
module tb_ptm_exp_table;
  logic clk = 0, en;
  logic [8:0] v, vg;
  int checks = 0, failures = 0;

  ptm_exp_table #(.DEPTH(512), .OUT_W(9)) dut (.clk, .en, .v, .vg);
  always #5 clk = ~clk;

  initial begin
    logic [8:0] held;
    en = 1;
    for (int k = 0; k < 512; k++) begin
      int e;
      e = int'($floor(511.0 * $exp(-real'(k) / 64.0) + 0.5));
      v = 9'(k);
      @(posedge clk); #1;
      checks++;
      if (int'(vg) > e + 1 || int'(vg) < e - 1) begin
        failures++;
        $display("FAIL k=%0d vg=%0d exp=%0d", k, vg, e);
      end
    end
    v = 0; @(posedge clk); #1; held = vg;
    en = 0; v = 9'd300; @(posedge clk); #1;
    checks++;
    if (vg != held || held != 9'd511) begin failures++; $display("FAIL enable held=%0d vg=%0d", held, vg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
