// tb_ptm_smooth: checks every ROM entry against round(64 * (3x^2 - 2x^3))
// computed in floating point (capped at 63), the one-cycle read latency,
// and that the table rises monotonically.
module tb_ptm_smooth;
  logic clk = 0;
  logic [5:0] x, y;
  int checks = 0, failures = 0;

  ptm_smooth #(.IN_W(6), .OUT_W(6)) dut (.clk, .x, .y);
  always #5 clk = ~clk;

  initial begin
    int prev = 0;
    for (int i = 0; i < 64; i++) begin
      real f;
      int e;
      f = real'(i) / 64.0;
      e = int'($floor(64.0 * (3.0*f*f - 2.0*f*f*f) + 0.5));
      if (e > 63) e = 63;
      x = 6'(i);
      @(posedge clk); #1;
      checks++;
      if (int'(y) != e || int'(y) < prev) begin
        failures++;
        $display("FAIL x=%0d y=%0d exp=%0d", i, y, e);
      end
      prev = int'(y);
    end
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
