// tb_ptm_tex_cloud: checks b = 255 and r = g = c when c = isqrt(32 *
// max(fractal, 0)) exceeds the cutoff 64, else 0; both cases must occur.
module tb_ptm_tex_cloud;
  import ptm_pkg::*;
  import ptm_ref_pkg::*;
  logic clk = 0;
  logic signed [11:0] fractal;
  color_t color;
  int checks = 0, failures = 0, n_on = 0, n_off = 0;

  ptm_tex_cloud #(.CUTOFF(64)) dut (.clk, .fractal, .color);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int c, e;
      fractal = 12'(int'($urandom_range(3840)) - 1920);
      c = int'(fractal) > 0 ? isqrt(32 * int'(fractal)) : 0;
      e = c > 64 ? c : 0;
      if (e != 0) n_on++; else n_off++;
      @(posedge clk); #1;
      checks++;
      if (color.r != 8'(e) || color.g != 8'(e) || color.b != 8'd255) begin
        failures++;
        $display("FAIL f=%0d color=%h exp=%0d", fractal, color, e);
      end
    end
    checks++;
    if (n_on < 100 || n_off < 100) begin failures++; $display("FAIL on=%0d off=%0d", n_on, n_off); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
