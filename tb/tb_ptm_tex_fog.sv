// tb_ptm_tex_fog: checks r = g = b = min(|fractal| / 8, 255) one cycle
// after the input, for positive and negative fractal values.
module tb_ptm_tex_fog;
  import ptm_pkg::*;
  logic clk = 0;
  logic signed [11:0] fractal;
  color_t color;
  int checks = 0, failures = 0;

  ptm_tex_fog dut (.clk, .fractal, .color);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int a, e;
      fractal = 12'($urandom);
      a = int'(fractal) < 0 ? -int'(fractal) : int'(fractal);
      e = a / 8 > 255 ? 255 : a / 8;
      @(posedge clk); #1;
      checks++;
      if (color.r != 8'(e) || color.g != 8'(e) || color.b != 8'(e)) begin
        failures++;
        $display("FAIL f=%0d color=%h exp=%0d", fractal, color, e);
      end
    end
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
