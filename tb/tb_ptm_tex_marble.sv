// tb_ptm_tex_marble: loads a known pattern into the color table through the
// write port, then drives random fractal values and coordinates and checks,
// one cycle later, that the color is the table entry selected by
// (v + (turbulence >> 4)) mod 128.
module tb_ptm_tex_marble;
  import ptm_pkg::*;
  logic clk = 0, we = 0;
  logic signed [11:0] fractal;
  logic [15:0] u, v, w;
  logic [6:0] waddr;
  color_t color, wdata;
  int checks = 0, failures = 0;

  ptm_tex_marble dut (.clk, .fractal, .v, .color, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  function automatic color_t pat(int i);
    return '{r: 8'(i), g: 8'(~i), b: 8'(i ^ 8'h55)};
  endfunction

  function automatic int ref_idx(int f, int pu, int pv, int pw);
    int ui, vi, wi;
    ui = pu >> 6; vi = pv >> 6; wi = pw >> 6;
    return (vi + (f >>> 4)) & 127;
  endfunction

  initial begin
    
    for (int i = 0; i < 128; i++) begin
      we = 1; waddr = 7'(i); wdata = pat(i);
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      int e;
      fractal = 12'($urandom_range(1920)); u = 16'($urandom); v = 16'($urandom); w = 16'($urandom);
      
      e = ref_idx(int'(fractal), int'(u), int'(v), int'(w));
      
      @(posedge clk); #1;
      checks++;
      if (color != pat(e)) begin
        failures++;
        $display("FAIL f=%0d u=%h v=%h w=%h color=%h exp idx %0d", fractal, u, v, w, color, e);
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
