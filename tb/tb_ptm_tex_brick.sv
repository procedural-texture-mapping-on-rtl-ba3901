// tb_ptm_tex_brick: loads a known pattern into the color table through the
// write port, then drives random fractal values and coordinates and checks,
// one cycle later, that the color is the table entry selected by
// the brick/mortar test (brick 12 x 5, mortar 1) and
// (turbulence >> 4) mod 128; both brick and mortar points must occur.
module tb_ptm_tex_brick;
  import ptm_pkg::*;
  logic clk = 0, we = 0;
  logic signed [11:0] fractal;
  logic [15:0] u, v, w;
  logic [7:0] waddr;
  color_t color, wdata;
  int checks = 0, failures = 0;

  ptm_tex_brick dut (.clk, .fractal, .u, .v, .color, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  function automatic color_t pat(int i);
    return '{r: 8'(i), g: 8'(~i), b: 8'(i ^ 8'h55)};
  endfunction

  function automatic int ref_idx(int f, int pu, int pv, int pw);
    int ui, vi, wi;
    ui = pu >> 6; vi = pv >> 6; wi = pw >> 6;
    return ((((vi % 7) > 1) && ((vi % 7) < 6) && ((((vi / 7) % 2 == 1) ? ui : ui + 7) % 14 > 1) && ((((vi / 7) % 2 == 1) ? ui : ui + 7) % 14 < 13)) ? 128 : 0) + ((f >>> 4) & 127);
  endfunction

  initial begin
    int nb = 0, nm = 0;
    for (int i = 0; i < 256; i++) begin
      we = 1; waddr = 8'(i); wdata = pat(i);
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      int e;
      fractal = 12'($urandom_range(1920)); u = 16'($urandom); v = 16'($urandom); w = 16'($urandom);
      u[15] = 0; v[15] = 0;
      e = ref_idx(int'(fractal), int'(u), int'(v), int'(w));
      if (e >= 128) nb++; else nm++;
      @(posedge clk); #1;
      checks++;
      if (color != pat(e)) begin
        failures++;
        $display("FAIL f=%0d u=%h v=%h w=%h color=%h exp idx %0d", fractal, u, v, w, color, e);
      end
    end
    checks++; if (nb < 100 || nm < 100) begin failures++; $display("FAIL brick %0d mortar %0d", nb, nm); end
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
