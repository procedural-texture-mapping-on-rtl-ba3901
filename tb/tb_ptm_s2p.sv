// tb_ptm_s2p: sends random scan-line descriptions and checks every pixel
// against the perspective-correct mapping evaluated in 64-bit integers:
// for x = xl .. xr the sums Yk advance by dk per pixel, and
// u = Uinit + trunc(Y0 * 64 / Y3) (likewise v, w) wrapped to 16 bits.
// Pixels must arrive in order, one line after another. The first pass
// takes pixels as fast as they come and checks the peak rate of one pixel
// per three cycles inside a line; the second applies random back-pressure
// on pix_ready, which must lose and duplicate nothing.
module tb_ptm_s2p;
  import ptm_pkg::*;
  logic clk = 0, rst_n = 0, line_valid = 0, line_ready, pix_valid, pix_ready = 1, idle;
  line_t line;
  pixel_t pix;
  int checks = 0, failures = 0, cyc = 0, last_px = -1, n_stall = 0, n_rate = 0;
  bit bp = 0;
  pixel_t expq [$];

  ptm_s2p dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bp) pix_ready <= ($urandom_range(2) == 0);
    if (rst_n && pix_valid && !pix_ready) n_stall++;
    if (rst_n && pix_valid && pix_ready) begin
      pixel_t e;
      e = expq.pop_front();
      checks++;
      if (pix != e) begin
        failures++;
        $display("FAIL pix (%0d,%0d) u=%0d/%0d v=%0d/%0d w=%0d/%0d exp (%0d,%0d)", pix.x, pix.y,
                 pix.u, e.u, pix.v, e.v, pix.w, e.w, e.x, e.y);
      end
      if (!bp && last_px >= 0 && cyc - last_px == 3) n_rate++;
      if (!bp && last_px >= 0 && cyc - last_px < 3) begin
        failures++; $display("FAIL pixels %0d cycles apart", cyc - last_px);
      end
      last_px = cyc;
    end
  end

  task automatic send_line();
    line_t l;
    longint ya [4], da [4], q;
    int x0, n;
    x0 = $urandom_range(400); n = $urandom_range(20);
    l.y  = 9'($urandom_range(511));
    l.xl = 14'(x0); l.xr = 14'(x0 + n);
    ya[3] = longint'($urandom_range(1 << 20, 1 << 16));
    da[3] = longint'($urandom_range(400)) - 200;
    for (int k = 0; k < 3; k++) begin
      ya[k] = longint'($urandom_range(100)) * ya[3] / 8 - ya[3] * 3;
      da[k] = longint'($urandom_range(4000)) - 2000;
    end
    l.y0 = ACC_W'(ya[0]); l.y1 = ACC_W'(ya[1]); l.y2 = ACC_W'(ya[2]); l.y3 = ACC_W'(ya[3]);
    l.d0 = ACC_W'(da[0]); l.d1 = ACC_W'(da[1]); l.d2 = ACC_W'(da[2]); l.d3 = ACC_W'(da[3]);
    l.uinit = 25'($urandom); l.vinit = 25'($urandom); l.winit = 25'($urandom);
    for (int x = x0; x <= x0 + n; x++) begin
      pixel_t e;
      e.x = 9'(x); e.y = l.y;
      q = ya[0] * 64 / ya[3]; e.u = TEX_W'(longint'(l.uinit) + q);
      q = ya[1] * 64 / ya[3]; e.v = TEX_W'(longint'(l.vinit) + q);
      q = ya[2] * 64 / ya[3]; e.w = TEX_W'(longint'(l.winit) + q);
      expq.push_back(e);
      for (int k = 0; k < 4; k++) ya[k] += da[k];
    end
    // drive and test the handshake at the falling edge, where it is stable
    @(negedge clk);
    line = l;
    line_valid = 1;
    while (!line_ready) @(negedge clk);
    @(posedge clk);
    #1 line_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 60; i++) send_line();
    while (!idle) @(posedge clk);
    bp = 1;
    for (int i = 0; i < 60; i++) send_line();
    while (!idle) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_stall == 0 || n_rate < 100) begin
      failures++; $display("FAIL left=%0d stalls=%0d rate=%0d", expq.size(), n_stall, n_rate);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
