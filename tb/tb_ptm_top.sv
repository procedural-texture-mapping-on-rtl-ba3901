// tb_ptm_top: end-to-end test of the whole texture mapping system at its
// full size (512 x 512 screen, 640 x 480 VGA raster), with no parameter
// overrides. A host model sends instructions over the two-phase req/ack
// channel: clear screen, then for each of the six textures the 21 quad
// parameters and a start, then switch frame buffer. Every pixel of every
// quad is worked out independently (scan-line walk, perspective division,
// fractal noise, texture color rule) and the frame buffer memory is
// compared with that model after each switch: drawn pixels hold their
// texture color, the rest of the buffer the clear color. The displayed
// frame is then compared on the VGA outputs over one whole frame.
//
// Mechanisms counted, each of which must occur: back-pressure from the
// texture generator into the pixel unit, a start held while the frame
// buffer clears, clear screen, switch frame buffer, each of the six
// textures, and a color table reload (the marble table is reloaded with
// inverted colors before a second marble quad). A last quad of four
// 201-pixel lines checks the pixel rate of one pixel per four clocks.
module tb_ptm_top;
  import ptm_pkg::*;
  import ptm_ref_pkg::*;
  localparam int N = SCR_W * SCR_H;

  logic clk = 0, rst_n = 0, req = 0, ack, hsync, vsync, de, frame_start, front, idle;
  logic [INSTR_W-1:0] instr = '0;
  texture_e tex_sel = TEX_MARBLE, tbl_sel = TEX_MARBLE;
  logic tbl_we = 0;
  logic [7:0] tbl_addr = '0;
  color_t tbl_data = '0, rgb;

  int checks = 0, failures = 0;
  int n_stall = 0, n_hold = 0, n_cls = 0, n_sfb = 0, n_reload = 0, n_pix = 0;
  int n_tex [6];
  bit inverted = 0;
  color_t model [2][SCR_H][SCR_W];
  logic fr = 0;

  ptm_top dut (.*);
  always #5 clk = ~clk;

  // pixel rate: first and last texture generator output of a measured quad
  bit measure = 0;
  int t_first = -1, t_last = -1, n_meas = 0, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (measure && dut.tg_out_valid) begin
      if (t_first < 0) t_first = cyc;
      t_last = cyc;
      n_meas++;
    end
    if (rst_n) begin
      if (dut.pix_valid && !dut.pix_ready) n_stall++;
      if (dut.fb_busy && dut.u_stst.u_ifd.pending && dut.u_stst.u_ifd.ins.op == OP_START) n_hold++;
      if (dut.cls) n_cls++;
      if (dut.sfb) n_sfb++;
      if (dut.tg_out_valid) n_pix++;
    end
  end

  task automatic host(logic [1:0] op, int pcode, int value);
    @(negedge clk);
    instr = {op, 5'(pcode), 25'(value)};
    req = ~req;
    while (ack != req) @(negedge clk);
  endtask

  task automatic draw(texture_e t, bit wait_idle = 1);
    int q [21];
    rand_quad(q, SCR_H, SCR_W);
    draw_q(t, q, wait_idle);
  endtask

  task automatic draw_q(texture_e t, int q [21], bit wait_idle);
    ref_pix_t px [$];
    color_t c;
    if (wait_idle) while (!idle) @(negedge clk);
    tex_sel = t;
    quad_pixels(q, px);
    foreach (px[i]) begin
      c = texture(int'(t), px[i].u, px[i].v, px[i].w);
      if (t == TEX_MARBLE && inverted) c = ~c;
      model[!fr][px[i].y][px[i].x] = c;
    end
    for (int i = 0; i < 21; i++) host(OP_PARAM, i, q[i]);
    host(OP_START, 0, 0);
    n_tex[int'(t)]++;
  endtask

  task automatic clear_screen();
    host(OP_CLS, 0, 0);
    for (int y = 0; y < SCR_H; y++)
      for (int x = 0; x < SCR_W; x++) model[!fr][y][x] = '0;
  endtask

  task automatic switch_and_check();
    int bad;
    host(OP_SFB, 0, 0);
    fr = !fr;
    @(negedge clk);
    while (!idle) @(negedge clk);
    checks++;
    if (front != fr) begin failures++; $display("FAIL front %b %b sfb=%0d t=%0t", front, fr, n_sfb, $time); end
    // frame buffer memory against the model
    bad = 0;
    for (int y = 0; y < SCR_H; y++)
      for (int x = 0; x < SCR_W; x++) begin
        checks++;
        if (dut.u_fb.u_mem.mem[{fr, 9'(y), 9'(x)}] != model[fr][y][x]) begin
          failures++;
          if (bad++ < 5) $display("FAIL fb (%0d,%0d) %h exp %h", x, y,
                                  dut.u_fb.u_mem.mem[{fr, 9'(y), 9'(x)}], model[fr][y][x]);
        end
      end
  endtask

  // one displayed frame against the model of the front buffer
  task automatic check_vga();
    @(negedge clk);
    while (!frame_start) @(negedge clk);
    for (int p = 0; p < 800 * 525; p++) begin
      int h, v;
      color_t e;
      h = p % 800; v = p / 800;
      e = (h < SCR_W && v < 480) ? model[fr][v][h] : '0;
      if (h < 640 && v < 480) begin
        checks++;
        if (rgb != e || !de) begin
          failures++;
          if (failures < 10) $display("FAIL vga (%0d,%0d) %h exp %h", h, v, rgb, e);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first frame: the two buffers start unknown, so clear both
    clear_screen();
    switch_and_check();
    clear_screen();
    for (int t = 0; t < 6; t++) draw(texture_e'(t));
    switch_and_check();
    check_vga();
    // second frame: reload the marble colors, clear, and send the next quad
    // at once, so that its start has to wait for the clear to finish
    while (!idle) @(negedge clk);
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      tbl_we = 1; tbl_sel = TEX_MARBLE; tbl_addr = 8'(i);
      tbl_data = ~color_t'(palette(0, i));
      n_reload++;
    end
    @(negedge clk);
    tbl_we = 0;
    inverted = 1;
    clear_screen();
    draw(TEX_MARBLE, 0);
    draw(TEX_FIRE);
    // rate: a quad of 4 lines of 201 pixels must come out at one pixel
    // per four cycles, apart from the short gap between lines
    begin
      int q [21];
      real r;
      for (int i = 0; i < 21; i++) q[i] = 0;
      q[0] = 300; q[1] = 303; q[2] = 50 << 12; q[4] = 250 << 12;
      q[9] = 1 << 16; q[10] = 1 << 12; q[16] = 64; q[20] = 1000;
      while (!idle) @(negedge clk);
      measure = 1;
      draw_q(TEX_FOG, q, 1);
      while (!idle) @(negedge clk);
      measure = 0;
      r = real'(t_last - t_first) / real'(n_meas - 1);
      $display("measured %0d pixels, %.3f cycles per pixel", n_meas, r);
      checks++;
      if (n_meas != 4 * 201 || r < 4.0 || r > 4.1) begin
        failures++; $display("FAIL pixel rate");
      end
    end
    switch_and_check();
    $display("pixels %0d stalls %0d held starts %0d cls %0d sfb %0d reloads %0d",
             n_pix, n_stall, n_hold, n_cls, n_sfb, n_reload);
    checks++;
    if (n_stall == 0 || n_hold == 0 || n_cls != 3 || n_sfb != 3 || n_reload == 0) begin
      failures++; $display("FAIL a mechanism did not occur");
    end
    for (int t = 0; t < 6; t++) begin
      checks++;
      if (n_tex[t] == 0) begin failures++; $display("FAIL texture %0d never drawn", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
