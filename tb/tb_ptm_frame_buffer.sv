// tb_ptm_frame_buffer: the frame buffer (controller, double memory, VGA
// driver) on a 16 x 8 image with a small 28 x 13 clock raster. Each round
// clears the back buffer, writes random pixels into it, switches buffers
// and then compares one whole displayed frame, clock by clock, with a model
// of the buffer now in front: background where nothing was drawn, the last
// color drawn elsewhere, black outside the image. Pixels are held back while
// a clear runs, as the rest of the design does.
module tb_ptm_frame_buffer;
  import ptm_pkg::*;
  localparam int W = 16, H = 8, HT = 28, VT = 13;
  logic clk = 0, rst_n = 0, pix_valid = 0, cls = 0, sfb = 0;
  logic busy, front, hsync, vsync, de, frame_start;
  logic [3:0] x = '0;
  logic [2:0] y = '0;
  color_t color = '0, rgb;
  color_t model [2][H][W];
  int checks = 0, failures = 0, n_cls = 0, n_sfb = 0;
  logic fr = 0;

  ptm_frame_buffer #(.W(W), .H(H), .H_ACTIVE(20), .H_FP(2), .H_SYNC(3), .H_BP(3),
                     .V_ACTIVE(10), .V_FP(1), .V_SYNC(1), .V_BP(1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check_frame();
    @(negedge clk);
    while (!frame_start) @(negedge clk);
    for (int p = 0; p < HT * VT; p++) begin
      int h, v;
      color_t e;
      h = p % HT; v = p / HT;
      e = (h < W && v < H) ? model[fr][v][h] : '0;
      checks++;
      if (rgb != e || de != (h < 20 && v < 10)) begin
        failures++; $display("FAIL (%0d,%0d) rgb %h exp %h", h, v, rgb, e);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      cls = 1;
      @(negedge clk);
      cls = 0; n_cls++;
      for (int j = 0; j < H; j++) for (int i = 0; i < W; i++) model[!fr][j][i] = '0;
      while (busy) @(negedge clk);
      for (int k = 0; k < 60; k++) begin
        @(negedge clk);
        pix_valid = 1; x = 4'($urandom); y = 3'($urandom); color = 24'($urandom);
        model[!fr][y][x] = color;
      end
      @(negedge clk);
      pix_valid = 0;
      sfb = 1;
      @(negedge clk);
      sfb = 0; n_sfb++;
      fr = !fr;
      checks++;
      if (front != fr) begin failures++; $display("FAIL front"); end
      check_frame();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
