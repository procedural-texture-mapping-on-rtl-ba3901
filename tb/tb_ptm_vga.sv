// tb_ptm_vga: the VGA driver at its default 640 x 480 timing (800 x 525
// clocks per frame). The testbench keeps its own position counters from
// reset and a model frame buffer memory with one cycle of read latency,
// and checks for every clock of two frames: hsync low for the 96 clocks
// after 656, vsync low for lines 490 and 491, display enable over the
// visible 640 x 480, the pixel of the shown buffer inside the 512-wide
// image and black elsewhere, and frame_start once per frame (three starts seen). The shown
// buffer is switched between the frames.
module tb_ptm_vga;
  import ptm_pkg::*;
  logic clk = 0, rst_n = 0, front = 0, hsync, vsync, de, frame_start;
  logic [18:0] raddr;
  color_t rdata, rgb;
  int checks = 0, failures = 0, n = 0, n_fs = 0;
  logic fr_d = 0;

  ptm_vga dut (.*);
  always #5 clk = ~clk;

  function automatic color_t f(logic [18:0] a);
    return 24'(a * 19'd40503) ^ {5'(a[18:14]), a};
  endfunction

  always @(posedge clk) begin
    rdata <= f(raddr);
    if (rst_n) begin
      n <= n + 1;
      fr_d <= front;
    end
  end

  // position n - 1 is on the outputs after edge n
  always @(negedge clk) begin
    if (rst_n && n > 0) begin
      int p, h, v;
      logic e_hs, e_vs, e_de;
      color_t e_rgb;
      p = n - 1;
      h = p % 800; v = (p / 800) % 525;
      e_hs = !(h >= 656 && h < 752);
      e_vs = !(v >= 490 && v < 492);
      e_de = (h < 640 && v < 480);
      e_rgb = (h < 512 && v < 480) ? f({fr_d, 9'(v), 9'(h)}) : '0;
      checks++;
      if (hsync != e_hs || vsync != e_vs || de != e_de || rgb != e_rgb ||
          frame_start != (h == 0 && v == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL at h=%0d v=%0d: hs %b vs %b de %b rgb %h/%h fs %b",
                                    h, v, hsync, vsync, de, rgb, e_rgb, frame_start);
      end
      if (frame_start) n_fs++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (800 * 525) @(posedge clk);
    #1 front = 1;
    repeat (800 * 525 + 5) @(posedge clk);
    checks++;
    if (n_fs != 3) begin failures++; $display("FAIL frame_start count %0d", n_fs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
