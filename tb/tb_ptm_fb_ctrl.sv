// tb_ptm_fb_ctrl: checks the frame buffer controller on a 16 x 8 screen.
// A pixel is written one cycle after it arrives, to the back buffer at
// {back, y, x}. A clear writes the background color to every address of the
// back buffer, one per cycle, in W*H cycles with busy high throughout; a
// switch swaps front and back. The expected writes come from a queue built
// by the testbench from the commands it sends.
module tb_ptm_fb_ctrl;
  import ptm_pkg::*;
  localparam int W = 16, H = 8;
  localparam color_t BG = 24'h102030;
  logic clk = 0, rst_n = 0, pix_valid = 0, cls = 0, sfb = 0, we, front, busy;
  logic [3:0] x = '0;
  logic [2:0] y = '0;
  color_t color = '0, wdata;
  logic [7:0] waddr;
  int checks = 0, failures = 0, n_busy = 0, n_sw = 0;
  logic [31:0] expw [$];   // {addr, color}
  logic fr = 0;

  ptm_fb_ctrl #(.W(W), .H(H), .BG_COLOR(BG)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && busy) n_busy++;
    if (rst_n && we) begin
      logic [31:0] e;
      checks++;
      e = expw.pop_front();
      if ({waddr, wdata} != e) begin
        failures++; $display("FAIL write %h %h exp %h %h", waddr, wdata, e[31:24], e[23:0]);
      end
    end
    if (rst_n) begin
      checks++;
      if (front != fr) begin failures++; $display("FAIL front"); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) begin
      int n;
      n = $urandom_range(30);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        pix_valid = $urandom_range(1);
        x = 4'($urandom); y = 3'($urandom); color = 24'($urandom);
        if (pix_valid) expw.push_back({!fr, y, x, color});
      end
      @(negedge clk);
      pix_valid = 0;
      if (r % 2 == 0) begin
        cls = 1;
        for (int a = 0; a < W * H; a++) expw.push_back({!fr, 7'(a), BG});
        @(negedge clk);
        cls = 0;
        @(negedge clk);
        while (busy) @(negedge clk);
        checks++;
        if (expw.size() > 1) begin failures++; $display("FAIL clear incomplete"); end
      end else begin
        sfb = 1;
        @(posedge clk);
        #1 fr = !fr; n_sw++;
        @(negedge clk);
        sfb = 0;
      end
    end
    repeat (3) @(posedge clk);
    checks++;
    if (expw.size() != 0 || n_busy != 6 * W * H || n_sw != 6) begin
      failures++; $display("FAIL left=%0d busy=%0d", expw.size(), n_busy);
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
