// tb_ptm_fb_mem: the double frame buffer memory on a 16 x 8 screen. Fills
// both buffers, then issues random writes and reads, one each per cycle,
// and checks that read data appear one cycle after the address and that a
// read of the address being written returns the old contents.
module tb_ptm_fb_mem;
  import ptm_pkg::*;
  localparam int W = 16, H = 8, N = 2 * W * H;
  logic clk = 0, we = 0;
  logic [7:0] waddr = '0, raddr = '0;
  color_t wdata = '0, rdata, model [N], exp_d;
  int checks = 0, failures = 0;
  bit chk = 0;

  ptm_fb_mem #(.W(W), .H(H)) dut (.*);
  always #5 clk = ~clk;


  initial begin
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = 24'($urandom); model[a] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (chk) begin
        checks++;
        if (rdata != exp_d) begin failures++; $display("FAIL read %h exp %h", rdata, exp_d); end
      end
      we = $urandom_range(1); waddr = 8'($urandom); wdata = 24'($urandom);
      raddr = (i % 5 == 0) ? waddr : 8'($urandom);
      exp_d = model[raddr];
      if (we) model[waddr] = wdata;
      chk = 1;
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
