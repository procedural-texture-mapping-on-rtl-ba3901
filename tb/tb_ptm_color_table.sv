// tb_ptm_color_table: checks the default marble palette formula, then
// loads random colors and reads them back, with the one-cycle latency.
module tb_ptm_color_table;
  import ptm_pkg::*;
  logic clk = 0, we = 0;
  logic [6:0] raddr, waddr;
  color_t rdata, wdata;
  color_t shadow [128];
  int checks = 0, failures = 0;

  ptm_color_table #(.DEPTH(128), .PALETTE(0)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 128; i++) begin
      int t;
      t = i < 64 ? i : 127 - i;
      raddr = 7'(i);
      @(posedge clk); #1;
      checks++;
      if (rdata.r != 8'(255 - 2*t) || rdata.b != 8'(255 - t)) begin
        failures++;
        $display("FAIL default %0d: %h", i, rdata);
      end
    end
    for (int i = 0; i < 128; i++) begin
      shadow[i] = color_t'($urandom);
      we = 1; waddr = 7'(i); wdata = shadow[i];
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(127);
      raddr = 7'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata != shadow[a]) begin
        failures++;
        $display("FAIL read %0d: %h exp %h", a, rdata, shadow[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
