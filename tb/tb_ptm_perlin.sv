// tb_ptm_perlin: streams random coordinates, one per cycle, and compares
// each noise value with the reference model after the 4-cycle latency;
// checks that at lattice points the noise equals the corner's random value
// and that the output takes both signs.
module tb_ptm_perlin;
  import ptm_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [15:0] u, v, w;
  logic signed [7:0] noise;
  int checks = 0, failures = 0, npos = 0, nneg = 0;
  int expq [$];

  ptm_perlin dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    e = expq.pop_front();
    checks++;
    if (int'(noise) != e) begin
      failures++;
      $display("FAIL noise=%0d exp=%0d", noise, e);
    end
    if (noise > 0) npos++;
    if (noise < 0) nneg++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      u = 16'($urandom); v = 16'($urandom); w = 16'($urandom);
      if (i % 10 == 0) begin u[5:0] = 0; v[5:0] = 0; w[5:0] = 0; end
      in_valid = (i % 7 != 3);
      if (in_valid) begin
        expq.push_back(perlin(u, v, w));
        if (i % 10 == 0) begin
          checks++;
          if (perlin(u, v, w) != rnd(u >> 6, v >> 6, w >> 6)) begin
            failures++;
            $display("FAIL lattice value");
          end
        end
      end
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (expq.size() != 0 || npos < 100 || nneg < 100) begin
      failures++;
      $display("FAIL left=%0d pos=%0d neg=%0d", expq.size(), npos, nneg);
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
