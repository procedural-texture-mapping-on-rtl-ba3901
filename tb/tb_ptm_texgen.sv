// tb_ptm_texgen: runs all six textures in turn. For each, random texture
// coordinates are offered continuously; every color is compared with the
// reference model (shaping, fractal sum, color rule, default palettes),
// the tag must come back with it, the latency must be 11 cycles (14 when
// the pixel waited in the input register) and, after the first two,
// acceptances exactly four cycles apart. Finally a marble table entry is
// reloaded and its new color checked. Counts per texture must be nonzero.
module tb_ptm_texgen;
  import ptm_pkg::*;
  import ptm_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  texture_e tex_sel = TEX_MARBLE, tbl_sel = TEX_MARBLE;
  logic [15:0] u, v, w;
  logic [17:0] in_tag, out_tag;
  color_t color, tbl_data;
  logic tbl_we = 0;
  logic [7:0] tbl_addr = 0;
  int checks = 0, failures = 0, cyc = 0, last_take = -1;
  int per_tex [6];
  typedef struct { logic [23:0] c; int tag; int t; } exp_t;
  exp_t expq [$];
  bit took = 0, spacing_check = 1;
  int n_take = 0;
  logic [23:0] override_c = '0;
  bit use_override = 0;

  ptm_texgen #(.TAG_W(18)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && in_ready) begin
      expq.push_back('{use_override ? override_c : texture(int'(tex_sel), u, v, w), int'(in_tag), cyc});
      n_take++;
      if (spacing_check && n_take > 2) begin
        checks++;
        if (cyc - last_take != 4) begin failures++; $display("FAIL spacing %0d", cyc - last_take); end
      end
      last_take = cyc;
      took = 1;
    end
    if (rst_n && out_valid) begin
      exp_t e;
      e = expq.pop_front();
      checks++;
      if (color != e.c || int'(out_tag) != e.tag || (cyc - e.t != 11 && cyc - e.t != 14)) begin
        failures++;
        $display("FAIL tex=%0d color=%h exp=%h tag=%0d/%0d lat=%0d", tex_sel, color, e.c, out_tag, e.tag, cyc - e.t);
      end else per_tex[int'(tex_sel)]++;
    end
  end

  task automatic run(texture_e t, int n);
    int taken = 0;
    tex_sel = t;
    last_take = -1;
    n_take = 0;
    u = 16'($urandom); v = 16'($urandom); w = 16'($urandom); in_tag = 18'($urandom);
    in_valid = 1;
    while (taken < n) begin
      @(posedge clk); #1;
      if (took) begin
        took = 0; taken++;
        u = 16'($urandom); v = 16'($urandom); w = 16'($urandom); in_tag = 18'($urandom);
      end
    end
    in_valid = 0;
    repeat (20) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < 6; t++) run(texture_e'(t), 150);
    // reload the whole marble table with one color and check it is used
    tbl_sel = TEX_MARBLE; tbl_data = 24'h123456; tbl_we = 1;
    for (int i = 0; i < 128; i++) begin tbl_addr = 8'(i); @(posedge clk); #1; end
    tbl_we = 0;
    use_override = 1; override_c = 24'h123456;
    run(TEX_MARBLE, 10);
    for (int t = 0; t < 6; t++) begin
      checks++;
      if (per_tex[t] < 100) begin failures++; $display("FAIL texture %0d ran %0d", t, per_tex[t]); end
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
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
