// tb_ptm_q2s: feeds random quads and compares every scan-line description
// with the incremental algorithm evaluated in 64-bit integers: ys, floor of
// the left and right edges, and Y0s..Y3s (Yks += ak0 * xsdiff + ak1), plus
// the per-quad values passed along. With line_ready held high, lines must
// follow each other every 24 cycles (23 to compute, 1 to hand over); a
// second pass applies random back-pressure. Negative, zero and positive
// edge slopes are all exercised.
module tb_ptm_q2s;
  import ptm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, idle, line_valid, line_ready = 1;
  qparams_t qparam;
  line_t line;
  int checks = 0, failures = 0, cyc = 0, last_line = -1, n_neg = 0, n_pos = 0;
  bit bp = 0;
  line_t expq [$];

  ptm_q2s dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bp) line_ready <= ($urandom_range(3) == 0);
    if (rst_n && line_valid && line_ready) begin
      line_t e;
      e = expq.pop_front();
      checks++;
      if (line != e) begin
        failures++;
        $display("FAIL line y=%0d/%0d xl=%0d/%0d xr=%0d/%0d y0=%0d/%0d y3=%0d/%0d", line.y, e.y,
                 line.xl, e.xl, line.xr, e.xr, line.y0, e.y0, line.y3, e.y3);
      end
      if (!bp && last_line >= 0 && line.y != qparam[QP_YINIT][8:0]) begin
        checks++;
        if (cyc - last_line != 24) begin failures++; $display("FAIL spacing %0d", cyc - last_line); end
      end
      last_line = cyc;
    end
  end

  function automatic longint sv(logic [24:0] x);
    return longint'(signed'(x));
  endfunction

  task automatic quad();
    longint xsl, xsr, y0, y1, y2, y3, d, old;
    int ys, yf;
    line_t e;
    for (int i = 0; i < 21; i++) qparam[i] = 25'(int'($urandom_range(1 << 21)) - (1 << 20));
    ys = $urandom_range(400); yf = ys + $urandom_range(12);
    qparam[QP_YINIT] = 25'(ys); qparam[QP_YFINAL] = 25'(yf);
    xsl = longint'($urandom_range(200 << 12));
    xsr = xsl + longint'($urandom_range(100 << 12));
    qparam[QP_XLINIT] = 25'(xsl); qparam[QP_XRINIT] = 25'(xsr);
    qparam[QP_XLINC] = 25'(int'($urandom_range(6 << 12)) - (3 << 12));
    qparam[QP_XRINC] = 25'(int'($urandom_range(6 << 12)) - (3 << 12));
    y0 = sv(qparam[QP_Y0S]); y1 = sv(qparam[QP_Y1S]); y2 = sv(qparam[QP_Y2S]); y3 = sv(qparam[QP_Y3S]);
    for (int y = ys; y <= yf; y++) begin
      e.y = 9'(y); e.xl = 14'(xsl >>> 12); e.xr = 14'(xsr >>> 12);
      e.y0 = ACC_W'(y0); e.y1 = ACC_W'(y1); e.y2 = ACC_W'(y2); e.y3 = ACC_W'(y3);
      e.d0 = ACC_W'(sv(qparam[QP_A00])); e.d1 = ACC_W'(sv(qparam[QP_A10]));
      e.d2 = ACC_W'(sv(qparam[QP_A20])); e.d3 = ACC_W'(sv(qparam[QP_A30]));
      e.uinit = qparam[QP_UINIT]; e.vinit = qparam[QP_VINIT]; e.winit = qparam[QP_WINIT];
      expq.push_back(e);
      old = xsl >>> 12;
      xsl += sv(qparam[QP_XLINC]);
      xsr += sv(qparam[QP_XRINC]);
      d = (xsl >>> 12) - old;
      if (d < 0) n_neg++;
      if (d > 0) n_pos++;
      y0 += sv(qparam[QP_A00]) * d + sv(qparam[QP_A01]);
      y1 += sv(qparam[QP_A10]) * d + sv(qparam[QP_A11]);
      y2 += sv(qparam[QP_A20]) * d + sv(qparam[QP_A21]);
      y3 += sv(qparam[QP_A30]) * d + sv(qparam[QP_A31]);
    end
    while (!idle) @(posedge clk);
    #1 start = 1;
    @(posedge clk); #1 start = 0;
    @(posedge clk); #1;
    while (!idle) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int q = 0; q < 40; q++) quad();
    bp = 1;
    for (int q = 0; q < 40; q++) quad();
    checks++;
    if (expq.size() != 0 || n_neg < 20 || n_pos < 20) begin
      failures++; $display("FAIL left=%0d neg=%0d pos=%0d", expq.size(), n_neg, n_pos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
