// tb_ptm_stst: drives the screen to texture space unit as the host would,
// through the two-phase req/ack instruction channel: 21 parameter writes
// and a start per quad, with clear-screen and switch-buffer commands in
// between. Every pixel leaving the unit is compared, in order, with the
// reference rasterisation of the quad. The test checks that cls and sfb
// come out once per command and only when the downstream side reports idle
// and the frame buffer not busy, that a start waits while the frame buffer
// is busy (a quad sent right after a clear), and that random back-pressure on pix_ready loses no pixel.
module tb_ptm_stst;
  import ptm_pkg::*;
  import ptm_ref_pkg::*;
  logic clk = 0, rst_n = 0, req = 0, ack, pix_valid, pix_ready = 1, cls, sfb;
  logic downstream_idle = 1, fb_busy = 0, idle;
  logic [INSTR_W-1:0] instr = '0;
  pixel_t pix;
  int checks = 0, failures = 0, n_cls = 0, n_sfb = 0, n_stall = 0, n_hold = 0;
  bit bp = 0;
  ref_pix_t expq [$];

  ptm_stst dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (bp) pix_ready <= ($urandom_range(2) == 0);
    if (rst_n && pix_valid && !pix_ready) n_stall++;
    if (rst_n && pix_valid && pix_ready) begin
      ref_pix_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected pixel (%0d,%0d)", pix.x, pix.y);
      end else begin
        e = expq.pop_front();
        if (int'(pix.x) != e.x || int'(pix.y) != e.y || int'(pix.u) != e.u ||
            int'(pix.v) != e.v || int'(pix.w) != e.w) begin
          failures++;
          $display("FAIL pix (%0d,%0d) uvw %0d %0d %0d exp (%0d,%0d) %0d %0d %0d", pix.x, pix.y,
                   pix.u, pix.v, pix.w, e.x, e.y, e.u, e.v, e.w);
        end
      end
    end
    // the cycle in which a clear or switch command executes
    if (rst_n && dut.u_ifd.exec && dut.u_ifd.ins.op inside {OP_CLS, OP_SFB}) begin
      checks++;
      if (!downstream_idle || fb_busy || expq.size() != 0 || !dut.idle) begin
        failures++; $display("FAIL cls/sfb executed while work pending");
      end
    end
    if (rst_n && cls) n_cls++;
    if (rst_n && sfb) n_sfb++;
    if (rst_n && fb_busy && dut.u_ifd.pending && dut.u_ifd.ins.op == OP_START) n_hold++;
    if (rst_n && fb_busy && dut.start) begin
      failures++; $display("FAIL start while frame buffer busy");
    end
  end

  // one instruction through the two-phase handshake
  task automatic host(logic [1:0] op, int pcode, int value);
    @(negedge clk);
    instr = {op, 5'(pcode), 25'(value)};
    req = ~req;
    while (ack != req) @(negedge clk);
  endtask

  task automatic quad();
    int q [21];
    rand_quad(q, 512, 512);
    quad_pixels(q, expq);
    for (int i = 0; i < 21; i++) host(OP_PARAM, i, q[i]);
    host(OP_START, 0, 0);
  endtask

  // a frame buffer that stays busy for a while after each clear
  initial begin
    forever begin
      @(posedge clk);
      if (cls) begin
        #1 fb_busy = 1;
        repeat (400) @(posedge clk);
        #1 fb_busy = 0;
      end
    end
  end

  // the pipeline after this unit: idle some cycles after the last pixel
  int quiet = 0;
  always @(posedge clk) begin
    quiet <= (pix_valid || !dut.idle) ? 0 : quiet + 1;
    downstream_idle <= (quiet > 8);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 24; i++) begin
      if (i == 12) bp = 1;
      quad();
      if (i % 4 == 1) host(OP_CLS, 0, 0);
      if (i % 4 == 3) host(OP_SFB, 0, 0);
    end
    while (!idle || expq.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_cls != 6 || n_sfb != 6 || n_stall == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL left=%0d cls=%0d sfb=%0d stalls=%0d holds=%0d", expq.size(), n_cls,
               n_sfb, n_stall, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
