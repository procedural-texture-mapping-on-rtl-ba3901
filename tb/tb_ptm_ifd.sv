// tb_ptm_ifd: drives the two-phase handshake as a host would (toggle req,
// wait for ack to follow). Writes all 21 quad parameters with random values
// and checks the register file; checks that start waits for start_ready,
// that cls and sfb wait for drain_done, that each command gives exactly one
// pulse, and that an out-of-range parameter code changes nothing.
module tb_ptm_ifd;
  import ptm_pkg::*;
  logic clk = 0, rst_n = 0, req = 0, ack;
  logic [31:0] instr = 0;
  qparams_t qparam;
  logic start, start_ready = 1, cls, sfb, drain_done = 1;
  int checks = 0, failures = 0, n_start = 0, n_cls = 0, n_sfb = 0;
  logic [24:0] shadow [21];

  ptm_ifd dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (start) n_start++;
    if (cls) n_cls++;
    if (sfb) n_sfb++;
  end

  task automatic send(logic [1:0] op, logic [4:0] pc, logic [24:0] val);
    instr = {op, pc, val};
    #1 req = ~req;
    while (ack != req) @(posedge clk);
    #1;
  endtask

  task automatic expect_pulses(int s, int c, int f, string what);
    checks++;
    if (n_start != s || n_cls != c || n_sfb != f) begin
      failures++;
      $display("FAIL %s: start=%0d cls=%0d sfb=%0d", what, n_start, n_cls, n_sfb);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int round = 0; round < 5; round++) begin
      for (int i = 0; i < 21; i++) begin
        shadow[i] = 25'($urandom);
        send(2'd0, 5'(i), shadow[i]);
      end
      send(2'd0, 5'd25, 25'h1FFFFFF);
      for (int i = 0; i < 21; i++) begin
        checks++;
        if (qparam[i] != shadow[i]) begin failures++; $display("FAIL param %0d", i); end
      end
    end
    expect_pulses(0, 0, 0, "after params");
    // start held off while the quad unit is busy
    start_ready = 0;
    instr = {2'd1, 5'd0, 25'd0};
    #1 req = ~req;
    repeat (20) @(posedge clk);
    checks++;
    if (ack == req) begin failures++; $display("FAIL start acknowledged while busy"); end
    expect_pulses(0, 0, 0, "start held");
    start_ready = 1;
    while (ack != req) @(posedge clk);
    repeat (2) @(posedge clk); #1;
    expect_pulses(1, 0, 0, "start");
    // cls and sfb held off until the pipeline drains
    drain_done = 0;
    instr = {2'd3, 5'd0, 25'd0};
    #1 req = ~req;
    repeat (20) @(posedge clk);
    expect_pulses(1, 0, 0, "cls held");
    drain_done = 1;
    while (ack != req) @(posedge clk);
    repeat (2) @(posedge clk); #1;
    expect_pulses(1, 1, 0, "cls");
    send(2'd2, 5'd0, 25'd0);
    repeat (2) @(posedge clk); #1;
    expect_pulses(1, 1, 1, "sfb");
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
