// tb_ptm_div: streams random divisions, one per cycle, and compares each
// result with trunc(num * 64 / den) computed with 64-bit integers
// (saturated to +-(2^19 - 1)); checks the tag order and the 5-cycle latency.
module tb_ptm_div;
  localparam int N_W = 40, Q_W = 20, QF = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic signed [N_W-1:0] num, den;
  logic signed [Q_W-1:0] quot;
  logic [15:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  longint exp_q [int];
  int cyc = 0, issue_cyc [int];

  ptm_div #(.N_W(N_W), .Q_W(Q_W), .QF(QF), .STAGES(4), .TAG_W(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint model(longint n, longint d);
    longint q, lim;
    lim = (longint'(1) << (Q_W - 1)) - 1;
    if (d == 0) return (n < 0) != (d < 0) ? -lim : lim;
    q = (n * 64) / d;             // truncates toward zero
    if (q > lim) q = lim;
    if (q < -lim) q = -lim;
    return q;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (!exp_q.exists(int'(out_tag)) || longint'(quot) != exp_q[int'(out_tag)] ||
        cyc - issue_cyc[int'(out_tag)] != 5) begin
      failures++;
      $display("FAIL tag=%0d q=%0d exp=%0d lat=%0d", out_tag, quot, exp_q[int'(out_tag)], cyc - issue_cyc[int'(out_tag)]);
    end
    exp_q.delete(int'(out_tag));
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      longint n, d;
      unique case (i % 4)
        0: begin n = longint'($urandom_range(200000)) - 100000; d = longint'($urandom_range(2000)) + 1; end
        1: begin n = (longint'($urandom) << 4) - (longint'(1) << 35); d = (longint'($urandom) << 3) + 7; end
        2: begin n = longint'($urandom_range(5000)); d = -(longint'($urandom_range(300)) + 1); end
        default: begin n = longint'($urandom_range(1000000)); d = longint'($urandom_range(3)); end
      endcase
      num = N_W'(n); den = N_W'(d); in_tag = 16'(i); in_valid = 1;
      exp_q[i] = model(n, d);
      issue_cyc[i] = cyc;
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
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
