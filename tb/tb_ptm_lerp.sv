// tb_ptm_lerp: checks a + floor(c * (b - a) / 64) on random and extreme
// operands, and that the result lies between a and b.
module tb_ptm_lerp;
  logic signed [7:0] a, b, y;
  logic [5:0] c;
  int checks = 0, failures = 0;

  ptm_lerp #(.W(8), .CW(6)) dut (.a, .b, .c, .y);

  task automatic check1();
    int e, lo, hi;
    e  = int'(a) + int'($floor(real'(int'(c) * (int'(b) - int'(a))) / 64.0));
    lo = (a < b) ? int'(a) : int'(b);
    hi = (a < b) ? int'(b) : int'(a);
    #1;
    checks++;
    if (int'(y) != e || int'(y) < lo || int'(y) > hi) begin
      failures++;
      $display("FAIL a=%0d b=%0d c=%0d y=%0d exp=%0d", a, b, c, y, e);
    end
  endtask

  initial begin
    a = -128; b = 127; c = 63; check1();
    a = 127; b = -128; c = 63; check1();
    a = 5; b = 9; c = 0; check1();
    a = -100; b = 100; c = 32; check1();
    for (int i = 0; i < 3000; i++) begin
      a = 8'($urandom); b = 8'($urandom); c = 6'($urandom);
      check1();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
