// tb_ptm_rng: checks R(a,b,c) = T3(T2(T1(a)+b)+c) against a model built
// from the table constants, on random and corner inputs; checks that R is
// a bijection in a for fixed b, c, and that its values are spread
// (both signs occur).
module tb_ptm_rng;
  localparam logic [63:0] R1 = 64'h8F_C7_E3_F1_F8_7C_3E_1F;
  localparam logic [63:0] R2 = 64'h1D_BB_30_25_18_CA_4D_A5;
  localparam logic [63:0] R3 = 64'h71_19_CB_1F_72_3F_1E_D9;
  logic [7:0] a, b, c, r;
  int checks = 0, failures = 0;

  ptm_rng dut (.a, .b, .c, .r);

  function automatic logic [7:0] xt(logic [63:0] m, logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) y[i] = ^(x & m[8*i +: 8]);
    return y;
  endfunction

  function automatic logic [7:0] model(logic [7:0] pa, logic [7:0] pb, logic [7:0] pc);
    return xt(R3, 8'(xt(R2, 8'(xt(R1, pa) + pb)) + pc));
  endfunction

  initial begin
    bit seen [256];
    int distinct = 0, neg = 0;
    for (int i = 0; i < 2000; i++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      #1;
      checks++;
      if (r !== model(a, b, c)) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h r=%h exp=%h", a, b, c, r, model(a, b, c));
      end
    end
    b = 8'h37; c = 8'hC4;
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      if (!seen[r]) distinct++;
      seen[r] = 1'b1;
      if (r[7]) neg++;
    end
    checks++;
    if (distinct != 256) begin failures++; $display("FAIL distinct=%0d", distinct); end
    checks++;
    if (neg != 128) begin failures++; $display("FAIL negatives=%0d", neg); end
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
