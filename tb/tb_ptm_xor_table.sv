// tb_ptm_xor_table: checks the XOR table against a bit-by-bit parity model
// for all 256 inputs, and checks that the default matrix is invertible
// (all 256 outputs distinct).
module tb_ptm_xor_table;
  localparam logic [63:0] R = 64'h8F_C7_E3_F1_F8_7C_3E_1F;
  logic [7:0] x, y;
  int checks = 0, failures = 0;
  bit seen [256];

  ptm_xor_table #(.W(8), .R(R)) dut (.x, .y);

  function automatic logic [7:0] model(logic [7:0] a);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) begin
      r[i] = 1'b0;
      for (int j = 0; j < 8; j++) if (a[j] && R[8*i+j]) r[i] = ~r[i];
    end
    return r;
  endfunction

  initial begin
    int distinct = 0;
    for (int a = 0; a < 256; a++) begin
      x = 8'(a);
      #1;
      checks++;
      if (y !== model(x)) begin
        failures++;
        $display("FAIL x=%h y=%h exp=%h", x, y, model(x));
      end
      if (!seen[y]) distinct++;
      seen[y] = 1'b1;
    end
    checks++;
    if (distinct != 256) begin failures++; $display("FAIL distinct=%0d", distinct); end
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
