// tb_walsh_code_gen: checks the Walsh code generator against the 8-chip code
// table written out by hand, and checks that codes 1..7 are balanced and
// pairwise orthogonal (in +1/-1 form the dot product is 0).
module tb_walsh_code_gen;
  logic [2:0] addr;
  logic [7:0] code;
  int checks = 0, failures = 0;
  logic [7:0] table_ref [8] = '{8'b11111111, 8'b10101010, 8'b11001100, 8'b10011001,
                                8'b11110000, 8'b10100101, 8'b11000011, 8'b10010110};
  logic [7:0] got [8];

  walsh_code_gen dut (.addr, .code);

  initial begin
    for (int k = 0; k < 8; k++) begin
      addr = 3'(k); #1;
      got[k] = code;
      checks++;
      if (code !== table_ref[k]) begin failures++; $display("FAIL code %0d = %b", k, code); end
    end
    for (int a = 1; a < 8; a++) begin
      checks++;
      if ($countones(got[a]) != 4) begin failures++; $display("FAIL balance %0d", a); end
      for (int b = a + 1; b < 8; b++) begin
        int dot; dot = 0;
        for (int i = 0; i < 8; i++) dot += (got[a][i] == got[b][i]) ? 1 : -1;
        checks++;
        if (dot != 0) begin failures++; $display("FAIL orthogonal %0d %0d", a, b); end
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
