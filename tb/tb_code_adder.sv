// tb_code_adder: checks that every chip sum equals the number of ports whose
// chip is 1, over random chip patterns and the all-ones case (sum 5).
module tb_code_adder;
  localparam int NP = 5;
  logic [7:0][7:0] chips_in [NP];
  logic [7:0][7:0][2:0] sum;
  int checks = 0, failures = 0;

  code_adder dut (.chips_in, .sum);

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int p = 0; p < NP; p++)
        for (int b = 0; b < 8; b++) chips_in[p][b] = (n == 0) ? 8'hFF : 8'($urandom);
      #1;
      for (int b = 0; b < 8; b++)
        for (int c = 0; c < 8; c++) begin
          int e; e = 0;
          for (int p = 0; p < NP; p++) e += chips_in[p][b][c];
          checks++;
          if (int'(sum[b][c]) != e) begin failures++; $display("FAIL b%0d c%0d %0d!=%0d", b, c, sum[b][c], e); end
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
