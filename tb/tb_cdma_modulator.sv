// tb_cdma_modulator: checks the spreading rule: with en high a 0 bit yields
// the codeword and a 1 bit its complement, chip by chip, for every packet
// bit; with en low every chip is 0.
module tb_cdma_modulator;
  logic en;
  logic [7:0] data, code;
  logic [7:0][7:0] chips;
  int checks = 0, failures = 0;

  cdma_modulator dut (.en, .data, .code, .chips);

  initial begin
    for (int n = 0; n < 200; n++) begin
      en = ($urandom % 4) != 0; data = 8'($urandom); code = 8'($urandom); #1;
      for (int b = 0; b < 8; b++) begin
        for (int i = 0; i < 8; i++) begin
          logic e;
          e = !en ? 1'b0 : (data[b] ? !code[i] : code[i]);
          checks++;
          if (chips[b][i] !== e) begin failures++; $display("FAIL b%0d c%0d", b, i); end
        end
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
