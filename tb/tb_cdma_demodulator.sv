// tb_cdma_demodulator: checks decoding of chip sums.
// 1) The worked example: sums P = [3 0 3 2 2 3 4 3] decoded with the code
//    00001111 give sum(X) = -8, i.e. a 0 bit.
// 2) Random: up to five senders, each with a distinct code from 1..7 and a
//    random packet, are spread and summed in the testbench (int arithmetic);
//    decoding with each sender's code must give its packet with ok high; a
//    code nobody used must give ok low.
module tb_cdma_demodulator;
  logic [7:0][7:0][2:0] sum;
  logic [7:0] code, data;
  logic ok;
  int checks = 0, failures = 0;

  cdma_demodulator dut (.sum, .code, .data, .ok);

  function automatic logic [7:0] wcode(int k);
    logic [7:0] c;
    for (int i = 0; i < 8; i++) c[7-i] = ~(^(3'(k) & 3'(i)));
    return c;
  endfunction

  task automatic check(input bit okc, input string what);
    checks++;
    if (!okc) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int ex [8] = '{3, 0, 3, 2, 2, 3, 4, 3};
    // example: chip i of the listing is chip i here (chip 0 in the MSB)
    for (int b = 0; b < 8; b++) for (int i = 0; i < 8; i++) sum[b][7-i] = 3'(ex[i]);
    code = 8'b00001111; #1;
    check(data == 8'h00 && ok, "worked example decodes to 0");

    for (int n = 0; n < 300; n++) begin
      int nsend; int codes [5]; logic [7:0] pkt [5]; bit used [8];
      int s [8][8];
      for (int k = 0; k < 8; k++) used[k] = 0;
      nsend = 1 + $urandom % 5;
      for (int t = 0; t < nsend; t++) begin
        int k; do k = 1 + $urandom % 7; while (used[k]);
        used[k] = 1; codes[t] = k; pkt[t] = 8'($urandom);
      end
      for (int b = 0; b < 8; b++) for (int c = 0; c < 8; c++) s[b][c] = 0;
      for (int t = 0; t < nsend; t++)
        for (int b = 0; b < 8; b++) for (int c = 0; c < 8; c++)
          s[b][c] += wcode(codes[t])[c] ^ pkt[t][b];
      for (int b = 0; b < 8; b++) for (int c = 0; c < 8; c++) sum[b][c] = 3'(s[b][c]);
      for (int t = 0; t < nsend; t++) begin
        code = wcode(codes[t]); #1;
        check(ok && data == pkt[t], "decode sender");
      end
      for (int k = 1; k < 8; k++) if (!used[k]) begin
        code = wcode(k); #1;
        check(!ok, "unused code not ok");
        break;
      end
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
