// tb_crossbar: self-checking test of the 5x5 multiplexer crossbar.
// Applies random words and every select value 0..7 on every output and checks
// output j equals input sel[j], or zero for a select naming no input.
module tb_crossbar;
  localparam int NP = 5, DW = 8;
  logic [DW-1:0] din [NP], dout [NP];
  logic [2:0] sel [NP];
  int checks = 0, failures = 0;

  crossbar dut (.din, .sel, .dout);

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < NP; i++) begin
        din[i] = DW'($urandom);
        sel[i] = 3'((n + i * 3 + $urandom % 2) % 8);
      end
      #1;
      for (int j = 0; j < NP; j++) begin
        checks++;
        if (dout[j] !== (sel[j] < NP ? din[sel[j]] : 8'h00)) begin
          failures++; $display("FAIL out %0d sel %0d", j, sel[j]);
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
