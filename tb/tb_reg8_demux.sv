// tb_reg8_demux: self-checking test of the register + demultiplexer.
// Presents random packets with random enables and checks, one cycle later,
// that exactly the write enable named by packet bits [2:0] (1..5) is high,
// that only that output carries the packet, and that selects 0, 6, 7 and a
// low enable raise nothing. Also checks the register holds with enable low.
module tb_reg8_demux;
  localparam int NP = 5, DW = 8;
  logic clk = 0, rst = 1, en;
  logic [DW-1:0] data_in;
  logic [DW-1:0] d_out [NP];
  logic [NP-1:0] we;
  int checks = 0, failures = 0;

  reg8_demux dut (.clk, .rst, .en, .data_in, .d_out, .we);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [DW-1:0] prev_d;
    bit prev_en;
    en = 0; data_in = 0;
    repeat (2) @(posedge clk);
    #1 check(we == 0, "reset we");
    rst = 0;
    prev_en = 0; prev_d = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      data_in = DW'($urandom);
      if (n == 5) begin en = 1; data_in = 8'd68; end   // 0100_0100 -> port 4
      @(posedge clk); #1;
      for (int k = 0; k < NP; k++) begin
        bit exp_we;
        exp_we = en && (data_in[2:0] == 3'(k + 1));
        check(we[k] == exp_we, "we");
        check(d_out[k] == (exp_we ? data_in : 8'h00), "d_out");
      end
      if (n == 5) check(we == 5'b01000 && d_out[3] == 8'd68, "packet 68 to port 4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
