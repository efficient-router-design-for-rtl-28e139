// tb_fifo: self-checking test of the FIFO unit in both read styles.
// Drives random write/read requests into a block-RAM style FIFO (FWFT = 0) and
// a first-word-fall-through FIFO (FWFT = 1) and compares data, full and empty
// with a queue model. Also checks that reset clears the output register.
module tb_fifo;
  localparam int DW = 8, DEPTH = 4;
  logic clk = 0, rst = 1;
  logic wreq, rreq;
  logic [DW-1:0] din, dout0, dout1;
  logic full0, empty0, full1, empty1;
  int checks = 0, failures = 0;

  fifo #(.DW(DW), .DEPTH(DEPTH), .FWFT(1'b0)) dut0 (.clk, .rst, .wreq, .rreq, .din, .dout(dout0), .full(full0), .empty(empty0));
  fifo #(.DW(DW), .DEPTH(DEPTH), .FWFT(1'b1)) dut1 (.clk, .rst, .wreq, .rreq, .din, .dout(dout1), .full(full1), .empty(empty1));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [DW-1:0] q[$];
  logic [DW-1:0] expect_d0;
  bit saw_full = 0, saw_empty_read = 0;

  initial begin
    wreq = 0; rreq = 0; din = '0;
    repeat (2) @(posedge clk);
    #1 check(dout0 == 0 && empty0 && !full0 && empty1, "reset state");
    rst = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      wreq = ($urandom % 100) < 55;
      rreq = ($urandom % 100) < 45;
      din  = DW'($urandom);
      // flags and FWFT head before the edge
      check(full0 == (q.size() == DEPTH) && empty0 == (q.size() == 0), "flags fwft0");
      check(full1 == (q.size() == DEPTH) && empty1 == (q.size() == 0), "flags fwft1");
      if (q.size() > 0) check(dout1 == q[0], "fwft head");
      if (full0 && wreq) saw_full = 1;
      if (empty0 && rreq) saw_empty_read = 1;
      begin
        bit do_r, do_w;
        do_r = rreq && q.size() > 0;
        do_w = wreq && q.size() < DEPTH;
        if (do_r) expect_d0 = q.pop_front();
        if (do_w) q.push_back(din);
        @(posedge clk); #1;
        if (do_r) check(dout0 == expect_d0, "sync read data");
      end
    end
    check(saw_full && saw_empty_read, "full and empty cases exercised");
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
