// tb_cdma_scheduler: self-checking test of the CDMA scheduler.
// Request matrices are random (inputs holding packets for several outputs, as
// with virtual output queues), with src[i][j] = i+1. Every cycle the test
// checks: each input is granted at most one output and each output at most
// one input; grants only where requested; dval/dsrc/msrc agree with the
// grants; the match is non-empty whenever anything is requested. It then
// checks round-robin fairness with all five inputs wanting one output (each
// gets one grant in five), and that under full load (every input wants every
// output) the pointers spread out so that all five outputs are served in
// every cycle.
module tb_cdma_scheduler;
  localparam int NP = 5;
  logic clk = 0, rst = 1;
  logic [NP-1:0] req [NP], grant [NP], dval;
  logic [2:0] src [NP][NP], msrc [NP], dsrc [NP];
  int checks = 0, failures = 0;

  cdma_scheduler dut (.clk, .rst, .req, .src, .grant, .msrc, .dval, .dsrc);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_cycle();
    logic [NP-1:0] col;
    bit any_req; int ng;
    col = '0; any_req = 0; ng = 0;
    for (int i = 0; i < NP; i++) begin
      check($countones(grant[i]) <= 1, "one grant per input");
      check((grant[i] & ~req[i]) == 0, "grant only where requested");
      check((col & grant[i]) == 0, "one grant per output");
      col |= grant[i];
      if (req[i] != 0) any_req = 1;
      if (grant[i] != 0) begin
        ng++;
        check(msrc[i] == 3'(i + 1), "msrc is the granted packet's source");
      end
    end
    check(dval == col, "dval marks granted outputs");
    for (int j = 0; j < NP; j++)
      if (dval[j]) begin
        int s; s = int'(dsrc[j]) - 1;
        check(s >= 0 && s < NP && grant[s][j], "dsrc names the granted input");
      end
    check(!any_req || ng > 0, "something granted when requested");
  endtask

  initial begin
    int cnt [NP];
    for (int i = 0; i < NP; i++) begin
      req[i] = '0;
      for (int j = 0; j < NP; j++) src[i][j] = 3'(i + 1);
    end
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int i = 0; i < NP; i++) req[i] = (n < 200) ? NP'(1 << ($urandom % NP)) & {NP{$urandom % 4 != 0}}
                                                      : NP'($urandom);
      #1 check_cycle();
    end
    // fairness: all inputs want output 1 only
    for (int i = 0; i < NP; i++) cnt[i] = 0;
    @(negedge clk);
    for (int i = 0; i < NP; i++) req[i] = 5'b00001;
    for (int n = 0; n < 50; n++) begin
      #1 check_cycle();
      for (int i = 0; i < NP; i++) if (grant[i] != 0) cnt[i]++;
      @(negedge clk);
    end
    for (int i = 0; i < NP; i++) check(cnt[i] == 10, "round-robin fairness");
    // full load: every input wants every output
    for (int i = 0; i < NP; i++) req[i] = '1;
    for (int n = 0; n < 40; n++) begin
      #1 check_cycle();
      if (n >= 20) check(dval == '1, "full match under full load");
      @(negedge clk);
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
