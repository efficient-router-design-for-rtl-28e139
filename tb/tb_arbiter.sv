// tb_arbiter: self-checking test of the router II arbiter.
// Each cycle each input requests at most one output (as a FIFO head does).
// Checks: grants are one-hot per output and only to requesters, sel is the
// binary form of the grant, busy = any grant, an output with requests always
// grants, and with all five inputs requesting one output continuously each
// input gets exactly one grant in every five.
module tb_arbiter;
  localparam int NP = 5;
  logic clk = 0, rst = 1;
  logic [NP-1:0] req [NP], gnt [NP], busy;
  logic [2:0] sel [NP];
  int checks = 0, failures = 0;

  arbiter dut (.clk, .rst, .req, .gnt, .sel, .busy);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_cycle();
    for (int j = 0; j < NP; j++) begin
      check($countones(gnt[j]) <= 1, "one-hot grant");
      check((gnt[j] & ~req[j]) == 0, "grant only to requester");
      check(busy[j] == (req[j] != 0), "grant when requested");
      if (gnt[j] != 0) check(sel[j] == 3'($clog2(gnt[j])), "sel encodes grant");
    end
  endtask

  initial begin
    int cnt [NP];
    for (int j = 0; j < NP; j++) req[j] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    // random traffic
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int j = 0; j < NP; j++) req[j] = '0;
      for (int i = 0; i < NP; i++) if ($urandom % 3 != 0) req[$urandom % NP][i] = 1'b1;
      #1 check_cycle();
    end
    // saturation: all inputs want output 2
    for (int i = 0; i < NP; i++) cnt[i] = 0;
    @(negedge clk);
    for (int j = 0; j < NP; j++) req[j] = '0;
    req[2] = '1;
    for (int n = 0; n < 50; n++) begin
      #1 check_cycle();
      for (int i = 0; i < NP; i++) if (gnt[2][i]) cnt[i]++;
      @(negedge clk);
    end
    for (int i = 0; i < NP; i++) check(cnt[i] == 10, "round-robin fairness");
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
