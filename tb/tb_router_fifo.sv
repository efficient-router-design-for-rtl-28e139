// tb_router_fifo: end-to-end test of router I (FIFO based router).
// 1) The packet 68 (bits [2:0] = 100) entering port 1 must leave on port 4,
//    three cycles after it is written.
// 2) All five inputs send to port 1 together: the packets leave one per
//    cycle, in round-robin order of input port, so their latencies differ by
//    one clock from port to port.
// 3) Random traffic {seq, src, dest} keeping at most three packets in flight
//    per input/output pair; a scoreboard checks order per pair.
// 4) Overflow: ports 1 and 2 each send ten back-to-back packets to port 3,
//    which drains only one per cycle, so their FIFOs fill; full must rise, the
//    packets delivered from each port must be an in-order subset, and some
//    must be lost.
module tb_router_fifo;
  localparam int NP = 5, DW = 8;
  logic clk = 0, rst = 1;
  logic [DW-1:0] datai [NP], datao [NP];
  logic [NP-1:0] wr, valid;
  logic [NP-1:0] full [NP];
  int checks = 0, failures = 0;

  router_fifo dut (.clk, .rst, .datai, .wr, .datao, .valid, .full);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [DW-1:0] exq [NP][NP][$];

  task automatic score();
    for (int j = 0; j < NP; j++) if (valid[j]) begin
      int s; s = int'(datao[j][5:3]) - 1;
      check(s >= 0 && s < NP && exq[s][j].size() > 0 && datao[j] == exq[s][j][0], "scoreboard order");
      if (s >= 0 && s < NP && exq[s][j].size() > 0) void'(exq[s][j].pop_front());
    end
  endtask

  initial begin
    wr = '0;
    for (int i = 0; i < NP; i++) datai[i] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    // 1) packet 68 from port 1 to port 4, latency
    @(negedge clk); datai[0] = 8'd68; wr = 5'b00001;
    @(negedge clk); wr = '0;
    begin
      int lat; lat = 0;
      while (!valid[3] && lat < 20) begin @(posedge clk); #1 lat++; end
      check(valid[3] && datao[3] == 8'd68 && valid[2:0] == 0 && valid[4] == 0, "68 leaves on port 4");
      check(lat == 3, "latency: three cycles from the write edge");
    end
    // 2) all five inputs to port 1
    @(negedge clk);
    for (int i = 0; i < NP; i++) datai[i] = {2'b00, 3'(i + 1), 3'd1};
    wr = '1;
    @(negedge clk); wr = '0;
    begin
      int order [$]; int gaps [$]; int t; t = 0;
      while (order.size() < NP && t < 40) begin
        @(posedge clk); #1 t++;
        if (valid[0]) begin order.push_back(int'(datao[0][5:3])); gaps.push_back(t); end
      end
      check(order.size() == NP, "five packets to port 1");
      for (int k = 1; k < order.size(); k++) check(gaps[k] - gaps[k-1] == 1, "one packet per cycle");
      for (int k = 0; k < order.size(); k++) check(order[k] == k + 1, "round-robin order of ports");
    end
    // 3) random traffic
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr = '0;
      for (int i = 0; i < NP; i++) if (($urandom % 100) < 25) begin
        int d; d = 1 + $urandom % NP;
        if (exq[i][d-1].size() < 3) begin
          datai[i] = {2'($urandom), 3'(i + 1), 3'(d)};
          wr[i] = 1'b1;
          exq[i][d-1].push_back(datai[i]);
        end
      end
      @(posedge clk); #1;
      score();
    end
    @(negedge clk); wr = '0;
    repeat (60) begin @(posedge clk); #1; score(); end
    begin
      int left; left = 0;
      for (int i = 0; i < NP; i++) for (int j = 0; j < NP; j++) left += exq[i][j].size();
      check(left == 0, "all packets delivered");
    end
    // 4) overflow: ports 1 and 2 -> 3
    begin
      int got [2][$]; bit saw_full; saw_full = 0;
      for (int k = 0; k < 10; k++) begin
        @(negedge clk);
        datai[0] = {1'b0, k[3:0], 3'd3}; datai[1] = {1'b1, k[3:0], 3'd3}; wr = 5'b00011;
        @(posedge clk); #1;
        if (full[0][2] || full[1][2]) saw_full = 1;
        if (valid[2]) got[datao[2][7]].push_back(int'(datao[2][6:3]));
      end
      @(negedge clk); wr = '0;
      repeat (30) begin
        @(posedge clk); #1;
        if (valid[2]) got[datao[2][7]].push_back(int'(datao[2][6:3]));
      end
      check(saw_full, "FIFO full reached");
      check(got[0].size() + got[1].size() < 20 && got[0].size() + got[1].size() >= 8, "packets lost on a full FIFO");
      for (int s = 0; s < 2; s++)
        for (int k = 1; k < got[s].size(); k++) check(got[s][k] > got[s][k-1], "kept packets in order");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
