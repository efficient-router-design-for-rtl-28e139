// tb_cdma_router: end-to-end test of router III (CDMA router).
// 1) The input sets of the published simulation, packets {dest, src, data}:
//    {102,43,174,83,149} and {69,137,110,178,53} are permutations and must all
//    leave together one cycle after they are written; in {71,41,46,50,52} four
//    packets go to port 1 and must leave one per cycle while 71 leaves on port
//    2 at once. The hardware-capture set {64,A8,8C,30,54} (hex) is checked too.
// 2) Random traffic with the src field equal to the port, written only when
//    the FIFO is not full; a scoreboard checks order per input/output pair
//    and that an uncontended packet always takes one cycle (constant latency).
// 3) A packet with dest 0 is discarded; two senders claiming the same source
//    code corrupt each other's decode, which must raise err, not dvalid.
// 4) Virtual output queues: every input queues two packets for port 1 and
//    then one for port 2. Port 1 needs ten cycles; the five packets for port 2
//    must not wait behind them and must all leave within eight cycles.
module tb_cdma_router;
  localparam int NP = 5, DW = 8;
  logic clk = 0, rst = 1;
  logic [DW-1:0] di [NP], dout [NP];
  logic [NP-1:0] wr, full, dvalid, err;
  int checks = 0, failures = 0;

  cdma_router dut (.clk, .rst, .di, .wr, .full, .dout, .dvalid, .err);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic put(input logic [DW-1:0] v [NP], input logic [NP-1:0] m);
    @(negedge clk);
    for (int i = 0; i < NP; i++) di[i] = v[i];
    wr = m;
    @(negedge clk);
    wr = '0;
  endtask

  logic [DW-1:0] exq [NP][NP][$];
  int concurrent5 = 0, full_seen = 0;

  task automatic score();
    for (int j = 0; j < NP; j++) if (dvalid[j]) begin
      int s; s = int'(dout[j][4:2]) - 1;
      check(s >= 0 && s < NP && exq[s][j].size() > 0 && dout[j] == exq[s][j][0], "scoreboard order");
      if (s >= 0 && s < NP && exq[s][j].size() > 0) void'(exq[s][j].pop_front());
    end
    check(err == 0, "no decode error");
    if (dvalid == '1) concurrent5++;
  endtask

  initial begin
    logic [DW-1:0] v1 [NP] = '{8'd102, 8'd43, 8'd174, 8'd83, 8'd149};
    logic [DW-1:0] v2 [NP] = '{8'd69, 8'd137, 8'd110, 8'd178, 8'd53};
    logic [DW-1:0] v3 [NP] = '{8'd71, 8'd41, 8'd46, 8'd50, 8'd52};
    logic [DW-1:0] v4 [NP] = '{8'h64, 8'hA8, 8'h8C, 8'h30, 8'h54};
    wr = '0;
    for (int i = 0; i < NP; i++) di[i] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    put(v1, '1);
    @(posedge clk); #1;
    check(dvalid == '1 && dout[0] == 43 && dout[1] == 83 && dout[2] == 102 && dout[3] == 149 && dout[4] == 174,
          "figure set 1, all ports in one cycle");
    put(v2, '1);
    @(posedge clk); #1;
    check(dvalid == '1 && dout[0] == 53 && dout[1] == 69 && dout[2] == 110 && dout[3] == 137 && dout[4] == 178,
          "figure set 2");
    put(v3, '1);
    begin
      int got [$];
      @(posedge clk); #1;
      check(dvalid[1] && dout[1] == 71, "figure set 3, port 2");
      for (int c = 0; c < 4; c++) begin
        check(dvalid[0] && dvalid[4:2] == 0 && err == 0, "contention: one per cycle on port 1");
        got.push_back(dout[0]);
        @(posedge clk); #1;
      end
      got.sort();
      check(got.size() == 4 && got[0] == 41 && got[1] == 46 && got[2] == 50 && got[3] == 52, "contending set delivered");
    end
    put(v4, '1);
    @(posedge clk); #1;
    check(dvalid == '1 && dout[0] == 8'h30 && dout[1] == 8'h54 && dout[2] == 8'h64 && dout[3] == 8'h8C && dout[4] == 8'hA8,
          "hardware capture set");
    // discard of a packet naming no port
    begin
      logic [DW-1:0] v [NP] = '{8'b000_001_11, 8'd0, 8'd0, 8'd0, 8'd0};
      put(v, 5'b00001);
      @(posedge clk); #1 check(dvalid == 0 && err == 0, "dest 0 discarded");
      @(posedge clk); #1 check(dvalid == 0, "nothing after discard");
    end
    // two senders claiming source code 1: decode cannot be clean
    begin
      logic [DW-1:0] v [NP] = '{8'b010_001_01, 8'b011_001_10, 8'd0, 8'd0, 8'd0};
      put(v, 5'b00011);
      @(posedge clk); #1 check(err[1] && err[2] && dvalid == 0, "shared code flagged");
    end
    repeat (3) @(posedge clk);
    // no head-of-line blocking
    begin
      int got1, got2, t2, w;
      logic [DW-1:0] v [NP];
      got1 = 0; got2 = 0; t2 = -1;
      for (int r = 0; r < 3; r++) begin
        @(negedge clk);
        for (int i = 0; i < NP; i++) di[i] = {(r < 2) ? 3'd1 : 3'd2, 3'(i + 1), 2'(r)};
        wr = '1;
        @(posedge clk); #1;
        got1 += int'(dvalid[0]); got2 += int'(dvalid[1]);
      end
      @(negedge clk); wr = '0;
      w = 0;
      while ((got1 < 10 || got2 < 5) && w < 30) begin
        @(posedge clk); #1 w++;
        got1 += int'(dvalid[0]); got2 += int'(dvalid[1]);
        if (got2 == 5 && t2 < 0) t2 = w;
        check(err == 0, "no decode error");
      end
      check(got1 == 10 && got2 == 5, "all queued packets delivered");
      check(t2 >= 0 && t2 <= 7, "port 2 packets bypass the port 1 backlog");
    end
    repeat (3) @(posedge clk);
    // random traffic, constant latency for uncontended packets
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr = '0;
      for (int i = 0; i < NP; i++) begin
        if (full[i]) full_seen++;
        if (!full[i] && ($urandom % 100) < ((n < 1000) ? 100 : 60)) begin
          int d;
          d = (n < 1000) ? 1 + ((i + n) % NP) : (n < 2000 ? 1 + $urandom % NP : 3);
          di[i] = {3'(d), 3'(i + 1), 2'($urandom)};
          wr[i] = 1'b1;
          exq[i][d-1].push_back(di[i]);
        end
      end
      @(posedge clk); #1;
      score();
      // in the permutation phase every packet must leave the cycle after entry
      if (n > 0 && n < 1000) check(dvalid == '1, "constant one-cycle latency");
    end
    @(negedge clk); wr = '0;
    repeat (40) begin @(posedge clk); #1; score(); end
    begin
      int left; left = 0;
      for (int i = 0; i < NP; i++) for (int j = 0; j < NP; j++) left += exq[i][j].size();
      check(left == 0, "all packets delivered");
    end
    check(full_seen > 0, "FIFO full reached");
    check(concurrent5 > 900, "five concurrent transfers");
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
