// tb_cdma_router_fifo: router III built with one FIFO per input (VOQ = 0).
// 1) The published permutation set {102,43,174,83,149} leaves on all five
//    ports one cycle after it is written.
// 2) Head-of-line blocking: every input queues two packets for port 1 and then
//    one for port 2. With a single FIFO the port 2 packets wait behind the
//    port 1 backlog, so port 2 is not finished before the ninth cycle.
// 3) Random traffic (dest 0..7, src equal to the port), written only when the
//    FIFO is not full. Each input must deliver its routable packets strictly
//    in write order, on the port its header names; dest 0, 6, 7 vanish.
module tb_cdma_router_fifo;
  localparam int NP = 5, DW = 8;
  logic clk = 0, rst = 1;
  logic [DW-1:0] di [NP], dout [NP];
  logic [NP-1:0] wr, full, dvalid, err;
  int checks = 0, failures = 0;

  cdma_router #(.VOQ(1'b0)) dut (.clk, .rst, .di, .wr, .full, .dout, .dvalid, .err);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [DW-1:0] inq [NP][$];   // routable packets of each input, in write order
  int delivered = 0, discarded = 0, full_seen = 0;

  task automatic score();
    for (int j = 0; j < NP; j++) if (dvalid[j]) begin
      int s; s = int'(dout[j][4:2]) - 1;
      check(s >= 0 && s < NP && inq[s].size() > 0 && dout[j] == inq[s][0], "per-input write order");
      check(int'(dout[j][7:5]) == j + 1, "delivered on the named port");
      if (s >= 0 && s < NP && inq[s].size() > 0) void'(inq[s].pop_front());
      delivered++;
    end
    check(err == 0, "no decode error");
  endtask

  initial begin
    wr = '0;
    for (int i = 0; i < NP; i++) di[i] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    // 1) figure set
    begin
      logic [DW-1:0] v1 [NP] = '{8'd102, 8'd43, 8'd174, 8'd83, 8'd149};
      @(negedge clk);
      for (int i = 0; i < NP; i++) di[i] = v1[i];
      wr = '1;
      @(negedge clk); wr = '0;
      @(posedge clk); #1;
      check(dvalid == '1 && dout[0] == 43 && dout[1] == 83 && dout[2] == 102 && dout[3] == 149 && dout[4] == 174,
            "figure set, all ports in one cycle");
    end
    repeat (3) @(posedge clk);
    // 2) head-of-line blocking
    begin
      int got1, got2, t2, w;
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
      end
      check(got1 == 10 && got2 == 5, "all queued packets delivered");
      check(t2 >= 8, "port 2 packets wait behind the port 1 backlog");
    end
    repeat (3) @(posedge clk);
    // 3) random traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < NP; i++) begin
        logic [2:0] d;
        d = ($urandom_range(0, 15) == 0) ? 3'($urandom_range(0, 7)) : 3'($urandom_range(1, 5));
        di[i] = {d, 3'(i + 1), 2'($urandom)};
        wr[i] = ($urandom_range(0, 3) != 0) && !full[i];
        if (full[i]) full_seen++;
        if (wr[i]) begin
          if (d >= 1 && d <= NP) inq[i].push_back(di[i]);
          else discarded++;
        end
      end
      @(posedge clk); #1;
      score();
    end
    @(negedge clk); wr = '0;
    repeat (40) begin @(posedge clk); #1 score(); end
    for (int i = 0; i < NP; i++) check(inq[i].size() == 0, "all routable packets delivered");
    check(full_seen > 0 && discarded > 0, "full flag and discards exercised");
    $display("delivered=%0d discarded=%0d full=%0d", delivered, discarded, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
