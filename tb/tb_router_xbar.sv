// tb_router_xbar: end-to-end test of router II (crossbar router).
// 1) The three input sets of the published simulation: {154,204,109,201,59}
//    and {220,45,226,25,179} each form a permutation and must all leave in the
//    same cycle, one cycle after they are written, on the ports named by
//    bits [2:0]; {234,97,41,33,121} sends four packets to port 1, which must
//    leave one per cycle over four cycles while 234 leaves on port 2.
// 2) Random traffic {seq, src, dest}, writing only when a FIFO is not full,
//    with per input/output order checked by a scoreboard; full must occur.
module tb_router_xbar;
  localparam int NP = 5, DW = 8;
  logic clk = 0, rst = 1;
  logic [DW-1:0] data_in [NP], data_out [NP];
  logic [NP-1:0] en, full, valid;
  int checks = 0, failures = 0;

  router_xbar dut (.clk, .rst, .data_in, .en, .full, .data_out, .valid);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic put(input logic [DW-1:0] v [NP]);
    @(negedge clk);
    for (int i = 0; i < NP; i++) data_in[i] = v[i];
    en = '1;
    @(negedge clk);
    en = '0;
  endtask

  logic [DW-1:0] exq [NP][NP][$];   // [in][out]
  int full_seen = 0, contention = 0;

  initial begin
    logic [DW-1:0] v1 [NP] = '{8'd154, 8'd204, 8'd109, 8'd201, 8'd59};
    logic [DW-1:0] v2 [NP] = '{8'd220, 8'd45, 8'd226, 8'd25, 8'd179};
    logic [DW-1:0] v3 [NP] = '{8'd234, 8'd97, 8'd41, 8'd33, 8'd121};
    en = '0;
    for (int i = 0; i < NP; i++) data_in[i] = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    // published permutation 1: out1..5 = 201,154,59,204,109
    put(v1);   // written at the edge inside put; output after the next edge
    @(posedge clk); #1 check(valid == 5'b11111 && data_out[0] == 201 && data_out[1] == 154 &&
             data_out[2] == 59 && data_out[3] == 204 && data_out[4] == 109, "figure set 1, latency 1 cycle");
    put(v2);
    @(posedge clk); #1 check(valid == 5'b11111 && data_out[0] == 25 && data_out[1] == 226 &&
             data_out[2] == 179 && data_out[3] == 220 && data_out[4] == 45, "figure set 2");
    put(v3);
    begin
      int got1 [$];
      @(posedge clk); #1 check(valid[1] && data_out[1] == 234, "figure set 3 port 2");
      for (int c = 0; c < 4; c++) begin
        check(valid[0] && valid[4:2] == 0, "one packet per cycle on port 1");
        got1.push_back(data_out[0]);
        @(posedge clk); #1;
      end
      got1.sort();
      check(got1.size() == 4 && got1[0] == 33 && got1[1] == 41 && got1[2] == 97 && got1[3] == 121, "contending set delivered");
      check(valid == 0, "drained");
    end
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = '0;
      for (int i = 0; i < NP; i++) begin
        if (!full[i] && ($urandom % 100) < 70) begin
          int d; d = (n < 1500) ? 1 + $urandom % NP : 1 + (n % 2);
          data_in[i] = {2'($urandom), 3'(i + 1), 3'(d)};
          en[i] = 1'b1;
          exq[i][d-1].push_back(data_in[i]);
        end
        if (full[i]) full_seen++;
      end
      @(posedge clk); #1;
      for (int j = 0; j < NP; j++) if (valid[j]) begin
        int s; s = int'(data_out[j][5:3]) - 1;
        check(exq[s][j].size() > 0 && data_out[j] == exq[s][j][0], "scoreboard order");
        if (exq[s][j].size() > 0) void'(exq[s][j].pop_front());
      end
    end
    @(negedge clk); en = '0;
    repeat (40) begin
      @(posedge clk); #1;
      for (int j = 0; j < NP; j++) if (valid[j]) begin
        int s; s = int'(data_out[j][5:3]) - 1;
        check(exq[s][j].size() > 0 && data_out[j] == exq[s][j][0], "scoreboard order");
        if (exq[s][j].size() > 0) void'(exq[s][j].pop_front());
      end
    end
    begin
      int left; left = 0;
      for (int i = 0; i < NP; i++) for (int j = 0; j < NP; j++) left += exq[i][j].size();
      check(left == 0, "all packets delivered");
    end
    check(full_seen > 0, "FIFO full reached");
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
