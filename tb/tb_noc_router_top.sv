// tb_noc_router_top: end-to-end test of the three routers at their default
// sizes (five ports, 8-bit packets, FIFO depth four).
// The same random traffic is offered to all three routers; each has its own
// scoreboard that checks per input/output order and that every packet comes
// out. The traffic includes packets naming no port (dropped by every router),
// bursts that make several inputs contend for one output, and phases that
// fill the FIFOs. At the end a directed burst overflows router I FIFOs and
// two CDMA senders claim the same code. The test counts how often each
// mechanism happened and counts a failure for any that never did:
// contention, concurrent delivery on several outputs, FIFO full, discard of a
// packet with no destination, router I loss on a full FIFO, CDMA decode error,
// and a CDMA packet overtaking an older packet of the same input that waits
// for another output (virtual output queues).
// A saturation phase then writes on every input in every cycle, input i to
// output ((i + cycle) mod 5) + 1, and checks that each router sustains five
// packets per cycle (number of ports x payload bits per clock).
module tb_noc_router_top;
  localparam int NP = 5, DW = 8;
  logic clk = 0, rst = 1;
  logic [DW-1:0] r1_datai [NP], r1_datao [NP];
  logic [NP-1:0] r1_wr, r1_valid;
  logic [NP-1:0] r1_full [NP];
  logic [DW-1:0] r2_data_in [NP], r2_data_out [NP];
  logic [NP-1:0] r2_en, r2_full, r2_valid;
  logic [DW-1:0] r3_di [NP], r3_dout [NP];
  logic [NP-1:0] r3_wr, r3_full, r3_dvalid, r3_err;
  int checks = 0, failures = 0;

  noc_router_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [DW-1:0] q1 [NP][NP][$], q2 [NP][NP][$], q3 [NP][NP][$];
  int id3 [NP][NP][$];   // write order of the router III packets
  int wid [NP];
  int n_bypass = 0;
  int n_contention = 0, n_concurrent = 0, n_full2 = 0, n_full3 = 0, n_full1 = 0;
  int n_discard = 0, n_loss1 = 0, n_err3 = 0, n_out = 0;

  // router I/II packets: {seq[1:0], src[2:0], dest[2:0]}; router III: {dest, src, data[1:0]}
  task automatic score();
    for (int j = 0; j < NP; j++) begin
      if (r1_valid[j]) begin
        int s; s = int'(r1_datao[j][5:3]) - 1;
        check(s >= 0 && s < NP && q1[s][j].size() > 0 && r1_datao[j] == q1[s][j][0], "router I order");
        if (s >= 0 && s < NP && q1[s][j].size() > 0) void'(q1[s][j].pop_front());
        n_out++;
      end
      if (r2_valid[j]) begin
        int s; s = int'(r2_data_out[j][5:3]) - 1;
        check(s >= 0 && s < NP && q2[s][j].size() > 0 && r2_data_out[j] == q2[s][j][0], "router II order");
        if (s >= 0 && s < NP && q2[s][j].size() > 0) void'(q2[s][j].pop_front());
        n_out++;
      end
      if (r3_dvalid[j]) begin
        int s; s = int'(r3_dout[j][4:2]) - 1;
        check(s >= 0 && s < NP && q3[s][j].size() > 0 && r3_dout[j] == q3[s][j][0], "router III order");
        if (s >= 0 && s < NP && q3[s][j].size() > 0) begin
          int me; me = id3[s][j].pop_front();
          void'(q3[s][j].pop_front());
          for (int k = 0; k < NP; k++) if (k != j && id3[s][k].size() > 0 && id3[s][k][0] < me) begin
            n_bypass++;
            break;
          end
        end
        n_out++;
      end
    end
    check(r3_err == 0, "no CDMA decode error");
    if ($countones(r3_dvalid) >= 2) n_concurrent++;
    for (int i = 0; i < NP; i++) if (r1_full[i] != 0) n_full1++;
    if (r2_full != 0) n_full2++;
    if (r3_full != 0) n_full3++;
  endtask

  initial begin
    r1_wr = '0; r2_en = '0; r3_wr = '0;
    for (int i = 0; i < NP; i++) wid[i] = 0;
    for (int i = 0; i < NP; i++) begin r1_datai[i] = '0; r2_data_in[i] = '0; r3_di[i] = '0; end
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      int dcount [8];
      int rate; rate = ((n / 500) % 2) ? 90 : 35;   // alternate light and heavy phases
      for (int d = 0; d < 8; d++) dcount[d] = 0;
      @(negedge clk);
      r1_wr = '0; r2_en = '0; r3_wr = '0;
      for (int i = 0; i < NP; i++) begin
        if (($urandom % 100) < rate) begin
          int d; logic [1:0] sq;
          d  = ($urandom % 50 == 0) ? 6 + $urandom % 2 : 1 + $urandom % NP;
          if ((n / 250) % 4 == 3) d = 2;                       // hot-spot phase
          sq = 2'($urandom);
          dcount[d]++;
          if (d > NP) n_discard++;
          if (q1[i][(d-1)%NP].size() < 3 || d > NP) begin
            r1_datai[i] = {sq, 3'(i + 1), 3'(d)}; r1_wr[i] = 1'b1;
            if (d <= NP) q1[i][d-1].push_back(r1_datai[i]);
          end
          if (!r2_full[i]) begin
            r2_data_in[i] = {sq, 3'(i + 1), 3'(d)}; r2_en[i] = 1'b1;
            if (d <= NP) q2[i][d-1].push_back(r2_data_in[i]);
          end
          if (!r3_full[i]) begin
            r3_di[i] = {3'(d), 3'(i + 1), sq}; r3_wr[i] = 1'b1;
            if (d <= NP) begin q3[i][d-1].push_back(r3_di[i]); id3[i][d-1].push_back(wid[i]); wid[i]++; end
          end
        end
      end
      for (int d = 1; d <= NP; d++) if (dcount[d] >= 2) n_contention++;
      @(posedge clk); #1;
      score();
    end
    @(negedge clk); r1_wr = '0; r2_en = '0; r3_wr = '0;
    repeat (100) begin @(posedge clk); #1; score(); end
    begin
      int l1, l2, l3; l1 = 0; l2 = 0; l3 = 0;
      for (int i = 0; i < NP; i++) for (int j = 0; j < NP; j++) begin
        l1 += q1[i][j].size(); l2 += q2[i][j].size(); l3 += q3[i][j].size();
      end
      check(l1 == 0, "router I delivered all");
      check(l2 == 0, "router II delivered all");
      check(l3 == 0, "router III delivered all");
    end
    // saturation: a rotating permutation on every input in every cycle
    begin
      int o1, o2, o3;
      o1 = 0; o2 = 0; o3 = 0;
      for (int c = 0; c < 200; c++) begin
        @(negedge clk);
        for (int i = 0; i < NP; i++) begin
          int d; d = (i + c) % NP + 1;
          r1_datai[i]   = {2'(c), 3'(i + 1), 3'(d)}; q1[i][d-1].push_back(r1_datai[i]);
          r2_data_in[i] = {2'(c), 3'(i + 1), 3'(d)}; q2[i][d-1].push_back(r2_data_in[i]);
          r3_di[i]      = {3'(d), 3'(i + 1), 2'(c)}; q3[i][d-1].push_back(r3_di[i]);
          id3[i][d-1].push_back(wid[i]); wid[i]++;
        end
        r1_wr = '1; r2_en = '1; r3_wr = '1;
        @(posedge clk); #1;
        if (c >= 20) begin
          o1 += $countones(r1_valid); o2 += $countones(r2_valid); o3 += $countones(r3_dvalid);
        end
        check(r1_full[0] == 0 && r2_full == 0 && r3_full == 0, "no FIFO fills at one packet per output per cycle");
        score();
      end
      @(negedge clk); r1_wr = '0; r2_en = '0; r3_wr = '0;
      repeat (10) begin @(posedge clk); #1; score(); end
      $display("saturation, packets in 180 cycles: router I %0d, router II %0d, router III %0d", o1, o2, o3);
      check(o1 == 5 * 180 && o2 == 5 * 180 && o3 == 5 * 180, "five packets per cycle sustained by every router");
      for (int i = 0; i < NP; i++) for (int j = 0; j < NP; j++)
        check(q1[i][j].size() == 0 && q2[i][j].size() == 0 && q3[i][j].size() == 0, "saturation traffic delivered");
    end
    // router I overflow: ports 1 and 2 each send ten back-to-back packets to 5
    begin
      int got; got = 0;
      for (int k = 0; k < 10; k++) begin
        @(negedge clk);
        r1_datai[0] = {2'd0, 3'd1, 3'd5}; r1_datai[1] = {2'd0, 3'd2, 3'd5}; r1_wr = 5'b00011;
        @(posedge clk); #1 if (r1_valid[4]) got++;
        if (r1_full[0][4] || r1_full[1][4]) n_full1++;
      end
      @(negedge clk); r1_wr = '0;
      repeat (30) begin @(posedge clk); #1 if (r1_valid[4]) got++; end
      n_loss1 = 20 - got;
      check(got >= 8 && got < 20, "router I keeps what fits");
    end
    // CDMA: ports 1 and 2 both claim source 3
    @(negedge clk);
    r3_di[0] = {3'd4, 3'd3, 2'b01}; r3_di[1] = {3'd5, 3'd3, 2'b10}; r3_wr = 5'b00011;
    @(negedge clk); r3_wr = '0;
    @(posedge clk); #1;
    n_err3 = $countones(r3_err);
    check(r3_err == 5'b11000 && r3_dvalid == 0, "CDMA shared code flagged");
    $display("CDMA head-of-line bypasses: %0d", n_bypass);
    check(n_bypass > 0, "CDMA virtual output queue bypass happened");
    $display("mechanisms: contention=%0d concurrent=%0d full1=%0d full2=%0d full3=%0d discard=%0d loss1=%0d err3=%0d delivered=%0d",
             n_contention, n_concurrent, n_full1, n_full2, n_full3, n_discard, n_loss1, n_err3, n_out);
    check(n_contention > 0, "contention happened");
    check(n_concurrent > 0, "concurrent CDMA delivery happened");
    check(n_full1 > 0, "router I FIFO full happened");
    check(n_full2 > 0, "router II FIFO full happened");
    check(n_full3 > 0, "router III FIFO full happened");
    check(n_discard > 0, "packets with no destination discarded");
    check(n_loss1 > 0, "router I loss on full FIFO happened");
    check(n_err3 > 0, "CDMA decode error happened");
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
