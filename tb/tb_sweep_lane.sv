// tb_sweep_lane: traffic generator and checker for one copy of the three
// routers at packet width DW; used by tb_payload_sweep.
// Offers random traffic to all three routers (router I/II packets
// {random, src, dest}, CDMA packets {dest, src, random}), checks per
// input/output order with scoreboards and that every packet arrives, and
// reports its totals on checks/failures when done rises. It also counts the
// cycles in which the CDMA router delivered on all five ports at once.
module tb_sweep_lane #(
  parameter int DW = 16
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   full_rate_cycles
);
  localparam int NP = 5;
  logic [DW-1:0] r1_datai [NP], r1_datao [NP];
  logic [NP-1:0] r1_wr, r1_valid;
  logic [NP-1:0] r1_full [NP];
  logic [DW-1:0] r2_data_in [NP], r2_data_out [NP];
  logic [NP-1:0] r2_en, r2_full, r2_valid;
  logic [DW-1:0] r3_di [NP], r3_dout [NP];
  logic [NP-1:0] r3_wr, r3_full, r3_dvalid, r3_err;

  noc_router_top #(.DW(DW)) dut (.*);

  logic [DW-1:0] q1 [NP][NP][$], q2 [NP][NP][$], q3 [NP][NP][$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL DW=%0d %s at %0t", DW, what, $time); end
  endtask

  task automatic score();
    for (int j = 0; j < NP; j++) begin
      if (r1_valid[j]) begin
        int s; s = int'(r1_datao[j][5:3]) - 1;
        check(s >= 0 && s < NP && q1[s][j].size() > 0 && r1_datao[j] == q1[s][j][0], "router I");
        if (s >= 0 && s < NP && q1[s][j].size() > 0) void'(q1[s][j].pop_front());
      end
      if (r2_valid[j]) begin
        int s; s = int'(r2_data_out[j][5:3]) - 1;
        check(s >= 0 && s < NP && q2[s][j].size() > 0 && r2_data_out[j] == q2[s][j][0], "router II");
        if (s >= 0 && s < NP && q2[s][j].size() > 0) void'(q2[s][j].pop_front());
      end
      if (r3_dvalid[j]) begin
        int s; s = int'(r3_dout[j][DW-4 -: 3]) - 1;
        check(s >= 0 && s < NP && q3[s][j].size() > 0 && r3_dout[j] == q3[s][j][0], "router III");
        if (s >= 0 && s < NP && q3[s][j].size() > 0) void'(q3[s][j].pop_front());
      end
    end
    check(r3_err == 0, "no decode error");
    if (r3_dvalid == '1) full_rate_cycles++;
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; full_rate_cycles = 0;
    r1_wr = '0; r2_en = '0; r3_wr = '0;
    for (int i = 0; i < NP; i++) begin r1_datai[i] = '0; r2_data_in[i] = '0; r3_di[i] = '0; end
    @(negedge rst);
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      r1_wr = '0; r2_en = '0; r3_wr = '0;
      for (int i = 0; i < NP; i++) begin
        int d; logic [DW-1:0] rnd;
        // first 300 cycles: a permutation each cycle (full-rate CDMA), then random
        d = (n < 300) ? 1 + (i + n) % NP : 1 + $urandom % NP;
        rnd = DW'({$urandom, $urandom});
        if (n < 300 || ($urandom % 100) < 50) begin
          if (q1[i][d-1].size() < 3) begin
            r1_datai[i] = {rnd[DW-1:6], 3'(i + 1), 3'(d)}; r1_wr[i] = 1'b1; q1[i][d-1].push_back(r1_datai[i]);
          end
          if (!r2_full[i]) begin
            r2_data_in[i] = {rnd[DW-1:6], 3'(i + 1), 3'(d)}; r2_en[i] = 1'b1; q2[i][d-1].push_back(r2_data_in[i]);
          end
          if (!r3_full[i]) begin
            r3_di[i] = {3'(d), 3'(i + 1), rnd[DW-7:0]}; r3_wr[i] = 1'b1; q3[i][d-1].push_back(r3_di[i]);
          end
        end
      end
      @(posedge clk); #1;
      score();
    end
    @(negedge clk); r1_wr = '0; r2_en = '0; r3_wr = '0;
    repeat (100) begin @(posedge clk); #1; score(); end
    begin
      int left; left = 0;
      for (int i = 0; i < NP; i++) for (int j = 0; j < NP; j++)
        left += q1[i][j].size() + q2[i][j].size() + q3[i][j].size();
      check(left == 0, "all packets delivered");
    end
    done = 1;
  end
endmodule
