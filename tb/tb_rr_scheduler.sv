// tb_rr_scheduler: self-checking test of the router I output scheduler.
// Five model queues stand for the FIFOs (block-RAM read: data appears after
// the read edge). Random packets are queued; the test checks that at most one
// read request is high, that it names the first non-empty queue after the one
// served last, that packets leave on dout in that order with dvalid, and that
// a read is issued in every cycle in which some queue holds a packet.
module tb_rr_scheduler;
  localparam int NP = 5, DW = 8;
  logic clk = 0, rst = 1;
  logic [DW-1:0] din [NP];
  logic [NP-1:0] empty, rr;
  logic [DW-1:0] dout;
  logic dvalid;
  int checks = 0, failures = 0;

  rr_scheduler dut (.clk, .rst, .din, .empty, .rr, .dout, .dvalid);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [DW-1:0] q [NP][$];
  logic [DW-1:0] expq[$];
  int last = NP - 1;
  int reads = 0, idle_with_work = 0;
  bit pend = 0;
  int sel_k;

  always_comb for (int i = 0; i < NP; i++) empty[i] = (q[i].size() == 0);

  initial begin
    for (int i = 0; i < NP; i++) din[i] = '0;
    sel_k = -1;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      // scheduler decision for this cycle
      begin
        int exp_i; exp_i = -1;
        for (int o = 1; o <= NP; o++) begin
          int idx; idx = (last + o) % NP;
          if (exp_i < 0 && q[idx].size() > 0) exp_i = idx;
        end
        check($countones(rr) <= 1, "one read at a time");
        if (exp_i >= 0) begin
          check(rr == NP'(1 << exp_i), "round-robin pick");
        end else check(rr == 0, "no read");
        if (exp_i >= 0) reads++;
        pend = (rr != 0);
        if (rr != 0) begin
          sel_k = $clog2(rr);
          last  = sel_k;
        end else sel_k = -1;
      end
      @(posedge clk); #1;
      if (dvalid) begin
        check(expq.size() > 0 && dout == expq[0], "dout order");
        if (expq.size() > 0) void'(expq.pop_front());
      end
      // the FIFO read took effect at the edge: data out, queue shorter
      if (sel_k >= 0) begin
        din[sel_k] = q[sel_k].pop_front();
        expq.push_back(din[sel_k]);
      end
      // new arrivals
      if (n < 400 && ($urandom % 3) == 0) begin
        int k; k = $urandom % NP;
        if (q[k].size() < 4) q[k].push_back(DW'($urandom));
      end
      // saturation: every queue kept non-empty, so the picks must rotate
      if (n >= 400 && n < 440)
        for (int k = 0; k < NP; k++) if (q[k].size() < 4) q[k].push_back(DW'($urandom));
    end
    check(expq.size() == 0 && reads > 50, "all packets delivered");
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
