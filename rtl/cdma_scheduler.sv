// cdma_scheduler: scheduler of the CDMA router, the arbiter of the
// arbiter-based transmitter protocol (A-T protocol).
//
// req[i][j] says input i holds a packet for output j; src[i][j] is the source
// address in that packet's header. With virtual output queues an input may
// hold packets for several outputs at once, but it has one modulator and one
// spreading code, so it may send only one of them per cycle. The match is made
// in two round-robin steps in the same cycle:
//   propose: each output j picks, from the input after the one it served
//            last, the first input that has a packet for it;
//   accept:  each input picks, from the output after the one it sent to last,
//            the first output that proposed to it.
// An accepted pair is a grant. The pointers move only for accepted pairs, so
// the input/output served last has the lowest priority next time. When every
// input requests only one output (a single FIFO per input) the accept step
// always accepts and this is plain per-output round robin.
// Outputs:
//   M side (to the modulators): grant[i][j], and msrc[i], the source address
//          whose Walsh code modulator i spreads with;
//   D side (to the demodulators): dval[j], a packet is arriving at output j,
//          and dsrc[j], the source address whose code demodulator j must use.
// Requests, grants and code selection happen in one cycle (combinational);
// only the round-robin pointers are registered.
// Round robin, virtual output queues and the source/destination outputs follow
// the document; the propose/accept match and the single-cycle handshake are
// this design's choices.
module cdma_scheduler #(
  parameter int unsigned NPORTS = noc_pkg::N_PORTS,
  parameter int unsigned AW     = noc_pkg::ADDR_W,
  localparam int unsigned IW    = $clog2(NPORTS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NPORTS-1:0] req   [NPORTS],          // [in][out]
  input  logic [AW-1:0]     src   [NPORTS][NPORTS],  // [in][out]
  output logic [NPORTS-1:0] grant [NPORTS],          // [in][out]
  output logic [AW-1:0]     msrc  [NPORTS],
  output logic [NPORTS-1:0] dval,
  output logic [AW-1:0]     dsrc  [NPORTS]
);

  logic [IW-1:0]     last_q [NPORTS];   // per output: input served last
  logic [IW-1:0]     acc_q  [NPORTS];   // per input: output sent to last
  logic [IW-1:0]     prop   [NPORTS];   // per output: proposed input
  logic [NPORTS-1:0] pvalid;            // per output: a proposal exists
  logic [IW-1:0]     acc    [NPORTS];   // per input: accepted output
  logic [NPORTS-1:0] avalid;            // per input: accepted a proposal

  always_comb begin
    // propose
    for (int j = 0; j < int'(NPORTS); j++) begin
      pvalid[j] = 1'b0;
      prop[j]   = last_q[j];
      for (int o = 1; o <= int'(NPORTS); o++) begin
        logic [IW-1:0] idx;
        idx = IW'((int'(last_q[j]) + o) % int'(NPORTS));
        if (!pvalid[j] && req[idx][j]) begin
          pvalid[j] = 1'b1;
          prop[j]   = idx;
        end
      end
    end
    // accept
    for (int i = 0; i < int'(NPORTS); i++) begin
      avalid[i] = 1'b0;
      acc[i]    = acc_q[i];
      for (int o = 1; o <= int'(NPORTS); o++) begin
        logic [IW-1:0] jdx;
        jdx = IW'((int'(acc_q[i]) + o) % int'(NPORTS));
        if (!avalid[i] && pvalid[jdx] && prop[jdx] == IW'(i)) begin
          avalid[i] = 1'b1;
          acc[i]    = jdx;
        end
      end
    end
    // grants and code selection
    for (int i = 0; i < int'(NPORTS); i++) begin
      grant[i] = '0;
      msrc[i]  = '0;
      if (avalid[i]) begin
        grant[i][acc[i]] = 1'b1;
        msrc[i]          = src[i][acc[i]];
      end
    end
    for (int j = 0; j < int'(NPORTS); j++) begin
      dval[j] = pvalid[j] && avalid[prop[j]] && acc[prop[j]] == IW'(j);
      dsrc[j] = dval[j] ? src[prop[j]][j] : '0;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int j = 0; j < int'(NPORTS); j++) last_q[j] <= IW'(NPORTS - 1);
      for (int i = 0; i < int'(NPORTS); i++) acc_q[i]  <= IW'(NPORTS - 1);
    end else begin
      for (int j = 0; j < int'(NPORTS); j++) if (dval[j])   last_q[j] <= prop[j];
      for (int i = 0; i < int'(NPORTS); i++) if (avalid[i]) acc_q[i]  <= acc[i];
    end
  end

endmodule
