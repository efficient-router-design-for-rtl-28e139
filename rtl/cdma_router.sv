// cdma_router: router III, the five-port CDMA router.
//
// Packets are {dest[7:5], src[4:2], data[1:0]}, with ports addressed 1..5.
// Input buffering: with VOQ = 1 (default) every input port keeps a virtual
// output queue per destination, five FIFOs of depth four, so a packet waiting
// for a busy output does not hold up packets behind it for other outputs; a
// packet naming no port (dest 0, 6 or 7) is not stored. With VOQ = 0 every
// input has one FIFO of depth four and a head naming no port is discarded.
// The scheduler matches inputs to destinations (one packet per input and per
// output each cycle, round robin). Each granted input's modulator spreads all
// eight packet bits with the Walsh code of the packet's source address (from
// its Walsh code generator, WCG); the code adder sums the chips of all five
// modulators; each output's demodulator correlates the sums with the code of
// the sender the scheduler named for it and recovers the packet. Because the
// codes are orthogonal, up to five packets cross the router in the same cycle
// over one shared sum bus.
// Interface: wr[i] writes di[i]; full[i] is high while any queue of input i is
// full (VOQ = 1) or its FIFO is full (VOQ = 0), and a write is then ignored.
// dout[j] with dvalid[j] carries a delivered packet for one cycle.
// Timing: a packet written at clock edge t is on dout with dvalid high after
// edge t+1, for every port alike, when it meets no contention; packets that
// contend for one output leave one per cycle in round-robin order.
// The src field must equal the sending port's number (1..5) so that concurrent
// senders use different codes; a decode that is not clean raises err instead
// of dvalid.
// The block structure, virtual output queues, and the spreading, adding and
// decoding rules follow the document; first-word-fall-through queues, the
// wr/full handshake, err, the conservative full flag and the single-cycle
// scheduling are this design's choices.
module cdma_router #(
  parameter int unsigned NPORTS = noc_pkg::N_PORTS,
  parameter int unsigned DW     = noc_pkg::PKT_W,
  parameter int unsigned DEPTH  = noc_pkg::FIFO_DEPTH,
  parameter int unsigned NCHIP  = noc_pkg::N_CHIP,
  parameter int unsigned SUMW   = noc_pkg::SUM_W,
  parameter bit          VOQ    = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DW-1:0]     di     [NPORTS],
  input  logic [NPORTS-1:0] wr,
  output logic [NPORTS-1:0] full,
  output logic [DW-1:0]     dout   [NPORTS],
  output logic [NPORTS-1:0] dvalid,
  output logic [NPORTS-1:0] err
);

  localparam int unsigned AW = noc_pkg::ADDR_W;

  logic [NPORTS-1:0]                  req   [NPORTS];          // [in][out]
  logic [AW-1:0]                      src   [NPORTS][NPORTS];  // [in][out]
  logic [NPORTS-1:0]                  grant [NPORTS];          // [in][out]
  logic [DW-1:0]                      txd   [NPORTS];          // packet to modulate
  logic [NPORTS-1:0]                  txen;
  logic [NPORTS-1:0]                  dval;
  logic [AW-1:0]                      msrc  [NPORTS];
  logic [AW-1:0]                      dsrc  [NPORTS];
  logic [NCHIP-1:0]                   mcode [NPORTS];
  logic [NCHIP-1:0]                   dcode [NPORTS];
  logic [DW-1:0][NCHIP-1:0]           chips [NPORTS];
  logic [DW-1:0][NCHIP-1:0][SUMW-1:0] psum;
  logic [DW-1:0]                      rdata [NPORTS];
  logic [NPORTS-1:0]                  rok;

  // top bit of the destination and of the source field of a packet
  localparam int DHI = DW - 1;
  localparam int SHI = DW - 1 - AW;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    if (VOQ) begin : g_voq
      logic [DW-1:0]     qhead  [NPORTS];
      logic [NPORTS-1:0] qfull, qempty;
      for (genvar j = 0; j < NPORTS; j++) begin : g_q
        fifo #(.DW(DW), .DEPTH(DEPTH), .FWFT(1'b1)) u_voq (
          .clk, .rst,
          .wreq (wr[i] && di[i][DHI -: AW] == AW'(j + 1)),
          .rreq (grant[i][j]),
          .din  (di[i]),
          .dout (qhead[j]),
          .full (qfull[j]),
          .empty(qempty[j])
        );
      end
      always_comb begin
        full[i] = |qfull;
        txd[i]  = '0;
        for (int j = 0; j < int'(NPORTS); j++) begin
          req[i][j] = !qempty[j];
          src[i][j] = qhead[j][SHI -: AW];
          if (grant[i][j]) txd[i] = qhead[j];
        end
      end
    end else begin : g_fifo
      logic [DW-1:0] head;
      logic          empty, routable;
      fifo #(.DW(DW), .DEPTH(DEPTH), .FWFT(1'b1)) u_buf (
        .clk, .rst, .wreq(wr[i]), .rreq((|grant[i]) || (!empty && !routable)),
        .din(di[i]), .dout(head), .full(full[i]), .empty(empty)
      );
      always_comb begin
        routable = (head[DHI -: AW] >= AW'(1)) && (head[DHI -: AW] <= AW'(NPORTS));
        txd[i]   = head;
        for (int j = 0; j < int'(NPORTS); j++) begin
          req[i][j] = !empty && head[DHI -: AW] == AW'(j + 1);
          src[i][j] = head[SHI -: AW];
        end
      end
    end

    assign txen[i] = |grant[i];
    walsh_code_gen #(.AW(AW), .NCHIP(NCHIP)) u_wcg_tx (.addr(msrc[i]), .code(mcode[i]));
    cdma_modulator #(.DW(DW), .NCHIP(NCHIP)) u_mod (
      .en(txen[i]), .data(txd[i]), .code(mcode[i]), .chips(chips[i])
    );
  end

  cdma_scheduler #(.NPORTS(NPORTS), .AW(AW)) u_sched (
    .clk, .rst, .req, .src, .grant, .msrc, .dval, .dsrc
  );

  code_adder #(.NPORTS(NPORTS), .DW(DW), .NCHIP(NCHIP), .SUMW(SUMW)) u_add (
    .chips_in(chips), .sum(psum)
  );

  for (genvar j = 0; j < NPORTS; j++) begin : g_out
    walsh_code_gen #(.AW(AW), .NCHIP(NCHIP)) u_wcg_rx (.addr(dsrc[j]), .code(dcode[j]));
    cdma_demodulator #(.DW(DW), .NCHIP(NCHIP), .SUMW(SUMW)) u_demod (
      .sum(psum), .code(dcode[j]), .data(rdata[j]), .ok(rok[j])
    );
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dvalid <= '0;
      err    <= '0;
      for (int j = 0; j < int'(NPORTS); j++) dout[j] <= '0;
    end else begin
      dvalid <= dval & rok;
      err    <= dval & ~rok;
      for (int j = 0; j < int'(NPORTS); j++) begin
        if (dval[j] && rok[j]) dout[j] <= rdata[j];
      end
    end
  end

endmodule
