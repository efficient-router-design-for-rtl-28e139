// router_fifo: router I, the five-port FIFO based router.
//
// Each input port i has a reg8_demux that stores the packet presented with
// wr[i] and writes it into FIFO (i, j), where j+1 is the destination in packet
// bits [2:0]. There are 25 FIFOs, one per input/output pair, so a packet never
// waits behind a packet for another output. Each output port j has an
// rr_scheduler that reads FIFOs (0..4, j) in round-robin order and drives
// datao[j]. Timing with no contention: wr at edge t, packet in the demux
// register after t, in its FIFO after t+1, read request in the cycle after
// t+1, datao valid after edge t+3. Contending packets for one output leave
// one per cycle in round-robin order, so the latency differs from port to
// port in steps of one clock.
// A packet for a full FIFO is dropped; full flags are brought out.
// The structure (register/demux, 25 FIFOs, round-robin schedulers) follows
// the document; valid and full outputs are this design's additions.
module router_fifo
#(
  parameter int unsigned NPORTS = noc_pkg::N_PORTS,
  parameter int unsigned DW     = noc_pkg::PKT_W,
  parameter int unsigned DEPTH  = noc_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DW-1:0]     datai [NPORTS],
  input  logic [NPORTS-1:0] wr,
  output logic [DW-1:0]     datao [NPORTS],
  output logic [NPORTS-1:0] valid,
  output logic [NPORTS-1:0] full  [NPORTS]   // full[i][j]: FIFO input i -> output j
);

  logic [DW-1:0]     dmx_data [NPORTS][NPORTS];  // [in][out]
  logic [NPORTS-1:0] dmx_we   [NPORTS];          // [in][out]
  logic [DW-1:0]     q_data   [NPORTS][NPORTS];  // [out][in]
  logic [NPORTS-1:0] q_empty  [NPORTS];          // [out][in]
  logic [NPORTS-1:0] q_rd     [NPORTS];          // [out][in]

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    reg8_demux #(.NPORTS(NPORTS), .DW(DW)) u_demux (
      .clk, .rst, .en(wr[i]), .data_in(datai[i]), .d_out(dmx_data[i]), .we(dmx_we[i])
    );
    for (genvar j = 0; j < NPORTS; j++) begin : g_q
      fifo #(.DW(DW), .DEPTH(DEPTH), .FWFT(1'b0)) u_fifo (
        .clk, .rst,
        .wreq (dmx_we[i][j]),
        .rreq (q_rd[j][i]),
        .din  (dmx_data[i][j]),
        .dout (q_data[j][i]),
        .full (full[i][j]),
        .empty(q_empty[j][i])
      );
    end
  end

  for (genvar j = 0; j < NPORTS; j++) begin : g_out
    rr_scheduler #(.NPORTS(NPORTS), .DW(DW)) u_sched (
      .clk, .rst, .din(q_data[j]), .empty(q_empty[j]), .rr(q_rd[j]),
      .dout(datao[j]), .dvalid(valid[j])
    );
  end

endmodule
