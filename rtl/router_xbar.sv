// router_xbar: router II, the five-port crossbar router.
//
// Each input port has one FIFO (depth four, 8 bits) with its control logic.
// The FIFO shows its head packet; the destination in bits [2:0] (1..5) is
// turned into a request to that output. The arbiter grants each output to one
// requesting input in round-robin order; the granted FIFO is popped and the
// crossbar, steered by the arbiter's select lines, carries the packet to the
// output register. A head packet naming no port (0, 6 or 7) is discarded.
// Timing with no contention: en at edge t writes the FIFO, the grant is made
// in the next cycle and data_out is valid after edge t+1. Each output takes
// one packet per cycle; contending inputs are served one per cycle.
// en is refused while the FIFO is full (full is brought out).
// The FIFO/arbiter/crossbar structure follows the document; valid and full
// outputs are this design's additions.
module router_xbar #(
  parameter int unsigned NPORTS = noc_pkg::N_PORTS,
  parameter int unsigned DW     = noc_pkg::PKT_W,
  parameter int unsigned DEPTH  = noc_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DW-1:0]     data_in  [NPORTS],
  input  logic [NPORTS-1:0] en,
  output logic [NPORTS-1:0] full,
  output logic [DW-1:0]     data_out [NPORTS],
  output logic [NPORTS-1:0] valid
);

  localparam int unsigned SW = $clog2(NPORTS);
  localparam int unsigned AW = noc_pkg::ADDR_W;

  logic [DW-1:0]     head  [NPORTS];
  logic [NPORTS-1:0] empty;
  logic [NPORTS-1:0] pop;
  logic [NPORTS-1:0] req   [NPORTS];   // [out][in]
  logic [NPORTS-1:0] gnt   [NPORTS];   // [out][in]
  logic [SW-1:0]     sel   [NPORTS];
  logic [NPORTS-1:0] busy;
  logic [DW-1:0]     xout  [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    fifo #(.DW(DW), .DEPTH(DEPTH), .FWFT(1'b1)) u_fifo (
      .clk, .rst, .wreq(en[i]), .rreq(pop[i]), .din(data_in[i]),
      .dout(head[i]), .full(full[i]), .empty(empty[i])
    );
  end

  // FIFO control logic: destination field of each head to the arbiter.
  always_comb begin
    for (int j = 0; j < int'(NPORTS); j++) begin
      for (int i = 0; i < int'(NPORTS); i++) begin
        req[j][i] = !empty[i] && (head[i][AW-1:0] == AW'(j + 1));
      end
    end
    for (int i = 0; i < int'(NPORTS); i++) begin
      logic granted, routable;
      granted  = 1'b0;
      for (int j = 0; j < int'(NPORTS); j++) granted |= gnt[j][i];
      routable = (head[i][AW-1:0] >= AW'(1)) && (head[i][AW-1:0] <= AW'(NPORTS));
      pop[i]   = granted || (!empty[i] && !routable);
    end
  end

  arbiter #(.NPORTS(NPORTS)) u_arb (.clk, .rst, .req, .gnt, .sel, .busy);

  crossbar #(.NPORTS(NPORTS), .DW(DW)) u_xbar (.din(head), .sel, .dout(xout));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      valid <= '0;
      for (int j = 0; j < int'(NPORTS); j++) data_out[j] <= '0;
    end else begin
      valid <= busy;
      for (int j = 0; j < int'(NPORTS); j++) begin
        if (busy[j]) data_out[j] <= xout[j];
      end
    end
  end

endmodule
