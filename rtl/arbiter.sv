// arbiter: the arbiter of router II.
//
// Holds one rr_arbiter per output port. req[j][i] says that the packet at the
// head of input FIFO i is for output j. gnt[j] is the one-hot grant of output
// j, sel[j] its binary form, which drives select line j of the crossbar, and
// busy[j] says output j carries a packet this cycle. As each input has only
// one head packet, it requests one output at a time, so an input is never
// granted twice in one cycle. Combinational from req to gnt; the rotating
// priorities update on the clock edge.
module arbiter #(
  parameter int unsigned NPORTS = noc_pkg::N_PORTS,
  localparam int unsigned SW    = $clog2(NPORTS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NPORTS-1:0] req  [NPORTS],
  output logic [NPORTS-1:0] gnt  [NPORTS],
  output logic [SW-1:0]     sel  [NPORTS],
  output logic [NPORTS-1:0] busy
);

  for (genvar j = 0; j < NPORTS; j++) begin : g_out
    rr_arbiter #(.NPORTS(NPORTS)) u_rr (.clk, .rst, .req(req[j]), .gnt(gnt[j]));

    always_comb begin
      sel[j] = '0;
      for (int i = 0; i < int'(NPORTS); i++) begin
        if (gnt[j][i]) sel[j] = SW'(i);
      end
      busy[j] = |gnt[j];
    end
  end

endmodule
