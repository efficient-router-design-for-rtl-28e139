// rr_arbiter: one round-robin arbiter of router II (one per output port).
//
// A one-hot ring counter, held in flip-flops and reset to position 0, enables
// one of NPORTS priority logic blocks. Priority logic block k grants the first
// active request found from request k upwards, wrapping round; its output is
// a one-hot grant without encoding. The grants of all blocks are ORed; only
// the enabled block can produce one. After each cycle in which a grant is
// given the ring counter moves one place, so the highest priority passes from
// requester to requester. gnt is combinational from req and the ring counter.
// The ring counter, priority logic blocks and OR merge follow the document;
// shifting the ring only after a grant is this design's choice.
module rr_arbiter #(
  parameter int unsigned NPORTS = noc_pkg::N_PORTS,
  localparam int unsigned IW    = $clog2(NPORTS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NPORTS-1:0] req,
  output logic [NPORTS-1:0] gnt
);

  logic [NPORTS-1:0] ring_q;
  logic [NPORTS-1:0] pl_gnt [NPORTS];   // output of priority logic block k

  always_comb begin
    for (int k = 0; k < int'(NPORTS); k++) begin
      logic done;
      pl_gnt[k] = '0;
      done      = !ring_q[k];
      for (int o = 0; o < int'(NPORTS); o++) begin
        logic [IW-1:0] idx;
        idx = IW'((k + o) % int'(NPORTS));
        if (!done && req[idx]) begin
          pl_gnt[k][idx] = 1'b1;
          done           = 1'b1;
        end
      end
    end
    gnt = '0;
    for (int k = 0; k < int'(NPORTS); k++) gnt |= pl_gnt[k];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       ring_q <= NPORTS'(1);
    else if (|gnt) ring_q <= {ring_q[NPORTS-2:0], ring_q[NPORTS-1]};
  end

endmodule
