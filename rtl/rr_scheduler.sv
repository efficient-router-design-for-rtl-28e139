// rr_scheduler: round-robin output scheduler of router I.
//
// One scheduler serves one output port. Each of its five inputs is the data
// output of a FIFO holding packets for this port from one input port. Every
// cycle the scheduler searches the non-empty FIFOs, starting at the one after
// the FIFO it served last, and raises that FIFO's read request (rr, the
// RR1..RR5 outputs). The FIFO delivers the word after the clock edge
// (block-RAM read); the scheduler registers it onto dout with dvalid high one
// edge later. The FIFO just served becomes the lowest priority. A FIFO's empty
// flag already reflects a read at the edge of that read, so a read can be
// issued every cycle.
// Timing: read request in cycle t, FIFO output valid in t+1, dout valid in
// t+2; one packet per cycle per output. Packets contending for one output
// therefore leave one cycle apart, giving latencies that step by one clock
// from port to port. Round robin with the last served port at the lowest
// priority follows the document; the empty flags, reset and dvalid are this
// design's additions.
module rr_scheduler
#(
  parameter int unsigned NPORTS = noc_pkg::N_PORTS,
  parameter int unsigned DW     = noc_pkg::PKT_W,
  localparam int unsigned IW    = $clog2(NPORTS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DW-1:0]     din [NPORTS],
  input  logic [NPORTS-1:0] empty,
  output logic [NPORTS-1:0] rr,
  output logic [DW-1:0]     dout,
  output logic              dvalid
);

  logic [IW-1:0] last_q;     // FIFO served last (lowest priority)
  logic [IW-1:0] pick;
  logic          found;
  logic          pend_q;     // a read was issued last cycle
  logic [IW-1:0] pend_idx_q;

  // Search from last_q+1 round the ring.
  always_comb begin
    found = 1'b0;
    pick  = last_q;
    for (int o = 1; o <= int'(NPORTS); o++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last_q) + o) % int'(NPORTS));
      if (!found && !empty[idx]) begin
        found = 1'b1;
        pick  = IW'(idx);
      end
    end
  end

  always_comb begin
    rr = '0;
    if (found) rr[pick] = 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      last_q     <= IW'(NPORTS - 1);
      pend_q     <= 1'b0;
      pend_idx_q <= '0;
      dout       <= '0;
      dvalid     <= 1'b0;
    end else begin
      pend_q <= |rr;
      if (|rr) begin
        pend_idx_q <= pick;
        last_q     <= pick;
      end
      dvalid <= pend_q;
      if (pend_q) dout <= din[pend_idx_q];
    end
  end

endmodule
