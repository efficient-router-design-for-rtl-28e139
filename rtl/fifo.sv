// fifo: the FIFO unit of the routers, a RAM (fifo_ram) and its controller
// (fifo_ctrl).
//
// Interface: wreq writes din when the queue is not full; rreq reads when it is
// not empty; full and empty flag the two ends. Timing: with FWFT = 0 (the
// block-RAM style FIFO of router I) a read request at a clock edge puts the
// head word on dout after that edge, and dout then holds it. With FWFT = 1
// (routers II and III) dout always shows the current head word and rreq pops
// it at the clock edge. Depth four and width eight are the document's values;
// FWFT and the dual-address RAM are this design's choices.
module fifo #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 4,
  parameter bit          FWFT  = 1'b0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wreq,
  input  logic          rreq,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout,
  output logic          full,
  output logic          empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic          wr_en, rd_en;
  logic [AW-1:0] waddr, raddr;

  fifo_ctrl #(.DEPTH(DEPTH)) u_ctrl (
    .clk, .rst, .wreq, .rreq,
    .wr_en, .rd_en, .waddr, .raddr, .full, .empty
  );

  fifo_ram #(.DW(DW), .DEPTH(DEPTH), .SHOW_AHEAD(FWFT)) u_ram (
    .clk, .rst, .wr_en, .waddr, .din, .rd_en, .raddr, .dout
  );

endmodule
