// noc_router_top: the three five-port router architectures side by side.
//
// Router I (router_fifo) queues each packet per input/output pair and serves
// every output with a round-robin scheduler. Router II (router_xbar) has one
// FIFO per input, a round-robin arbiter and a 5x5 crossbar. Router III
// (cdma_router) carries all five ports' packets at once over one summed bus
// using orthogonal Walsh codes. They share clock and active-high asynchronous
// reset only; each has its own ports, prefixed r1_, r2_ and r3_. Port widths
// and timing are those of the three routers.
module noc_router_top #(
  parameter int unsigned NPORTS = noc_pkg::N_PORTS,
  parameter int unsigned DW     = noc_pkg::PKT_W,
  parameter int unsigned DEPTH  = noc_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst,
  // router I
  input  logic [DW-1:0]     r1_datai [NPORTS],
  input  logic [NPORTS-1:0] r1_wr,
  output logic [DW-1:0]     r1_datao [NPORTS],
  output logic [NPORTS-1:0] r1_valid,
  output logic [NPORTS-1:0] r1_full  [NPORTS],
  // router II
  input  logic [DW-1:0]     r2_data_in  [NPORTS],
  input  logic [NPORTS-1:0] r2_en,
  output logic [NPORTS-1:0] r2_full,
  output logic [DW-1:0]     r2_data_out [NPORTS],
  output logic [NPORTS-1:0] r2_valid,
  // router III (CDMA)
  input  logic [DW-1:0]     r3_di     [NPORTS],
  input  logic [NPORTS-1:0] r3_wr,
  output logic [NPORTS-1:0] r3_full,
  output logic [DW-1:0]     r3_dout   [NPORTS],
  output logic [NPORTS-1:0] r3_dvalid,
  output logic [NPORTS-1:0] r3_err
);

  router_fifo #(.NPORTS(NPORTS), .DW(DW), .DEPTH(DEPTH)) u_router1 (
    .clk, .rst, .datai(r1_datai), .wr(r1_wr), .datao(r1_datao), .valid(r1_valid), .full(r1_full)
  );

  router_xbar #(.NPORTS(NPORTS), .DW(DW), .DEPTH(DEPTH)) u_router2 (
    .clk, .rst, .data_in(r2_data_in), .en(r2_en), .full(r2_full),
    .data_out(r2_data_out), .valid(r2_valid)
  );

  cdma_router #(.NPORTS(NPORTS), .DW(DW), .DEPTH(DEPTH)) u_router3 (
    .clk, .rst, .di(r3_di), .wr(r3_wr), .full(r3_full),
    .dout(r3_dout), .dvalid(r3_dvalid), .err(r3_err)
  );

endmodule
