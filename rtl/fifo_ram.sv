// fifo_ram: storage of the FIFO unit.
//
// A DEPTH x DW register array with a write port and a read port. On a rising
// clock edge with wr_en the word din is written at waddr. With SHOW_AHEAD = 0
// the read is synchronous as in a block RAM: on a rising edge with rd_en the
// word at raddr is copied into the dout register. With SHOW_AHEAD = 1 dout is
// the word at raddr without any clock (used where the head of the queue must
// be inspected before it is read). The active-high asynchronous reset clears
// every location and the output register, as the FIFO unit is specified to do.
// Separate read and write addresses are this design's choice: they let the
// FIFO read and write in the same cycle.
module fifo_ram #(
  parameter int unsigned DW         = 8,
  parameter int unsigned DEPTH      = 4,
  parameter bit          SHOW_AHEAD = 1'b0,
  localparam int unsigned AW        = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_en,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] din,
  input  logic          rd_en,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [DEPTH];
  logic [DW-1:0] dout_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (wr_en) begin
      mem[waddr] <= din;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        dout_q <= '0;
    else if (rd_en) dout_q <= mem[raddr];
  end

  assign dout = SHOW_AHEAD ? mem[raddr] : dout_q;

endmodule
