// fifo_ctrl: controller of the FIFO unit.
//
// Takes the write and read requests (wreq, rreq), refuses a write when the
// queue is full and a read when it is empty, and drives the RAM enables and
// addresses. It keeps a write pointer, a read pointer and an occupancy count
// of 0..DEPTH; full and empty come straight from the count registers. A
// simultaneous read and write on a non-empty, non-full queue both happen.
// Active-high asynchronous reset empties the queue.
module fifo_ctrl #(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wreq,
  input  logic          rreq,
  output logic          wr_en,
  output logic          rd_en,
  output logic [AW-1:0] waddr,
  output logic [AW-1:0] raddr,
  output logic          full,
  output logic          empty
);

  logic [CW-1:0] count;

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);
  assign wr_en = wreq && !full;
  assign rd_en = rreq && !empty;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      waddr <= '0;
      raddr <= '0;
      count <= '0;
    end else begin
      if (wr_en) waddr <= incr(waddr);
      if (rd_en) raddr <= incr(raddr);
      unique case ({wr_en, rd_en})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
