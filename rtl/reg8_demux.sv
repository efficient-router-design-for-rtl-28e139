// reg8_demux: input stage of router I, an 8-bit register followed by a
// demultiplexer.
//
// The register has an active-high enable (the port's Wr) and an active-high
// asynchronous reset that clears it; with the enable low it keeps its value.
// The demultiplexer sends the registered packet to output k-1 when packet
// bits [2:0] hold k (k = 1..5) and raises the matching write enable; all other
// outputs and write enables are zero. Bits [2:0] = 0, 6 or 7 name no port
// and raise no write enable.
// Timing: a packet presented with en = 1 at clock edge t is on d_out with its
// we bit high during the cycle after t, for exactly one cycle. The register,
// enable, reset and select field follow the document; gating the demultiplexer
// with the registered enable is this design's choice.
module reg8_demux
#(
  parameter int unsigned NPORTS = noc_pkg::N_PORTS,
  parameter int unsigned DW     = noc_pkg::PKT_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [DW-1:0]     data_in,
  output logic [DW-1:0]     d_out [NPORTS],
  output logic [NPORTS-1:0] we
);

  logic [DW-1:0] data_q;
  logic          en_q;     // demultiplexer enable: a packet was stored last edge

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      data_q <= '0;
      en_q   <= 1'b0;
    end else begin
      if (en) data_q <= data_in;
      en_q <= en;
    end
  end

  always_comb begin
    for (int k = 0; k < int'(NPORTS); k++) begin
      we[k]    = en_q && (data_q[noc_pkg::ADDR_W-1:0] == noc_pkg::ADDR_W'(k + 1));
      d_out[k] = we[k] ? data_q : '0;
    end
  end

endmodule
