// crossbar: the switch of router II, an array of NPORTS multiplexers of
// NPORTS:1 each.
//
// Every input word reaches every multiplexer; output j carries din[sel[j]].
// A select value of NPORTS or more (no such input) gives zero. Purely
// combinational. The multiplexer array follows the document; the zero output
// on an out-of-range select is this design's choice.
module crossbar #(
  parameter int unsigned NPORTS = noc_pkg::N_PORTS,
  parameter int unsigned DW     = noc_pkg::PKT_W,
  localparam int unsigned SW    = $clog2(NPORTS)
) (
  input  logic [DW-1:0] din  [NPORTS],
  input  logic [SW-1:0] sel  [NPORTS],
  output logic [DW-1:0] dout [NPORTS]
);

  always_comb begin
    for (int j = 0; j < int'(NPORTS); j++) begin
      dout[j] = '0;
      for (int i = 0; i < int'(NPORTS); i++) begin
        if (sel[j] == SW'(i)) dout[j] = din[i];
      end
    end
  end

endmodule
