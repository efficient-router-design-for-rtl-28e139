// code_adder: code adder of the CDMA router.
//
// Adds, chip by chip and for every packet bit, the modulated chips of all
// NPORTS modulators. Each sum P is the number of senders whose chip is 1, so
// it lies in 0..NPORTS and fits the SUMW-bit result (0..7 in the document's
// seven-resource case). Written as a chain of additions, one per port, which
// is the cascade of full adders the document describes. Combinational.
module code_adder #(
  parameter int unsigned NPORTS = noc_pkg::N_PORTS,
  parameter int unsigned DW     = noc_pkg::PKT_W,
  parameter int unsigned NCHIP  = noc_pkg::N_CHIP,
  parameter int unsigned SUMW   = noc_pkg::SUM_W
) (
  input  logic [DW-1:0][NCHIP-1:0]            chips_in [NPORTS],
  output logic [DW-1:0][NCHIP-1:0][SUMW-1:0]  sum
);

  always_comb begin
    for (int b = 0; b < int'(DW); b++) begin
      for (int c = 0; c < int'(NCHIP); c++) begin
        logic [SUMW-1:0] acc;
        acc = '0;
        for (int p = 0; p < int'(NPORTS); p++) acc = acc + SUMW'(chips_in[p][b][c]);
        sum[b][c] = acc;
      end
    end
  end

endmodule
