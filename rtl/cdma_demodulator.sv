// cdma_demodulator: demodulator (DEMOD) of one CDMA router output port.
//
// Recovers each packet bit from the chip sums P[i] with the sender's codeword:
// X[i] = 2P[i] - N where code chip i is 0 and N - 2P[i] where it is 1
// (N = NCHIP), and lambda = sum(X) / N. lambda = +1 gives a 1, lambda = -1 a 0.
// Since N is a power of two the division is replaced by comparing sum(X) with
// +N and -N. ok is high only when every bit gave exactly +N or -N, i.e. one
// sender using this code is present. Combinational.
// The algorithm follows the document; the ok flag is this design's addition.
module cdma_demodulator #(
  parameter int unsigned DW    = noc_pkg::PKT_W,
  parameter int unsigned NCHIP = noc_pkg::N_CHIP,
  parameter int unsigned SUMW  = noc_pkg::SUM_W,
  localparam int unsigned XW   = SUMW + $clog2(NCHIP) + 3   // room for sum(X)
) (
  input  logic [DW-1:0][NCHIP-1:0][SUMW-1:0] sum,
  input  logic [NCHIP-1:0]                   code,
  output logic [DW-1:0]                      data,
  output logic                               ok
);

  always_comb begin
    ok = 1'b1;
    for (int b = 0; b < int'(DW); b++) begin
      logic signed [XW-1:0] acc;
      acc = '0;
      for (int i = 0; i < int'(NCHIP); i++) begin
        logic signed [XW-1:0] x;
        x = (XW'(sum[b][NCHIP-1-i]) <<< 1) - XW'(NCHIP);   // 2P - N
        if (code[NCHIP-1-i]) acc = acc - x;
        else                 acc = acc + x;
      end
      data[b] = (acc == XW'(NCHIP));
      if (acc != XW'(NCHIP) && acc != -XW'(NCHIP)) ok = 1'b0;
    end
  end

endmodule
