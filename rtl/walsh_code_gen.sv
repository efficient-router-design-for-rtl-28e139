// walsh_code_gen: Walsh code generator (WCG) of the CDMA router.
//
// Combinational lookup from a 3-bit code index to its 8-chip codeword:
//   000 -> 11111111, 001 -> 10101010, 010 -> 11001100, 011 -> 10011001,
//   100 -> 11110000, 101 -> 10100101, 110 -> 11000011, 111 -> 10010110
// (chip 0 written first and held in the MSB). The table is the bitwise
// complement of the Hadamard matrix built by H_2N = [H_N H_N; H_N ~H_N] from
// H_1 = [0], so chip i of code k is NOT parity(k AND i); it is computed that
// way for any NCHIP = 2**AW. Codes 1..7 are balanced (four ones, four zeros)
// and mutually orthogonal; code 0 is not balanced and no port uses it.
// Chip 0 (the MSB) is 1 in every code, so that output bit is constant.
module walsh_code_gen #(
  parameter int unsigned AW    = noc_pkg::ADDR_W,
  parameter int unsigned NCHIP = noc_pkg::N_CHIP
) (
  input  logic [AW-1:0]    addr,
  output logic [NCHIP-1:0] code
);

  always_comb begin
    for (int unsigned i = 0; i < NCHIP; i++) begin
      code[NCHIP-1-i] = ~(^(addr & AW'(i)));
    end
  end

endmodule
