// cdma_modulator: modulator (MOD) of one CDMA router input port.
//
// Spreads every bit of the packet with the port's codeword, all bits in
// parallel: a 0 bit sends the codeword itself, a 1 bit the inverted codeword,
// i.e. chips[b] = code XOR {NCHIP{data[b]}}. When en is low (the port has no
// grant) all chips are 0, which contributes nothing to the correlation in the
// demodulators because the codes in use are balanced. Combinational.
// The spreading rule follows the document; the all-zero idle output is this
// design's choice.
module cdma_modulator #(
  parameter int unsigned DW    = noc_pkg::PKT_W,
  parameter int unsigned NCHIP = noc_pkg::N_CHIP
) (
  input  logic                       en,
  input  logic [DW-1:0]              data,
  input  logic [NCHIP-1:0]           code,
  output logic [DW-1:0][NCHIP-1:0]   chips
);

  always_comb begin
    for (int b = 0; b < int'(DW); b++) begin
      chips[b] = en ? (data[b] ? ~code : code) : '0;
    end
  end

endmodule
