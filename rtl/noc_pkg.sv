// noc_pkg: constants and helper functions shared by the three five-port routers.
//
// All three routers move 8-bit packets between five ports. Ports are numbered
// 1..5 inside packets (a 3-bit address), and 0..4 as array indices in the RTL.
// Router I and router II carry the destination port in packet bits [2:0];
// the CDMA router uses the layout {dest[7:5], src[4:2], data[1:0]}.
// The CDMA router spreads each packet bit with an 8-chip Walsh codeword; the
// codeword table is the complement of the Hadamard rows built from H1 = [0]
// (chip i of code k is NOT parity(k AND i)), with chip 0 stored in the MSB.
package noc_pkg;

  localparam int unsigned N_PORTS = 5;   // five ports per router
  localparam int unsigned PKT_W  = 8;   // packet width
  localparam int unsigned ADDR_W = 3;   // port address width
  localparam int unsigned FIFO_DEPTH = 4;   // FIFO depth
  localparam int unsigned N_CHIP = 8;   // Walsh code length
  localparam int unsigned SUM_W  = 3;   // width of a chip sum (0..7)

  // Walsh codeword of index k, NCHIP chips, chip 0 in bit NCHIP-1.
  function automatic logic [N_CHIP-1:0] walsh_code(input logic [ADDR_W-1:0] k);
    logic [N_CHIP-1:0] c;
    for (int unsigned i = 0; i < N_CHIP; i++) begin
      c[N_CHIP-1-i] = ~(^(k & ADDR_W'(i)));
    end
    return c;
  endfunction

endpackage
