// lut_k: K-input look-up table, the basic logic element of the FPGA slice.
//
// The output is the bit of the 2^K-bit constant INIT addressed by the K
// inputs, i[0] being the least significant address bit. The multiplier uses
// it with K = 2, 4 and 6 (LUT-2, LUT-4 and LUT-6), its contents being
// computed by the instantiating module. Purely combinational.
//
// The element itself follows the design's description of a 6-input LUT; the
// address bit order is this design's own choice.
module lut_k #(
  parameter int unsigned        K    = 6,
  parameter logic [2**K-1:0]    INIT = '0
) (
  input  logic [K-1:0] i,
  output logic         o
);
  assign o = 1'(INIT >> i);
endmodule
