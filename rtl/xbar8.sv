// xbar8: the multiplexer network between the eight memory banks and the eight
// PU slots (two per PNTT). Lane o takes input lane sel[o]; used once in the
// read direction (slot <- bank) and once in the write direction
// (bank <- slot). The select pattern is produced by the address generator and
// is a permutation whenever the access is conflict-free.
// Purely combinational.
module xbar8
  import ntt_pkg::*;
#(
  parameter int unsigned W = QW
) (
  input  logic [W-1:0] din  [8],
  input  logic [2:0]   sel  [8],
  output logic [W-1:0] dout [8]
);
  always_comb
    for (int o = 0; o < 8; o++) dout[o] = din[sel[o]];
endmodule
