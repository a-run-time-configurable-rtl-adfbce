// mod_mul: modular multiplier p = a * b mod q.
//
// The full 2*QW-bit product is reduced with a generic remainder and the result
// is registered: one clock of latency, one operation per clock. The reduction
// method is this design's own choice; the source only states that the
// multiplier groups and the twiddle factor generator are built from modular
// multipliers. The modulus q is a run-time input so any NTT-friendly prime
// below 2**QW can be used.
module mod_mul #(
  parameter int unsigned QW = 60
) (
  input  logic          clk,
  input  logic [QW-1:0] a,
  input  logic [QW-1:0] b,
  input  logic [QW-1:0] q,
  output logic [QW-1:0] p
);
  logic [2*QW-1:0] prod, rem;

  always_comb begin
    prod = a * b;
    rem  = prod % {{QW{1'b0}}, q};
  end

  always_ff @(posedge clk) p <= rem[QW-1:0];
endmodule
