// mmg: modular multiplier group attached to one PNTT. Two modular multipliers
// multiply the coefficient pair of a clock by the pair of dimension-switching
// twiddle factors supplied by the twiddle factor generator.
// Timing: one clock, fully pipelined; out_v follows in_v.
module mmg
  import ntt_pkg::*;
#(
  parameter int unsigned W = QW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] q,
  input  logic [W-1:0] in_u,
  input  logic [W-1:0] in_l,
  input  logic         in_v,
  input  logic [W-1:0] tf_u,
  input  logic [W-1:0] tf_l,
  output logic [W-1:0] out_u,
  output logic [W-1:0] out_l,
  output logic         out_v
);
  mod_mul #(.QW(W)) u_mm0 (.clk, .a(in_u), .b(tf_u), .q, .p(out_u));
  mod_mul #(.QW(W)) u_mm1 (.clk, .a(in_l), .b(tf_l), .q, .p(out_l));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_v <= 1'b0;
    else        out_v <= in_v;
endmodule
