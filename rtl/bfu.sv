// bfu: radix-2 butterfly unit for the merged negacyclic NTT/INTT.
//
// inv = 0, Cooley-Tukey:      x = a + w*b,        y = a - w*b
// inv = 1, Gentleman-Sande:   x = (a + b) / 2,    y = (a - b) * w / 2
// The halving in the GS form folds the 1/m scaling of the inverse transform
// into the butterflies, so no final scaling pass is needed. Both forms share
// one modular multiplier (multiply first for CT, last for GS). The source says
// the BFU supports both butterflies; the shared multiplier and the halving are
// this design's choices.
//
// Timing: fully pipelined, latency 2 clocks in both modes; w is sampled with a
// and b. inv must be held constant while data is in flight.
module bfu
  import ntt_pkg::*;
#(
  parameter int unsigned W = QW
) (
  input  logic         clk,
  input  logic         inv,
  input  logic [W-1:0] q,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] w,
  output logic [W-1:0] x,
  output logic [W-1:0] y
);
  logic [W-1:0] a1, s1, d1, w1, s2, mx, my, pr, ct_x, ct_y;

  // stage 1 registers
  always_ff @(posedge clk) begin
    a1 <= a;
    s1 <= mod_half(mod_add(a, b, q), q);
    d1 <= mod_half(mod_sub(a, b, q), q);
    w1 <= w;
  end

  assign mx = inv ? d1 : b;
  assign my = inv ? w1 : w;

  mod_mul #(.QW(W)) u_mm (.clk(clk), .a(mx), .b(my), .q(q), .p(pr));

  // stage 2 registers
  always_ff @(posedge clk) begin
    ct_x <= mod_add(a1, pr, q);
    ct_y <= mod_sub(a1, pr, q);
    s2   <= s1;
  end

  assign x = inv ? s2 : ct_x;
  assign y = inv ? pr : ct_y;
endmodule
