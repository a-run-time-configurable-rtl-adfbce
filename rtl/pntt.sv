// pntt: pipelined NTT/INTT unit, a radix-2 multi-path delay commutator (MDC)
// pipeline of LOG_N processing elements (see pntt_pe).
//
// It takes two coefficients per clock, x[t] and x[t + sz/2] for t = 0 .. sz/2-1
// of each transform of sz = 2**log_sz points (sz <= n), back to back, and
// returns two per clock in bit-reversed order: the c-th output pair of a
// transform is (X[r], X[r + sz/2]) with r = bitrev(c) over log_sz-1 bits.
// Stages in front of the last log_sz ones are bypassed, which is how one
// pipeline serves every power-of-two size up to n. inv selects CT (forward) or
// GS-with-halving (inverse, includes the 1/sz scaling); neg selects the
// negacyclic (psi-merged) or the cyclic transform.
//
// Latency for sz = n: sum over stages 1..LOG_N-1 of n/2**(S+1), i.e. n/2 - 1,
// plus 2 clocks per butterfly. The stream must be continuous within a transform
// group; it is flushed by clocking with in_v low. Pulse clear before a new
// stream of a different size.
module pntt
  import ntt_pkg::*;
#(
  parameter int unsigned LN = LOG_N,
  parameter int unsigned W  = QW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          inv,
  input  logic          neg,
  input  logic [3:0]    log_sz,
  input  logic [W-1:0]  q,
  input  logic          tw_we,
  input  logic [LN:0]   tw_addr,
  input  logic [W-1:0]  tw_data,
  input  logic [W-1:0]  in_u,
  input  logic [W-1:0]  in_l,
  input  logic          in_v,
  output logic [W-1:0]  out_u,
  output logic [W-1:0]  out_l,
  output logic          out_v
);
  logic [W-1:0] su [LN+1];
  logic [W-1:0] sl [LN+1];
  logic         sv [LN+1];

  assign su[0] = in_u;
  assign sl[0] = in_l;
  assign sv[0] = in_v;

  for (genvar s = 0; s < LN; s++) begin : g_pe
    pntt_pe #(.LN(LN), .S(s), .W(W)) u_pe (
      .clk, .rst_n, .clear, .inv, .neg, .log_sz, .q,
      .tw_we, .tw_addr, .tw_data,
      .in_u(su[s]), .in_l(sl[s]), .in_v(sv[s]),
      .out_u(su[s+1]), .out_l(sl[s+1]), .out_v(sv[s+1]));
  end

  assign out_u = su[LN];
  assign out_l = sl[LN];
  assign out_v = sv[LN];
endmodule
