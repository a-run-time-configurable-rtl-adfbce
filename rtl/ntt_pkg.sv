// ntt_pkg: sizes, types and modular helpers shared by the run-time configurable
// 3D NTT/INTT accelerator.
//
// The polynomial of N = n*n*m coefficients is held as an n x n x m tensor
// (axes i, j of size n, axis k of size m). n = 2**LOG_N is fixed at compile
// time (64 in the reference configuration), m = 2**log_m is chosen at run
// time, 1 <= m <= n. Coefficients are QW-bit residues modulo a run-time prime q
// (QW = 60 in the reference configuration). Eight memory banks feed four
// pipelined NTT units, two coefficients each, per clock.
//
// Everything here is combinational; no timing.
package ntt_pkg;

  parameter int unsigned LOG_N    = 6;    // n = 64
  parameter int unsigned QW       = 60;   // coefficient / modulus width
  parameter int unsigned NUM_PNTT = 4;    // pipelined NTT units
  parameter int unsigned NUM_SLOT = 2 * NUM_PNTT;  // coefficients per clock = banks

  // Phase of the 3D transform being streamed.
  typedef enum logic [1:0] {
    PH_COL   = 2'd0,   // along k, size m, negacyclic (merged twist)
    PH_ROW   = 2'd1,   // along j, size n, cyclic
    PH_DEPTH = 2'd2,   // along i, size n, cyclic
    PH_NONE  = 2'd3
  } phase_e;

  // (a + b) mod q, inputs already reduced
  function automatic logic [QW-1:0] mod_add(input logic [QW-1:0] a, input logic [QW-1:0] b,
                                            input logic [QW-1:0] q);
    logic [QW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, q}) s = s - {1'b0, q};
    return s[QW-1:0];
  endfunction

  // (a - b) mod q, inputs already reduced
  function automatic logic [QW-1:0] mod_sub(input logic [QW-1:0] a, input logic [QW-1:0] b,
                                            input logic [QW-1:0] q);
    logic [QW:0] d;
    if (a >= b) d = {1'b0, a} - {1'b0, b};
    else        d = {1'b0, a} + {1'b0, q} - {1'b0, b};
    return d[QW-1:0];
  endfunction

  // a / 2 mod q (q odd)
  function automatic logic [QW-1:0] mod_half(input logic [QW-1:0] a, input logic [QW-1:0] q);
    logic [QW:0] s;
    s = a[0] ? ({1'b0, a} + {1'b0, q}) : {1'b0, a};
    return s[QW:1];
  endfunction

  // bit reversal of the low w bits of x (w <= 16)
  function automatic logic [15:0] bitrev(input logic [15:0] x, input int unsigned w);
    logic [15:0] r;
    r = '0;
    for (int unsigned b = 0; b < 16; b++)
      if (b < w) r[b] = x[w-1-b];
    return r;
  endfunction

  // Coefficient memory mapping (conflict-free for all three access patterns).
  // Element (i, j, k) of the n x n x m tensor, ln = log2 n, lm = log2 m:
  //   bank = { j[ln-1], i[ln-1] ^ k[lm-1], j[0] ^ i[0] }   (k[lm-1] = 0 if m = 1)
  //   addr = ((k mod m/2) * n + i) * n/4 + j[ln-2:1]
  // Column phase: the 8 elements of a clock differ in k[lm-1], j[ln-1], j[0];
  // row phase in j[ln-1], i[ln-1], i[0]; depth phase in i[ln-1], j[ln-1], j[0].
  // Each set maps onto the 8 banks one to one.
  function automatic logic [2:0] cm_bank(input logic [7:0] i, input logic [7:0] j,
                                         input logic [7:0] k, input logic [3:0] lm,
                                         input int unsigned ln);
    logic kh;
    kh = (lm == 0) ? 1'b0 : k[lm-1];
    return {j[ln-1], i[ln-1] ^ kh, j[0] ^ i[0]};
  endfunction

  function automatic logic [23:0] cm_addr(input logic [7:0] i, input logic [7:0] j,
                                          input logic [7:0] k, input logic [3:0] lm,
                                          input int unsigned ln);
    logic [23:0] klow, jm;
    klow = (lm == 0) ? 24'd0 : (24'(k) & ((24'd1 << (lm - 1)) - 24'd1));
    jm   = (24'(j) >> 1) & ((24'd1 << (ln - 2)) - 24'd1);
    return ((klow << ln) + 24'(i)) * (24'd1 << (ln - 2)) + jm;
  endfunction

endpackage
