// pntt_pe: one processing element (stage S) of the pipelined NTT unit.
//
// A PE is a delay commutator (two FIFOs of depth D = n / 2**(S+1) and two
// multiplexers) followed by a butterfly unit. The commutator turns the pair
// stream of span 2D delivered by stage S-1 into pairs of span D. Stage 0 has no
// commutator: it receives pairs (x[t], x[t+n/2]) straight from the memory.
//
// Run-time size: for a transform of 2**log_sz <= n points the first
// LOG_N - log_sz stages are bypassed (combinational pass), so the first active
// stage sees the pair stream of the smaller transform directly.
//
// Twiddles: a local table holds psi^e, e in [0, 2n), where psi is a primitive
// 2n-th root of unity; it is written through tw_we/tw_addr/tw_data. With
// s = S - (LOG_N - log_sz) the local stage, g the group and j the offset of the
// pair at this stage, the exponent is
//   forward (CT):  (2*bitrev_s(g) + neg) * 2**(LOG_N-1-s)
//   inverse (GS): -(2*j + neg) * 2**S            (mod 2n)
// neg = 1 gives the negacyclic (psi-merged) transform, neg = 0 the cyclic one.
// Both directions use the same data-flow direction: natural-order input,
// bit-reversed output; this is this design's choice, the source switches the
// PE data paths instead.
//
// Timing: stream in one pair per clock while in_v is high; in_v must stay high
// for whole transforms and the stream is flushed by clocking with in_v low.
// Latency: D clocks (commutator) + 2 clocks (butterfly) when active, 0 bypassed.
module pntt_pe
  import ntt_pkg::*;
#(
  parameter int unsigned LN = LOG_N,
  parameter int unsigned S  = 0,
  parameter int unsigned W  = QW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,      // restart position counters
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
  localparam int unsigned TWN = 2 << LN;         // 2n twiddle entries
  localparam int unsigned LGH = LN - 1 - S;      // log2 of the butterfly span

  logic [W-1:0] tw [TWN];
  always_ff @(posedge clk) if (tw_we) tw[tw_addr] <= tw_data;

  logic active, comm_on;
  assign active  = (S + 32'(log_sz)) >= LN;
  assign comm_on = (S + 32'(log_sz)) >  LN;   // first active stage takes the stream as is

  // ---------------- commutator ----------------
  logic [W-1:0] bu, bl;
  logic         bv;

  if (S == 0) begin : g_nocomm
    assign bu = in_u;
    assign bl = in_l;
    assign bv = in_v;
  end else begin : g_comm
    localparam int unsigned D   = 1 << LGH;
    localparam int unsigned LGD = LGH;
    logic [W:0]   dl [D];      // lower-input FIFO {valid, data}
    logic [W:0]   du [D];      // upper-output FIFO
    logic [LN:0]  ccnt;
    logic         swap;
    logic [W:0]   u1, l1, u2, l2;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)              ccnt <= '0;
      else if (clear)          ccnt <= '0;
      else if (in_v && comm_on) ccnt <= ccnt + 1'b1;

    assign swap = in_v && ccnt[LGD];
    // the FIFOs only ever hold valid words while the commutator is in use, so
    // a stage that was bypassed in the previous phase starts out empty
    assign u1 = {in_v && comm_on, in_u};
    assign l1 = dl[D-1];
    assign u2 = swap ? l1 : u1;
    assign l2 = swap ? u1 : l1;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        for (int unsigned d = 0; d < D; d++) begin
          dl[d] <= '0;
          du[d] <= '0;
        end
      end else begin
        dl[0] <= {in_v && comm_on, in_l};
        du[0] <= u2;
        for (int unsigned d = 1; d < D; d++) begin
          dl[d] <= dl[d-1];
          du[d] <= du[d-1];
        end
      end

    assign bu = comm_on ? du[D-1][W-1:0] : in_u;
    assign bl = comm_on ? l2[W-1:0]      : in_l;
    assign bv = comm_on ? l2[W]          : in_v;
  end

  // ---------------- twiddle selection ----------------
  logic [LN-1:0] bcnt, c;
  logic [15:0]   g, j, grev;
  logic [3:0]    sl;           // local stage index
  logic [LN:0]   e;
  logic [W-1:0]  w;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)              bcnt <= '0;
    else if (clear)          bcnt <= '0;
    else if (bv && active)   bcnt <= bcnt + 1'b1;

  always_comb begin
    // position inside the current transform, modulo 2**(log_sz-1)
    c    = bcnt & LN'((1 << (log_sz - 4'd1)) - 1);
    g    = 16'(c >> LGH);
    j    = 16'(c & LN'((1 << LGH) - 1));
    sl   = 4'(S + 32'(log_sz) - LN);
    grev = bitrev(g, 32'(sl));
    if (!inv) e = (LN+1)'(((grev << 1) | 16'(neg)) << (LN - 1 - 32'(sl)));
    else      e = (LN+1)'(TWN - (((32'(j) << 1) | 32'(neg)) << S) % TWN);
    w = tw[e];
  end

  // ---------------- butterfly ----------------
  logic [W-1:0] bx, by;
  logic [1:0]   vpipe;

  bfu #(.W(W)) u_bfu (.clk(clk), .inv(inv), .q(q), .a(bu), .b(bl), .w(w), .x(bx), .y(by));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[0], bv && active};

  assign out_u = active ? bx : in_u;
  assign out_l = active ? by : in_l;
  assign out_v = active ? vpipe[1] : in_v;
endmodule
