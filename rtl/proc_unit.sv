// proc_unit: processing unit, NUM_PNTT = 4 pipelined NTT units, each paired
// with a modular multiplier group. It consumes and produces eight coefficients
// per clock (slot s = 2p + u is input u of PNTT p).
//
// The position of the multiplier group is switched with the direction:
//   forward (inv = 0):  in -> MMG (x tf) -> PNTT -> register -> out
//   inverse (inv = 1):  in -> register -> PNTT -> register -> MMG (x tf) -> out
// so the dimension-switching factors are applied before each forward
// sub-transform and after each inverse one, which makes every inverse phase
// the exact mirror of a forward phase. In forward mode tf must be valid one
// clock after the data enters (the clock in_v is high + 0, it is sampled with
// in); in inverse mode tf must be valid one clock after pntt_ov.
// Four PNTTs and one MMG (two multipliers) per PNTT follow the source; the
// before/after switch is this design's choice.
module proc_unit
  import ntt_pkg::*;
#(
  parameter int unsigned LN = LOG_N,
  parameter int unsigned W  = QW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  q,
  input  logic          inv,
  input  logic          neg,
  input  logic [3:0]    log_sz,
  input  logic          clear,
  input  logic          tw_we,
  input  logic [LN:0]   tw_addr,
  input  logic [W-1:0]  tw_data,
  input  logic [W-1:0]  in   [8],
  input  logic          in_v,
  input  logic [W-1:0]  tf   [8],
  output logic [W-1:0]  out  [8],
  output logic          out_v,
  output logic          pntt_ov
);
  logic ov [4];

  for (genvar p = 0; p < 4; p++) begin : g_pu
    logic [W-1:0] mi_u, mi_l, mo_u, mo_l, pi_u, pi_l, po_u, po_l, pr_u, pr_l, ir_u, ir_l;
    logic         mi_v, mo_v, pi_v, po_v, pr_v, ir_v;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        ir_v <= 1'b0; pr_v <= 1'b0;
      end else begin
        ir_v <= in_v; pr_v <= po_v;
      end

    always_ff @(posedge clk) begin
      ir_u <= in[2*p]; ir_l <= in[2*p+1];
      pr_u <= po_u;    pr_l <= po_l;
    end

    assign mi_u = inv ? pr_u : in[2*p];
    assign mi_l = inv ? pr_l : in[2*p+1];
    assign mi_v = inv ? pr_v : in_v;

    mmg #(.W(W)) u_mmg (.clk, .rst_n, .q, .in_u(mi_u), .in_l(mi_l), .in_v(mi_v),
      .tf_u(tf[2*p]), .tf_l(tf[2*p+1]), .out_u(mo_u), .out_l(mo_l), .out_v(mo_v));

    assign pi_u = inv ? ir_u : mo_u;
    assign pi_l = inv ? ir_l : mo_l;
    assign pi_v = inv ? ir_v : mo_v;

    pntt #(.LN(LN), .W(W)) u_pntt (.clk, .rst_n, .clear, .inv, .neg, .log_sz, .q,
      .tw_we, .tw_addr, .tw_data, .in_u(pi_u), .in_l(pi_l), .in_v(pi_v),
      .out_u(po_u), .out_l(po_l), .out_v(po_v));

    assign out[2*p]   = inv ? mo_u : pr_u;
    assign out[2*p+1] = inv ? mo_l : pr_l;
    assign ov[p]      = inv ? mo_v : pr_v;
  end

  assign out_v   = ov[0];
  assign pntt_ov = g_pu[0].po_v;
endmodule
