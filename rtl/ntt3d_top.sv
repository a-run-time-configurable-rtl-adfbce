// ntt3d_top: run-time configurable negacyclic NTT / INTT accelerator based on
// the 3D decomposition of the transform.
//
// A polynomial of N = n*n*m coefficients (n = 2**LN fixed, m = 2**log_m in
// [1, n] chosen per operation) is viewed as an n x n x m tensor, coefficient
// a_l at (i, j, k) with l = i + n*j + n*n*k. The forward transform runs three
// phases, each streaming the whole tensor once through four pipelined NTT
// units at eight coefficients per clock:
//   column: twist by psi_2N^(i+n*j), m-point negacyclic NTTs along k
//   row:    times w_{n*m}^(j*k), n-point NTTs along j
//   depth:  times w_{n*n}^(i*j) * w_N^(i*k), n-point NTTs along i
// leaving A_r, A_r = sum_l a_l psi_2N^(l*(2r+1)), at (i, j, k) with
// r = k + m*j + m*n*i. The inverse runs the mirror image (depth, row, column,
// with the inverse factors applied after each sub-transform) and returns the
// coefficients to their original places, scaled by 1/N already.
//
// Blocks: ctrl_unit (control and address generation), coef_mem (8 banks),
// two xbar8 networks (memory to PU and PU to memory), proc_unit (4 PNTT +
// 4 MMG), tfg (twiddle factor generator).
//
// Interfaces (all synchronous to clk, active-low asynchronous reset):
//   * host port, only while busy is low: host_en with host_we writes
//     host_wdata to tensor element (host_i, host_j, host_k) of the layout for
//     log_m; with host_we low, host_rdata holds that element one clock later.
//   * cfg port: cfg_sel 0 writes the initial plane (cfg_addr = l1*n + l2,
//     w_{n*n}^(l1*l2), forward layout, i.e. after reset or an even number of
//     refreshes); 1 a seed (cfg_addr = {dir, kind[1:0], lm[2:0], x[LN-1:0]},
//     see tfg); 2 a refresh factor ({dir, x}); 3 the PNTT twiddle table
//     (cfg_addr = e, value psi_2n^e, e in [0, 2n)).
//   * start (one clock, while busy is low) with mode_inv and log_m; done
//     pulses one clock at the end; cycles then holds the clocks the operation
//     took, including a refresh of the twiddle plane when the direction
//     changed.
// Latency: about 3*N/8 clocks (2*N/8 when m = 1) plus one pipeline drain per
// phase.
module ntt3d_top
  import ntt_pkg::*;
#(
  parameter int unsigned LN = LOG_N,
  parameter int unsigned W  = QW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  q,
  // operation
  input  logic          start,
  input  logic          mode_inv,
  input  logic [3:0]    log_m,
  output logic          busy,
  output logic          done,
  output logic [31:0]   cycles,
  // coefficient host port
  input  logic          host_en,
  input  logic          host_we,
  input  logic [7:0]    host_i,
  input  logic [7:0]    host_j,
  input  logic [7:0]    host_k,
  input  logic [W-1:0]  host_wdata,
  output logic [W-1:0]  host_rdata,
  // twiddle configuration port
  input  logic          cfg_we,
  input  logic [1:0]    cfg_sel,
  input  logic [15:0]   cfg_addr,
  input  logic [W-1:0]  cfg_data
);
  localparam int unsigned AW = 3 * LN - 3;

  // control unit
  logic          refresh_start, refresh_busy, inv_layout, tf_req_v;
  phase_e        tf_ph;
  logic [7:0]    tf_i [8], tf_j [8], tf_k [8];
  logic          inv, neg, pu_clear, pu_in_v, pu_pntt_ov, pu_out_v;
  logic [3:0]    log_sz, cur_log_m;
  logic [AW-1:0] cu_rd_addr [8], cu_wr_addr [8];
  logic [2:0]    rd_sel [8], wr_sel [8];
  logic          cu_wr_en [8];

  ctrl_unit #(.LN(LN), .AW(AW)) u_cu (
    .clk, .rst_n, .start, .mode_inv, .log_m, .busy, .done, .cycles,
    .refresh_start, .refresh_busy, .inv_layout,
    .tf_req_v, .tf_ph, .tf_i, .tf_j, .tf_k,
    .inv, .neg, .log_sz, .cur_log_m, .pu_clear, .pu_in_v, .pu_pntt_ov, .pu_out_v,
    .rd_addr(cu_rd_addr), .rd_sel, .wr_en(cu_wr_en), .wr_addr(cu_wr_addr), .wr_sel);

  // coefficient memory with host access while idle
  logic [AW-1:0] rd_addr [8], wr_addr [8];
  logic          wr_en [8];
  logic [W-1:0]  rd_data [8], wr_data [8], pu_out [8], pu_in [8];
  logic [2:0]    h_bank, h_bank_q;
  logic [AW-1:0] h_addr;

  assign h_bank = cm_bank(host_i, host_j, host_k, log_m, LN);
  assign h_addr = AW'(cm_addr(host_i, host_j, host_k, log_m, LN));

  xbar8 #(.W(W)) u_wr_mux (.din(pu_out), .sel(wr_sel), .dout(wr_data));

  logic [W-1:0] cm_wdata [8];
  always_comb
    for (int b = 0; b < 8; b++) begin
      if (busy) begin
        rd_addr[b]  = cu_rd_addr[b];
        wr_addr[b]  = cu_wr_addr[b];
        wr_en[b]    = cu_wr_en[b];
        cm_wdata[b] = wr_data[b];
      end else begin
        rd_addr[b]  = h_addr;
        wr_addr[b]  = h_addr;
        wr_en[b]    = host_en && host_we && (h_bank == 3'(b));
        cm_wdata[b] = host_wdata;
      end
    end

  coef_mem #(.LN(LN), .W(W), .AW(AW)) u_cm (.clk, .rd_addr, .rd_data,
    .wr_en, .wr_addr, .wr_data(cm_wdata));

  always_ff @(posedge clk) h_bank_q <= h_bank;
  assign host_rdata = rd_data[h_bank_q];

  // memory -> processing unit
  xbar8 #(.W(W)) u_rd_mux (.din(rd_data), .sel(rd_sel), .dout(pu_in));

  // twiddle factor generator
  logic [W-1:0] tf [8];
  tfg #(.LN(LN), .W(W)) u_tfg (.clk, .rst_n, .q,
    .cfg_we(cfg_we && cfg_sel != 2'd3), .cfg_sel, .cfg_addr, .cfg_data,
    .refresh_start, .refresh_busy, .inv_layout,
    .req_v(tf_req_v), .req_ph(tf_ph), .req_dir(inv), .log_m(cur_log_m),
    .req_i(tf_i), .req_j(tf_j), .req_k(tf_k), .tf);

  // processing unit
  proc_unit #(.LN(LN), .W(W)) u_pu (.clk, .rst_n, .q, .inv, .neg, .log_sz, .clear(pu_clear),
    .tw_we(cfg_we && cfg_sel == 2'd3), .tw_addr(cfg_addr[LN:0]), .tw_data(cfg_data),
    .in(pu_in), .in_v(pu_in_v), .tf, .out(pu_out), .out_v(pu_out_v), .pntt_ov(pu_pntt_ov));
endmodule
