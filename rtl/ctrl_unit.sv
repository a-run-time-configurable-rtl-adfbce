// ctrl_unit: control unit, i.e. the control logic and the address generation
// logic of the accelerator.
//
// On start it latches the direction and log2 m and, if the twiddle factor
// plane is held in the other direction's layout, first runs a refresh of the
// twiddle factor generator. It then runs the phases
//   forward: column (size m, negacyclic) -> row (size n) -> depth (size n)
//   inverse: depth -> row -> column
// skipping the column phase when m = 1 (a one-point transform). Each phase
// streams all N/8 clocks of reads without a gap, then waits until all N/8
// write-backs have come out of the processing unit before the next phase
// starts, so a phase never reads what the previous one has yet to write.
//
// Three address generators track the stream: the read side (clock c), the
// processing unit's raw PNTT output (for inverse-direction twiddle requests)
// and the write side. Outputs go unregistered to the memory, the twiddle
// factor generator and the processing unit; the read multiplexer select is
// delayed one clock to match the memory's read latency.
// Sequencing and phase order follow the source; the gap-free streaming with a
// drain between phases and the automatic refresh are this design's choices.
module ctrl_unit
  import ntt_pkg::*;
#(
  parameter int unsigned LN = LOG_N,
  parameter int unsigned AW = 3 * LN - 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          mode_inv,
  input  logic [3:0]    log_m,
  output logic          busy,
  output logic          done,
  output logic [31:0]   cycles,          // length of the last operation
  // twiddle factor generator
  output logic          refresh_start,
  input  logic          refresh_busy,
  input  logic          inv_layout,
  output logic          tf_req_v,
  output phase_e        tf_ph,
  output logic [7:0]    tf_i [8],
  output logic [7:0]    tf_j [8],
  output logic [7:0]    tf_k [8],
  // processing unit
  output logic          inv,
  output logic          neg,
  output logic [3:0]    log_sz,
  output logic [3:0]    cur_log_m,
  output logic          pu_clear,
  output logic          pu_in_v,
  input  logic          pu_pntt_ov,
  input  logic          pu_out_v,
  // coefficient memory and multiplexers
  output logic [AW-1:0] rd_addr [8],
  output logic [2:0]    rd_sel  [8],     // slot s <- bank rd_sel[s] (clock c+1)
  output logic          wr_en   [8],
  output logic [AW-1:0] wr_addr [8],
  output logic [2:0]    wr_sel  [8]      // bank b <- slot wr_sel[b]
);
  typedef enum logic [2:0] {S_IDLE, S_REFRESH, S_PSTART, S_RUN, S_DONE} state_e;
  state_e state;

  logic [1:0]  ph_idx;
  phase_e      phase;
  logic [23:0] total, rc, tc, wc;
  logic        rd_v;

  // phase for a list position
  function automatic phase_e ph_of(input logic [1:0] idx, input logic iv, input logic [3:0] lm);
    phase_e l [3];
    if (!iv) begin l[0] = PH_COL;   l[1] = PH_ROW; l[2] = PH_DEPTH; end
    else     begin l[0] = PH_DEPTH; l[1] = PH_ROW; l[2] = PH_COL;   end
    if (lm == 0 && !iv) return (idx == 2'd0) ? PH_ROW : PH_DEPTH;  // column skipped
    return l[idx];
  endfunction

  logic [1:0] nph;
  assign nph   = (cur_log_m == 0) ? 2'd2 : 2'd3;
  assign total = 24'd1 << (2 * LN + 32'(cur_log_m) - 3);
  assign log_sz = (phase == PH_COL) ? cur_log_m : 4'(LN);
  assign neg    = (phase == PH_COL);
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE; ph_idx <= '0; phase <= PH_NONE; inv <= 1'b0; cur_log_m <= '0;
      rc <= '0; tc <= '0; wc <= '0; done <= 1'b0; refresh_start <= 1'b0; pu_clear <= 1'b0;
      cycles <= '0;
    end else begin
      done <= 1'b0; refresh_start <= 1'b0; pu_clear <= 1'b0;
      if (state != S_IDLE) cycles <= cycles + 1;
      unique case (state)
        S_IDLE: if (start) begin
          inv <= mode_inv; cur_log_m <= log_m; ph_idx <= '0; cycles <= 32'd1;
          if (mode_inv != inv_layout) begin
            refresh_start <= 1'b1; state <= S_REFRESH;
          end else state <= S_PSTART;
        end
        S_REFRESH: if (!refresh_busy && !refresh_start) state <= S_PSTART;
        S_PSTART: begin
          phase <= ph_of(ph_idx, inv, cur_log_m);
          pu_clear <= 1'b1;
          rc <= '0; tc <= '0; wc <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (rd_v) rc <= rc + 1'b1;
          if (pu_pntt_ov) tc <= tc + 1'b1;
          if (pu_out_v) begin
            wc <= wc + 1'b1;
            if (wc == total - 1'b1) begin
              if (ph_idx == nph - 2'd1) state <= S_DONE;
              else begin
                ph_idx <= ph_idx + 1'b1; state <= S_PSTART;
              end
            end
          end
        end
        S_DONE: begin
          done <= 1'b1; phase <= PH_NONE; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end

  assign rd_v = (state == S_RUN) && !pu_clear && (rc < total);

  // ---------------- address generators ----------------
  logic [23:0] hmask;
  logic [15:0] q_r, q_t, q_w;
  logic [7:0]  p_r, p_t, p_w;
  assign hmask = (24'd1 << (log_sz - 4'd1)) - 24'd1;
  assign q_r = 16'(rc >> (log_sz - 4'd1));
  assign q_t = 16'(tc >> (log_sz - 4'd1));
  assign q_w = 16'(wc >> (log_sz - 4'd1));
  assign p_r = 8'(rc & hmask);
  assign p_t = 8'(bitrev(16'(tc & hmask), 32'(log_sz) - 1));
  assign p_w = 8'(bitrev(16'(wc & hmask), 32'(log_sz) - 1));

  logic [7:0]    ri [8], rj [8], rk [8], ti [8], tj [8], tk [8], wi [8], wj [8], wk [8];
  logic [2:0]    r_sb [8], r_bs [8], t_sb [8], t_bs [8], w_sb [8], w_bs [8];
  logic [AW-1:0] t_ba [8];

  agu #(.LN(LN), .AW(AW)) u_agu_rd (.phase, .log_m(cur_log_m), .quad(q_r), .pos(p_r),
    .ci(ri), .cj(rj), .ck(rk), .slot_bank(r_sb), .bank_addr(rd_addr), .bank_slot(r_bs));
  agu #(.LN(LN), .AW(AW)) u_agu_tf (.phase, .log_m(cur_log_m), .quad(q_t), .pos(p_t),
    .ci(ti), .cj(tj), .ck(tk), .slot_bank(t_sb), .bank_addr(t_ba), .bank_slot(t_bs));
  agu #(.LN(LN), .AW(AW)) u_agu_wr (.phase, .log_m(cur_log_m), .quad(q_w), .pos(p_w),
    .ci(wi), .cj(wj), .ck(wk), .slot_bank(w_sb), .bank_addr(wr_addr), .bank_slot(wr_sel));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pu_in_v <= 1'b0;
    else        pu_in_v <= rd_v;

  always_ff @(posedge clk) rd_sel <= r_sb;

  always_comb
    for (int b = 0; b < 8; b++) wr_en[b] = pu_out_v && (state == S_RUN);

  assign tf_req_v = inv ? pu_pntt_ov : rd_v;
  assign tf_ph    = phase;
  assign tf_i     = inv ? ti : ri;
  assign tf_j     = inv ? tj : rj;
  assign tf_k     = inv ? tk : rk;
endmodule
