// tfg: on-the-fly twiddle factor generator for the dimension switches of the
// 3D transform.
//
// Storage (all in eight banks, one per PU slot):
//   * TF memory: the initial plane w_{n*n}^(l1*l2), l1, l2 in [0, n). Entry
//     (l1, l2) lives in bank {l2[msb], l2[0], l1[msb]} at address
//     (l1 mod n/2) * n/4 + l2[ln-2:1], so every access pattern below reads
//     eight different banks, or several slots share one word.
//   * buffer plane (n x n): the running j-i plane of the depth phase.
//   * seed registers, per direction d (forward / inverse) and per run-time
//     size lm = log2 m, with N = n*n*m and psi_2N a primitive 2N-th root:
//       kind 0  s[x] = psi_2N^(+-x)          kind 1  r[x] = psi_2N^(+-n*x)
//       kind 2  g[x] = w_N^(+-x)             (x in [0, n))
//   * refresh factors rho[0][x] = w_{n*n}^((1-n)*x), rho[1][x] = w_{n*n}^((n-1)*x).
// Eight modular multipliers, one per slot.
//
// Twiddle factor for a slot holding tensor element (i, j, k):
//   column phase:  s[i] * r[j]                       (negacyclic pre/post twist)
//   row phase:     plane(j, k * n/m)                  = w_{n*m}^(+-j*k)
//   depth phase:   plane(i, j) * g[i]^k               = w_{n*n}^(+-i*j) * w_N^(+-i*k)
// The depth factors are built plane by plane: for k = 0 the plane is read and
// passed out while each value times g[i] is written to the buffer; for k > 0
// the buffer is read, passed out and overwritten with its product by g[i].
// Depth requests must therefore come k-major, each (i, j) once per plane.
//
// Inverse reuse (refresh): the plane is multiplied in place by rho[0][l2];
// afterwards the word at l1 holds w^(-(n-1-l1)*l2), so reading row n-1-l1
// gives the inverse plane w^(-l1*l2). A second refresh with rho[1] restores
// the forward plane. inv_layout tells which one is held. A refresh takes
// n*n/8 + 2 clocks.
//
// Timing: request (req_v and per-slot coordinates) in clock c, tf valid in
// clock c+1. The initial plane, the buffer, the seed registers and the
// refresh follow the source; the exact bank arrangement, the seed set
// (s, r for the twist that merges the negacyclic weighting, g for the depth
// planes) and the one-clock timing are this design's choices.
module tfg
  import ntt_pkg::*;
#(
  parameter int unsigned LN = LOG_N,
  parameter int unsigned W  = QW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  q,
  // configuration writes
  input  logic          cfg_we,
  input  logic [1:0]    cfg_sel,     // 0 plane (l1*n+l2), 1 seed, 2 refresh factor
  input  logic [15:0]   cfg_addr,
  input  logic [W-1:0]  cfg_data,
  // refresh
  input  logic          refresh_start,
  output logic          refresh_busy,
  output logic          inv_layout,
  // requests
  input  logic          req_v,
  input  phase_e        req_ph,
  input  logic          req_dir,     // 0 forward, 1 inverse
  input  logic [3:0]    log_m,
  input  logic [7:0]    req_i [8],
  input  logic [7:0]    req_j [8],
  input  logic [7:0]    req_k [8],
  output logic [W-1:0]  tf    [8]
);
  localparam int unsigned NN  = 1 << LN;
  localparam int unsigned IAW = 2 * LN - 3;      // n*n/8 words per bank
  localparam int unsigned ID  = 1 << IAW;

  // ---------------- storage ----------------
  // Seed registers, one read per clock per array. s and r are split into
  // four arrays by (x[msb], x[0]) and g into two by x[msb]: every access
  // pattern reads at most one word from each array (several slots may share
  // a word).
  localparam int unsigned SAW = LN + 4;          // {dir, lm[2:0], x}
  logic [W-1:0] seed_s [4][1 << (SAW - 2)];
  logic [W-1:0] seed_r [4][1 << (SAW - 2)];
  logic [W-1:0] seed_g [2][1 << (SAW - 1)];
  logic [W-1:0] rho    [2][NN];

  logic [2:0]    cf_kind;
  logic [3:0]    cf_dl;            // {dir, lm}
  logic [LN-1:0] cf_x;
  assign cf_kind = 3'(cfg_addr[LN+4:LN+3]);
  assign cf_dl   = {cfg_addr[LN+5], cfg_addr[LN+2:LN]};
  assign cf_x    = cfg_addr[LN-1:0];

  always_ff @(posedge clk)
    if (cfg_we && cfg_sel == 2'd1) begin
      unique case (cf_kind)
        3'd0: seed_s[{cf_x[LN-1], cf_x[0]}][{cf_dl, cf_x[LN-2:1]}] <= cfg_data;
        3'd1: seed_r[{cf_x[LN-1], cf_x[0]}][{cf_dl, cf_x[LN-2:1]}] <= cfg_data;
        3'd2: seed_g[cf_x[LN-1]][{cf_dl, cf_x[LN-2:0]}] <= cfg_data;
        default: ;
      endcase
    end

  always_ff @(posedge clk)
    if (cfg_we && cfg_sel == 2'd2) rho[cfg_addr[LN]][cfg_addr[LN-1:0]] <= cfg_data;

  // seed reads for the current request
  logic [W-1:0]  rd_s [4], rd_r [4], rd_g [2];
  logic [LN-3:0] sa [4], ra [4];
  logic [LN-2:0] ga [2];
  logic [W-1:0]  s_of [8], r_of [8];
  always_comb begin
    for (int b = 0; b < 4; b++) begin
      sa[b] = '0; ra[b] = '0;
    end
    ga[0] = '0; ga[1] = '0;
    for (int s = 0; s < 8; s++) begin
      sa[{req_i[s][LN-1], req_i[s][0]}] = req_i[s][LN-2:1];
      ra[{req_j[s][LN-1], req_j[s][0]}] = req_j[s][LN-2:1];
      ga[req_i[s][LN-1]]                = req_i[s][LN-2:0];
    end
    for (int b = 0; b < 4; b++) begin
      rd_s[b] = seed_s[b][{req_dir, log_m[2:0], sa[b]}];
      rd_r[b] = seed_r[b][{req_dir, log_m[2:0], ra[b]}];
    end
    for (int u = 0; u < 2; u++)
      rd_g[u] = seed_g[u][{req_dir, log_m[2:0], ga[u]}];
    for (int s = 0; s < 8; s++) begin
      s_of[s] = rd_s[{req_i[s][LN-1], req_i[s][0]}];
      r_of[s] = rd_r[{req_j[s][LN-1], req_j[s][0]}];
    end
  end

  // plane word location
  function automatic logic [2:0] pl_bank(input logic [7:0] l1, input logic [7:0] l2);
    return {l2[LN-1], l2[0], l1[LN-1]};
  endfunction
  function automatic logic [IAW-1:0] pl_addr(input logic [7:0] l1, input logic [7:0] l2);
    return IAW'((32'(l1) & (NN/2 - 1)) * (NN/4) + ((32'(l2) >> 1) & (NN/4 - 1)));
  endfunction

  // ---------------- refresh sequencer ----------------
  logic           rf_v, rf_v1, rf_v2;
  logic [IAW-1:0] rf_a, rf_a1, rf_a2;
  logic           rf_dir1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rf_v <= 1'b0; rf_v1 <= 1'b0; rf_v2 <= 1'b0;
      rf_a <= '0; rf_a1 <= '0; rf_a2 <= '0;
      inv_layout <= 1'b0; rf_dir1 <= 1'b0;
    end else begin
      if (refresh_start && !refresh_busy) begin
        rf_v <= 1'b1; rf_a <= '0;
      end else if (rf_v) begin
        rf_a <= rf_a + 1'b1;
        if (rf_a == IAW'(ID - 1)) rf_v <= 1'b0;
      end
      rf_v1 <= rf_v;  rf_a1 <= rf_a;  rf_dir1 <= inv_layout;
      rf_v2 <= rf_v1; rf_a2 <= rf_a1;
      if (rf_v2 && !rf_v1) inv_layout <= ~inv_layout;
    end

  assign refresh_busy = rf_v | rf_v1 | rf_v2;

  // With m = 1 there is no column phase; the row phase then applies the
  // twist s[i] * r[j] (the row factor w_{n*m}^(j*k) is 1 because k = 0).
  phase_e eph;
  assign eph = (req_ph == PH_ROW && log_m == 4'd0) ? PH_COL : req_ph;

  // ---------------- request decode ----------------
  logic [2:0]     ibank [8];
  logic [IAW-1:0] iaddr [8];
  logic [IAW-1:0] baddr [8];
  logic [IAW-1:0] bank_rd_addr [8];
  logic [W-1:0]   sig [8];

  always_comb begin
    for (int s = 0; s < 8; s++) begin
      logic [7:0] l1, l2;
      if (eph == PH_ROW) begin
        l1 = req_j[s];
        l2 = 8'(req_k[s] << (LN - 32'(log_m)));
      end else begin
        l1 = req_i[s];
        l2 = req_j[s];
      end
      if (inv_layout) l1 = 8'(NN - 1) - l1;
      ibank[s] = pl_bank(l1, l2);
      iaddr[s] = pl_addr(l1, l2);
      baddr[s] = pl_addr(req_i[s], req_j[s]);
      sig[s]   = rd_g[req_i[s][LN-1]];
    end
    for (int b = 0; b < 8; b++) begin
      bank_rd_addr[b] = rf_v ? rf_a : '0;
      if (!rf_v)
        for (int s = 0; s < 8; s++)
          if (ibank[s] == 3'(b)) bank_rd_addr[b] = iaddr[s];
    end
  end

  // ---------------- request pipeline ----------------
  logic           v1, v2, k0_1;
  phase_e         ph1;
  logic [2:0]     ibank1 [8];
  logic [IAW-1:0] baddr1 [8], baddr2 [8];
  logic [W-1:0]   sig1 [8];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; ph1 <= PH_NONE; k0_1 <= 1'b0;
    end else begin
      v1   <= req_v;
      ph1  <= eph;
      k0_1 <= (req_k[0] == 8'd0);
      v2   <= v1 && (ph1 == PH_DEPTH);
    end

  always_ff @(posedge clk) begin
    ibank1 <= ibank;
    baddr1 <= baddr;
    baddr2 <= baddr1;
    sig1   <= sig;
  end

  // ---------------- memories ----------------
  logic [W-1:0] pl_rd  [8];
  logic [W-1:0] buf_rd [8];
  logic [W-1:0] mm_p   [8];

  for (genvar b = 0; b < 8; b++) begin : g_bank
    logic [W-1:0]   plane [ID];
    logic [W-1:0]   bplane [ID];
    logic           pwe;
    logic [IAW-1:0] pwa;
    logic [W-1:0]   pwd;

    always_comb begin
      pwe = 1'b0; pwa = rf_a2; pwd = mm_p[b];
      if (rf_v2) pwe = 1'b1;
      else if (cfg_we && cfg_sel == 2'd0 &&
               pl_bank(8'(cfg_addr >> LN), 8'(cfg_addr & 16'(NN - 1))) == 3'(b)) begin
        pwe = 1'b1;
        pwa = pl_addr(8'(cfg_addr >> LN), 8'(cfg_addr & 16'(NN - 1)));
        pwd = cfg_data;
      end
    end

    always_ff @(posedge clk) begin
      if (pwe) plane[pwa] <= pwd;
      pl_rd[b] <= plane[bank_rd_addr[b]];
      if (v2) bplane[baddr2[b]] <= mm_p[b];
      buf_rd[b] <= bplane[baddr[b]];
    end
  end

  // ---------------- outputs and multipliers ----------------
  always_comb
    for (int s = 0; s < 8; s++) begin
      unique case (ph1)
        PH_COL:   tf[s] = mm_p[s];
        PH_ROW:   tf[s] = pl_rd[ibank1[s]];
        PH_DEPTH: tf[s] = k0_1 ? pl_rd[ibank1[s]] : buf_rd[s];
        default:  tf[s] = '0;
      endcase
    end

  for (genvar s = 0; s < 8; s++) begin : g_mm
    logic [W-1:0] ma, mb;
    logic [LN-1:0] l2r;
    always_comb begin
      // refresh: the word of bank s at address rf_a1 has l2 = {b[2], a mod n/4, b[1]}
      l2r = LN'((32'((s >> 2) & 1) << (LN - 1)) | ((32'(rf_a1) & (NN/4 - 1)) << 1) | 32'((s >> 1) & 1));
      if (rf_v1) begin
        ma = pl_rd[s];
        mb = rho[rf_dir1][l2r];
      end else if (v1 && ph1 == PH_DEPTH) begin
        ma = tf[s];
        mb = sig1[s];
      end else begin
        ma = s_of[s];
        mb = r_of[s];
      end
    end
    mod_mul #(.QW(W)) u_mm (.clk, .a(ma), .b(mb), .q, .p(mm_p[s]));
  end
endmodule
