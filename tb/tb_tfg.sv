// tb_tfg: twiddle factor generator at n = 8. Seeds, plane and refresh factors
// are loaded as in the top-level tests, then for every m = 1..8 and both
// directions the column, row and depth request patterns are issued one per
// clock and each factor is compared one clock later with its closed form:
//   column psi^(i+n*j), row w_{nm}^(j*k) (m = 1: the column form),
//   depth w_{nn}^(i*j) * w_N^(i*k), inverses for the inverse direction.
// The inverse direction is reached through a refresh of the plane, whose
// length (n*n/8 + 2 clocks) is checked, and a second refresh restores it.
module tb_tfg;
  import tb_util_pkg::*;
  import ntt_pkg::*;
  localparam int LN = 3;
  localparam int NN = 1 << LN;
  localparam int W  = 60;
  logic clk = 0, rst_n = 0, cfg_we = 0, refresh_start = 0, refresh_busy, inv_layout;
  logic [1:0] cfg_sel = 0;
  logic [15:0] cfg_addr = 0;
  logic [W-1:0] cfg_data = 0;
  logic req_v = 0, req_dir = 0;
  phase_e req_ph = PH_NONE;
  logic [3:0] log_m = 0;
  logic [7:0] req_i [8], req_j [8], req_k [8];
  logic [W-1:0] tf [8];
  int checks = 0, failures = 0;
  u64 pmax, w_nn;

  always #5 clk = ~clk;
  tfg #(.LN(LN), .W(W)) dut (.*, .q(W'(Q)));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input logic [1:0] sel, input int addr, input u64 val);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_addr = 16'(addr); cfg_data = W'(val);
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic u64 expect_tf(int ph, int dir, int lm, int i, int j, int k);
    u64 p2N, v;
    p2N = powm(pmax, u64'(NN >> lm));
    if (ph == 0 || (ph == 1 && lm == 0)) v = powm(p2N, u64'(i + NN * j));
    else if (ph == 1) v = powm(w_nn, u64'(j * k * (NN >> lm)));
    else v = mulm(powm(w_nn, u64'(i * j)), powm(p2N, u64'(2 * i * k)));
    return dir ? invm(v) : v;
  endfunction

  // issue one request, check it one clock later
  task automatic req(int ph, int dir, int lm, int ci [8], int cj [8], int ck [8]);
    @(negedge clk);
    req_v = 1; req_ph = phase_e'(ph); req_dir = dir[0]; log_m = 4'(lm);
    for (int s = 0; s < 8; s++) begin
      req_i[s] = 8'(ci[s]); req_j[s] = 8'(cj[s]); req_k[s] = 8'(ck[s]);
    end
    @(negedge clk);
    req_v = 0;
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (u64'(tf[s]) != expect_tf(ph, dir, lm, ci[s], cj[s], ck[s])) begin
        failures++;
        if (failures < 10) $display("mismatch ph=%0d dir=%0d lm=%0d s=%0d (%0d,%0d,%0d) got %h exp %h",
          ph, dir, lm, s, ci[s], cj[s], ck[s], tf[s], expect_tf(ph, dir, lm, ci[s], cj[s], ck[s]));
      end
    end
  endtask

  task automatic phases(int dir);
    int ci [8], cj [8], ck [8];
    for (int lm = 0; lm <= LN; lm++) begin
      int mm = 1 << lm;
      // column: plane i, four j, k = t and t + m/2
      if (lm > 0)
        for (int c = 0; c < 8; c++) begin
          int i = $urandom % NN, jm = $urandom % (NN / 4), t = $urandom % (mm / 2);
          for (int s = 0; s < 8; s++) begin
            ci[s] = i; cj[s] = ((s >> 2) << (LN - 1)) | (jm << 1) | ((s >> 1) & 1);
            ck[s] = t + (s & 1) * (mm / 2);
          end
          req(0, dir, lm, ci, cj, ck);
        end
      // row: four i, j = t and t + n/2, one k
      for (int c = 0; c < 8; c++) begin
        int im = $urandom % (NN / 4), t = $urandom % (NN / 2), k = $urandom % mm;
        for (int s = 0; s < 8; s++) begin
          ci[s] = ((s >> 2) << (LN - 1)) | (im << 1) | ((s >> 1) & 1);
          cj[s] = t + (s & 1) * (NN / 2); ck[s] = k;
        end
        req(1, dir, lm, ci, cj, ck);
      end
      // depth: every plane k in order, every (i, j) once per plane
      for (int k = 0; k < mm; k++)
        for (int jm = 0; jm < NN / 4; jm++)
          for (int t = 0; t < NN / 2; t++) begin
            for (int s = 0; s < 8; s++) begin
              cj[s] = ((s >> 2) << (LN - 1)) | (jm << 1) | ((s >> 1) & 1);
              ci[s] = t + (s & 1) * (NN / 2); ck[s] = k;
            end
            req(2, dir, lm, ci, cj, ck);
          end
    end
  endtask

  task automatic refresh(int expect_layout);
    int len;
    @(negedge clk);
    refresh_start = 1;
    @(negedge clk);
    refresh_start = 0;
    len = 1;
    while (refresh_busy) begin @(negedge clk); len++; end
    checks += 2;
    if (len != NN * NN / 8 + 3) begin failures++; $display("refresh length %0d", len); end
    if (inv_layout != expect_layout[0]) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    pmax = root2k(3 * LN + 1);
    w_nn = powm(pmax, u64'(2 * NN));
    for (int l1 = 0; l1 < NN; l1++)
      for (int l2 = 0; l2 < NN; l2++) cfg(2'd0, l1 * NN + l2, powm(w_nn, u64'(l1 * l2)));
    for (int x = 0; x < NN; x++) begin
      cfg(2'd2, x, powm(w_nn, u64'((NN * NN + 1 - NN) * x)));
      cfg(2'd2, NN + x, powm(w_nn, u64'((NN - 1) * x)));
    end
    for (int lm = 0; lm <= LN; lm++) begin
      u64 p2N, v [3];
      p2N = powm(pmax, u64'(NN >> lm));
      for (int x = 0; x < NN; x++) begin
        v[0] = powm(p2N, u64'(x)); v[1] = powm(p2N, u64'(NN * x)); v[2] = powm(p2N, u64'(2 * x));
        for (int d = 0; d < 2; d++)
          for (int kd = 0; kd < 3; kd++)
            cfg(2'd1, (d << (LN + 5)) | (kd << (LN + 3)) | (lm << LN) | x, d ? invm(v[kd]) : v[kd]);
      end
    end
    phases(0);
    refresh(1);
    phases(1);
    refresh(0);
    phases(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
