// Shared body of the end-to-end testbenches of ntt3d_top. The including module
// defines localparams LN (log2 n), NLM, LMS[NLM] (the log2 m values to run),
// NCHK (number of forward outputs compared with a direct evaluation, 0 = all)
// and WATCHDOG (clocks, used by the including module's watchdog). For every m it loads a random polynomial, runs the
// forward transform, compares outputs with sum_l a_l psi^(l(2r+1)), runs the
// inverse and compares with the input, and checks the clock count against
// phases * N/8 plus a bounded drain per phase. It also counts how often each
// mechanism happened: column phase skipped (m = 1), PNTT stage bypass
// (1 < m < n), twiddle-plane refresh, inverse direction.
  import tb_util_pkg::*;
  localparam int NN = 1 << LN;
  localparam int W  = 60;

  logic clk = 0, rst_n = 0, start = 0, mode_inv = 0;
  logic [3:0] log_m = 0;
  logic busy, done;
  logic [31:0] cycles;
  logic host_en = 0, host_we = 0;
  logic [7:0] host_i = 0, host_j = 0, host_k = 0;
  logic [W-1:0] host_wdata = 0, host_rdata;
  logic cfg_we = 0;
  logic [1:0] cfg_sel = 0;
  logic [15:0] cfg_addr = 0;
  logic [W-1:0] cfg_data = 0;
  int checks = 0, failures = 0;
  int n_skip = 0, n_bypass = 0, n_refresh = 0, n_inv = 0;

  always #5 clk = ~clk;

  // the including module instantiates ntt3d_top as dut after this file

  // refresh events seen at the twiddle factor generator
  logic rb_q = 0;
  always @(posedge clk) begin
    rb_q <= dut.refresh_busy;
    if (dut.refresh_busy && !rb_q) n_refresh++;
  end

  task automatic cfg(input logic [1:0] sel, input int addr, input u64 val);
    @(negedge clk);
    cfg_we = 1; cfg_sel = sel; cfg_addr = 16'(addr); cfg_data = W'(val);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic hwrite(int i, int j, int k, u64 v);
    @(negedge clk);
    host_en = 1; host_we = 1; host_i = 8'(i); host_j = 8'(j); host_k = 8'(k); host_wdata = W'(v);
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic hread(int i, int j, int k, output u64 v);
    @(negedge clk);
    host_en = 1; host_we = 0; host_i = 8'(i); host_j = 8'(j); host_k = 8'(k);
    @(negedge clk);
    host_en = 0;
    v = u64'(host_rdata);
  endtask

  task automatic run_op(bit iv, int lm);
    int nph, nn;
    nn = NN * NN * (1 << lm);
    nph = (lm == 0) ? 2 : 3;
    @(negedge clk);
    start = 1; mode_inv = iv; log_m = 4'(lm);
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    // rate: each phase streams N/8 clocks; drain per phase bounded by the
    // pipeline depth (n/2 - 1 + 2 log n) plus a few clocks of control and
    // multiplier latency; a refresh adds n*n/8 + a few clocks
    checks++;
    if (cycles < 32'(nph * nn / 8) ||
        cycles > 32'(nph * (nn / 8 + NN / 2 + 2 * LN + 12) + NN * NN / 8 + 8)) begin
      failures++;
      $display("cycle count %0d out of range for lm=%0d inv=%0d", cycles, lm, iv);
    end
    $display("lm=%0d N=%0d inv=%0d cycles=%0d", lm, nn, iv, cycles);
  endtask

  initial begin
    u64 pmax, w_nn, p2n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pmax = root2k(3 * LN + 1);                 // primitive 2n^3-th root
    w_nn = powm(pmax, u64'(2 * NN));           // primitive n^2-th root
    p2n  = powm(pmax, u64'(NN * NN));          // primitive 2n-th root
    for (int e = 0; e < 2 * NN; e++) cfg(2'd3, e, powm(p2n, u64'(e)));
    for (int l1 = 0; l1 < NN; l1++)
      for (int l2 = 0; l2 < NN; l2++) cfg(2'd0, l1 * NN + l2, powm(w_nn, u64'(l1 * l2)));
    for (int x = 0; x < NN; x++) begin
      cfg(2'd2, x, powm(w_nn, u64'((NN * NN + 1 - NN) * x)));
      cfg(2'd2, NN + x, powm(w_nn, u64'((NN - 1) * x)));
    end
    for (int lm = 0; lm <= LN; lm++) begin
      u64 p2N, sv, rv, gv;
      p2N = powm(pmax, u64'(NN >> lm));        // primitive 2N-th root, N = n*n*2^lm
      for (int x = 0; x < NN; x++) begin
        sv = powm(p2N, u64'(x));
        rv = powm(p2N, u64'(NN * x));
        gv = powm(p2N, u64'(2 * x));
        for (int d = 0; d < 2; d++) begin
          int base;
          base = (d << (LN + 5)) | (lm << LN) | x;
          cfg(2'd1, base | (0 << (LN + 3)), d ? invm(sv) : sv);
          cfg(2'd1, base | (1 << (LN + 3)), d ? invm(rv) : rv);
          cfg(2'd1, base | (2 << (LN + 3)), d ? invm(gv) : gv);
        end
      end
    end

    for (int li = 0; li < NLM; li++) begin
      int lm, mm, nn, nchk;
      u64 p2N, v, acc;
      u64 a [];
      lm = LMS[li];
      mm = 1 << lm;
      nn = NN * NN * mm;
      p2N = powm(pmax, u64'(NN >> lm));
      a = new[nn];
      log_m = 4'(lm);          // the host port uses the layout of this size
      for (int l = 0; l < nn; l++) begin
        a[l] = {$urandom, $urandom} % Q;
        hwrite(l % NN, (l / NN) % NN, l / (NN * NN), a[l]);
      end
      if (lm == 0) n_skip++;
      if (lm > 0 && lm < LN) n_bypass++;
      run_op(1'b0, lm);
      // forward results: A_r at (i, j, k) with r = k + m*j + m*n*i
      nchk = (NCHK == 0) ? nn : NCHK;
      for (int c = 0; c < nchk; c++) begin
        int r, i, j, k;
        u64 ex, step, wpow;
        r = (NCHK == 0) ? c : int'($urandom % nn);
        k = r % mm; j = (r / mm) % NN; i = r / (mm * NN);
        hread(i, j, k, v);
        ex = 0;
        step = powm(p2N, u64'(2 * r + 1));
        wpow = 1;
        for (int l = 0; l < nn; l++) begin
          ex = addm(ex, mulm(a[l], wpow));
          wpow = mulm(wpow, step);
        end
        checks++;
        if (v != ex) begin
          failures++;
          if (failures < 8) $display("NTT mismatch lm=%0d r=%0d got %h exp %h", lm, r, v, ex);
        end
      end
      run_op(1'b1, lm);
      n_inv++;
      for (int l = 0; l < nn; l++) begin
        hread(l % NN, (l / NN) % NN, l / (NN * NN), v);
        checks++;
        if (v != a[l]) begin
          failures++;
          if (failures < 8) $display("INTT mismatch lm=%0d l=%0d got %h exp %h", lm, l, v, a[l]);
        end
      end
    end
    $display("mechanisms: column-skip=%0d stage-bypass=%0d refresh=%0d inverse=%0d",
             n_skip, n_bypass, n_refresh, n_inv);
    checks++;
    if (NLM > 1 && (n_skip == 0 || n_bypass == 0)) failures++;
    checks++;
    if (n_refresh == 0 || n_inv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
