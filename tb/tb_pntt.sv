// tb_pntt: self-checking test of the pipelined NTT unit at n = 32.
// For every size 2 .. 32, both directions and both cyclic/negacyclic forms it
// streams four transforms back to back, compares every output pair with a
// direct O(sz^2) evaluation in bit-reversed order, and checks that the first
// output of a full-size transform appears n/2 - 1 + 2*log2(n) clocks after the
// first input. A last pair of runs switches from size 2 straight to size n
// with no idle clocks beyond the drain, so words left in the commutators of
// stages that were bypassed must not reappear as output.
module tb_pntt;
  import tb_util_pkg::*;
  localparam int LN = 5;
  localparam int N  = 1 << LN;
  localparam int W  = 60;
  localparam int NT = 4;

  logic clk = 0, rst_n = 0, clear = 0, inv = 0, neg = 0;
  logic [3:0] log_sz = 0;
  logic tw_we = 0;
  logic [LN:0] tw_addr = 0;
  logic [W-1:0] tw_data = 0, in_u = 0, in_l = 0, out_u, out_l;
  logic in_v = 0, out_v;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pntt #(.LN(LN), .W(W)) dut (.clk, .rst_n, .clear, .inv, .neg, .log_sz, .q(W'(Q)),
    .tw_we, .tw_addr, .tw_data, .in_u, .in_l, .in_v, .out_u, .out_l, .out_v);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  u64 x  [NT][N];
  u64 y  [NT][N];
  int ocnt, icyc, ocyc;

  // output checker
  always @(posedge clk) if (out_v) begin
    automatic int sz = 1 << log_sz;
    automatic int tr = ocnt / (sz / 2);
    automatic int c  = ocnt % (sz / 2);
    automatic int r  = (sz > 2) ? brv(c, log_sz - 1) : 0;
    if (ocnt == 0) ocyc = $time / 10;
    checks += 2;
    if (out_u != W'(y[tr][r]) || out_l != W'(y[tr][r + sz/2])) begin
      failures++;
      if (failures < 10) $display("mismatch sz=%0d inv=%0d neg=%0d tr=%0d c=%0d got %h %h exp %h %h",
        sz, inv, neg, tr, c, out_u, out_l, y[tr][r], y[tr][r + sz/2]);
    end
    ocnt++;
  end

  task automatic run(int lsz, bit iv, bit ng, bit tight = 0);
    int sz;
    u64 psi, om, sc, t, acc;
    sz = 1 << lsz;
    psi = powm(root2k(LN + 1), u64'(N / sz));    // primitive 2sz-th root
    om  = mulm(psi, psi);
    sc  = invm(u64'(sz));
    for (int tr = 0; tr < NT; tr++) begin
      for (int l = 0; l < sz; l++) x[tr][l] = {$urandom, $urandom} % Q;
      for (int r = 0; r < sz; r++) begin
        acc = 0;
        for (int l = 0; l < sz; l++) begin
          if (!iv) t = ng ? powm(psi, u64'(l * (2 * r + 1))) : powm(om, u64'(l * r));
          else     t = ng ? invm(powm(psi, u64'(r * (2 * l + 1)))) : invm(powm(om, u64'(l * r)));
          acc = addm(acc, mulm(x[tr][l], t));
        end
        y[tr][r] = iv ? mulm(acc, sc) : acc;
      end
    end
    @(negedge clk);
    log_sz = 4'(lsz); inv = iv; neg = ng; clear = 1;
    @(negedge clk);
    clear = 0; ocnt = 0;
    icyc = $time / 10;
    for (int tr = 0; tr < NT; tr++)
      for (int t2 = 0; t2 < sz / 2; t2++) begin
        in_v = 1; in_u = W'(x[tr][t2]); in_l = W'(x[tr][t2 + sz/2]);
        @(negedge clk);
      end
    in_v = 0;
    if (tight) begin
      for (int w = 0; w < 40 && ocnt != NT * sz / 2; w++) @(negedge clk);
      @(negedge clk);
    end else repeat (40) @(negedge clk);
    checks++;
    if (ocnt != NT * sz / 2) begin
      failures++;
      $display("count sz=%0d got %0d", sz, ocnt);
    end
    if (lsz == LN) begin
      checks++;
      if (ocyc - icyc != N / 2 - 1 + 2 * LN) begin
        failures++;
        $display("latency %0d", ocyc - icyc);
      end
    end
  endtask

  initial begin
    u64 p2n;
    p2n = root2k(LN + 1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 2 * N; e++) begin
      tw_we = 1; tw_addr = (LN+1)'(e); tw_data = W'(powm(p2n, u64'(e)));
      @(negedge clk);
    end
    tw_we = 0;
    for (int lsz = 1; lsz <= LN; lsz++)
      for (int iv = 0; iv < 2; iv++)
        for (int ng = 0; ng < 2; ng++)
          run(lsz, iv[0], ng[0]);
    run(1, 1'b0, 1'b1, 1'b1);
    run(LN, 1'b0, 1'b0, 1'b1);
    run(1, 1'b1, 1'b1, 1'b1);
    run(LN, 1'b1, 1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
