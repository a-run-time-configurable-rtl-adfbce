// tb_mmg: the multiplier group multiplies both coefficients by their twiddle
// factors with one clock of latency and passes the valid bit along.
module tb_mmg;
  import tb_util_pkg::*;
  localparam int W = 60;
  logic clk = 0, rst_n = 0, in_v = 0, out_v;
  logic [W-1:0] in_u = 0, in_l = 0, tf_u = 0, tf_l = 0, out_u, out_l;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mmg #(.W(W)) dut (.clk, .rst_n, .q(W'(Q)), .in_u, .in_l, .in_v, .tf_u, .tf_l, .out_u, .out_l, .out_v);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    u64 eu, el;
    bit ev;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      in_u = W'({$urandom, $urandom} % Q); in_l = W'({$urandom, $urandom} % Q);
      tf_u = W'({$urandom, $urandom} % Q); tf_l = W'({$urandom, $urandom} % Q);
      in_v = $urandom % 2;
      eu = mulm(u64'(in_u), u64'(tf_u)); el = mulm(u64'(in_l), u64'(tf_l)); ev = in_v;
      @(negedge clk);
      checks += 3;
      if (u64'(out_u) != eu) failures++;
      if (u64'(out_l) != el) failures++;
      if (out_v != ev) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
