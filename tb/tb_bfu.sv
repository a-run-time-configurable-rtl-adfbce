// tb_bfu: Cooley-Tukey and Gentleman-Sande butterflies on random operands,
// streamed one per clock, checked two clocks later.
module tb_bfu;
  import tb_util_pkg::*;
  localparam int W = 60;
  logic clk = 0, inv = 0;
  logic [W-1:0] a = 0, b = 0, w = 0, x, y;
  int checks = 0, failures = 0;
  u64 ha [$], hb [$], hw [$];
  always #5 clk = ~clk;
  bfu #(.W(W)) dut (.clk, .inv, .q(W'(Q)), .a, .b, .w, .x, .y);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    u64 i2;
    i2 = invm(2);
    for (int md = 0; md < 2; md++) begin
      inv = md[0];
      ha.delete(); hb.delete(); hw.delete();
      for (int t = 0; t < 1000 + 2; t++) begin
        @(negedge clk);
        if (t >= 2) begin
          u64 ea, eb, ew, ex, ey;
          ea = ha.pop_front(); eb = hb.pop_front(); ew = hw.pop_front();
          if (!inv) begin ex = addm(ea, mulm(ew, eb)); ey = subm(ea, mulm(ew, eb)); end
          else begin ex = mulm(addm(ea, eb), i2); ey = mulm(mulm(subm(ea, eb), ew), i2); end
          checks += 2;
          if (u64'(x) != ex || u64'(y) != ey) begin
            failures++;
            $display("mismatch inv=%0d got %h %h exp %h %h", inv, x, y, ex, ey);
          end
        end
        a = W'({$urandom, $urandom} % Q); b = W'({$urandom, $urandom} % Q); w = W'({$urandom, $urandom} % Q);
        ha.push_back(u64'(a)); hb.push_back(u64'(b)); hw.push_back(u64'(w));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
