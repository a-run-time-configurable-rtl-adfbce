// tb_mod_mul: random and corner operands against a 128-bit reference, one
// clock of latency, one result per clock.
module tb_mod_mul;
  import tb_util_pkg::*;
  localparam int W = 60;
  logic clk = 0;
  logic [W-1:0] a = 0, b = 0, p;
  int checks = 0, failures = 0;
  u64 ea, eb;
  always #5 clk = ~clk;
  mod_mul #(.QW(W)) dut (.clk, .a, .b, .q(W'(Q)), .p);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t == 0)      begin ea = Q - 1; eb = Q - 1; end
      else if (t == 1) begin ea = 0;     eb = Q - 1; end
      else if (t == 2) begin ea = 1;     eb = Q - 2; end
      else begin ea = {$urandom, $urandom} % Q; eb = {$urandom, $urandom} % Q; end
      a = W'(ea); b = W'(eb);
      @(negedge clk);
      checks++;
      if (u64'(p) != mulm(ea, eb)) begin
        failures++;
        $display("mismatch %h * %h got %h", ea, eb, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
