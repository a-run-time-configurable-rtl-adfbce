// tb_xbar8: random permutations and random (repeating) selects.
module tb_xbar8;
  localparam int W = 60;
  logic [W-1:0] din [8], dout [8];
  logic [2:0] sel [8];
  int checks = 0, failures = 0;
  xbar8 #(.W(W)) dut (.din, .sel, .dout);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 500; t++) begin
      int perm [8];
      for (int i = 0; i < 8; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < 8; i++) begin
        din[i] = W'({$urandom, $urandom});
        sel[i] = (t % 2 == 0) ? 3'(perm[i]) : 3'($urandom % 8);
      end
      #1;
      for (int o = 0; o < 8; o++) begin
        checks++;
        if (dout[o] != din[sel[o]]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
