// tb_coef_mem: eight banks written and read independently (n = 8, 64 words
// per bank): fill every word with a random value, read everything back with
// one clock of read latency while other words are being rewritten in the
// same clocks.
module tb_coef_mem;
  localparam int LN = 3;
  localparam int W  = 60;
  localparam int AW = 3 * LN - 3;
  localparam int D  = 1 << AW;
  logic clk = 0;
  logic [AW-1:0] rd_addr [8], wr_addr [8];
  logic [W-1:0] rd_data [8], wr_data [8];
  logic wr_en [8];
  logic [W-1:0] ref_m [8][D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  coef_mem #(.LN(LN), .W(W), .AW(AW)) dut (.clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int b = 0; b < 8; b++) begin wr_en[b] = 0; rd_addr[b] = 0; wr_addr[b] = 0; wr_data[b] = 0; end
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      for (int b = 0; b < 8; b++) begin
        wr_en[b] = 1; wr_addr[b] = AW'((a * 5 + b) % D);
        wr_data[b] = W'({$urandom, $urandom}); ref_m[b][(a * 5 + b) % D] = wr_data[b];
      end
    end
    // read every word; in the same clocks rewrite a different word per bank
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      for (int b = 0; b < 8; b++) begin
        rd_addr[b] = AW'((a + 3 * b) % D);
        wr_en[b] = (a > 0);
        wr_addr[b] = AW'((a + 3 * b + D - 1) % D);   // word read one clock ago
        wr_data[b] = W'({$urandom, $urandom});
      end
      @(posedge clk);
      #1;
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (rd_data[b] != ref_m[b][(a + 3 * b) % D]) failures++;
        if (wr_en[b]) ref_m[b][(a + 3 * b + D - 1) % D] = wr_data[b];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
