// tb_ntt3d_top: end-to-end test of the accelerator at n = 8 for every run-time
// size m = 1, 2, 4, 8 (N = 64 .. 512): forward results against a direct
// evaluation of every output, inverse back to the input, clock counts, and
// coverage of column skip, stage bypass, refresh and inverse direction.
module tb_ntt3d_top;
  localparam int LN = 3;
  localparam int NLM = 4;
  localparam int LMS [NLM] = '{0, 1, 2, 3};
  localparam int NCHK = 0;
  localparam int WATCHDOG = 2000000;
  `include "ntt3d_tb_body.svh"

  // watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  ntt3d_top #(.LN(LN)) dut (.clk, .rst_n, .q(W'(Q)), .start, .mode_inv, .log_m, .busy, .done,
    .cycles, .host_en, .host_we, .host_i, .host_j, .host_k, .host_wdata, .host_rdata,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_data);
endmodule
