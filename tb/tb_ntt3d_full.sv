// tb_ntt3d_full: the accelerator at its default size (n = 64, 60-bit
// coefficients) running one forward and one inverse transform with m = 1,
// N = 4096: 64 randomly chosen forward outputs are compared with a direct
// evaluation, every coefficient after the inverse with the input, and the
// clock counts are checked.
module tb_ntt3d_full;
  localparam int LN = 6;
  localparam int NLM = 1;
  localparam int LMS [NLM] = '{0};
  localparam int NCHK = 64;
  localparam int WATCHDOG = 3000000;
  `include "ntt3d_tb_body.svh"

  // watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  ntt3d_top dut (.clk, .rst_n, .q(W'(Q)), .start, .mode_inv, .log_m, .busy, .done,
    .cycles, .host_en, .host_we, .host_i, .host_j, .host_k, .host_wdata, .host_rdata,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_data);
endmodule
