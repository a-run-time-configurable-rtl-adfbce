// tb_ntt3d_workloads: the accelerator at its default size (n = 64, 60-bit
// coefficients) over every run-time size of the evaluation, m = 1 .. 64
// (N = 2^12 .. 2^18): forward and inverse per size, 16 random forward outputs
// compared with a direct evaluation, every coefficient after the inverse
// compared with the input, clock counts printed and bounded.
module tb_ntt3d_workloads;
  localparam int LN = 6;
  localparam int NLM = 7;
  localparam int LMS [NLM] = '{0, 1, 2, 3, 4, 5, 6};
  localparam int NCHK = 16;
  localparam int WATCHDOG = 8000000;
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
