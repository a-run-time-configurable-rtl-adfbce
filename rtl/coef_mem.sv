// coef_mem: coefficient memory, eight independent banks of n*n*n/8 words.
//
// Each bank has one synchronous read port (data one clock after the address)
// and one write port, so a phase can read the lines it streams into the PUs
// while writing back the lines coming out of them. Capacity is sized for the
// largest run-time configuration m = n (N = n^3 coefficients). Contents are
// not reset. Bank count and bank-per-PNTT-input pairing follow the source;
// the 1R1W port arrangement is this design's choice.
module coef_mem
  import ntt_pkg::*;
#(
  parameter int unsigned LN = LOG_N,
  parameter int unsigned W  = QW,
  parameter int unsigned AW = 3 * LN - 3
) (
  input  logic          clk,
  input  logic [AW-1:0] rd_addr [8],
  output logic [W-1:0]  rd_data [8],
  input  logic          wr_en   [8],
  input  logic [AW-1:0] wr_addr [8],
  input  logic [W-1:0]  wr_data [8]
);
  for (genvar b = 0; b < 8; b++) begin : g_bank
    logic [W-1:0] mem [1 << AW];
    always_ff @(posedge clk) begin
      if (wr_en[b]) mem[wr_addr[b]] <= wr_data[b];
      rd_data[b] <= mem[rd_addr[b]];
    end
  end
endmodule
