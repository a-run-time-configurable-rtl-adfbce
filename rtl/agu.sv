// agu: address generation for one position of the coefficient stream.
//
// A phase streams groups of four lines ("quads"), one line per PNTT, each line
// taking sz/2 clocks (sz = m for the column phase, n otherwise); pos is the
// position in the line (t, or the bit-reversed output index on the write
// side). Slot s = 2p + u feeds PNTT p, u = 0 upper input (element pos),
// u = 1 lower input (element pos + sz/2). The four lines of a quad are:
//   column (along k):  plane i = quad / (n/4), j = {p[1], quad mod n/4, p[0]}
//   row    (along j):  k = quad mod m, i = {p[1], quad / m, p[0]}
//   depth  (along i):  k = quad / (n/4), j = {p[1], quad mod n/4, p[0]}
// (depth quads run plane k by plane k, which the twiddle factor generator
// relies on). The element coordinates are mapped to bank and address with
// cm_bank/cm_addr from ntt_pkg; bank_addr/slot_sel/bank_sel give the same
// information per bank for the memory and its two multiplexer networks.
// The bank mapping is this design's own; the source describes its pattern only
// for one example size. Purely combinational.
module agu
  import ntt_pkg::*;
#(
  parameter int unsigned LN = LOG_N,
  parameter int unsigned AW = 3 * LN - 3
) (
  input  phase_e        phase,
  input  logic [3:0]    log_m,
  input  logic [15:0]   quad,
  input  logic [7:0]    pos,
  output logic [7:0]    ci [8],
  output logic [7:0]    cj [8],
  output logic [7:0]    ck [8],
  output logic [2:0]    slot_bank [8],   // bank read/written by slot s
  output logic [AW-1:0] bank_addr [8],   // address presented to bank b
  output logic [2:0]    bank_slot [8]    // slot served by bank b
);
  localparam int unsigned NQ = 1 << (LN - 2);   // n/4

  logic [23:0] saddr [8];

  always_comb begin
    for (int s = 0; s < 8; s++) begin
      logic p1, p0, u;
      logic [15:0] mid;
      p1 = s[2]; p0 = s[1]; u = s[0];
      ci[s] = '0; cj[s] = '0; ck[s] = '0;
      unique case (phase)
        PH_COL: begin
          mid   = quad & 16'(NQ - 1);
          ci[s] = 8'(quad >> (LN - 2));
          cj[s] = 8'((16'(p1) << (LN - 1)) | (mid << 1) | 16'(p0));
          ck[s] = 8'(16'(pos) + (u ? (16'd1 << (log_m - 1)) : 16'd0));
        end
        PH_ROW: begin
          mid   = quad >> log_m;
          ck[s] = 8'(quad & ((16'd1 << log_m) - 16'd1));
          ci[s] = 8'((16'(p1) << (LN - 1)) | (mid << 1) | 16'(p0));
          cj[s] = 8'(16'(pos) + (u ? 16'(1 << (LN - 1)) : 16'd0));
        end
        PH_DEPTH: begin
          mid   = quad & 16'(NQ - 1);
          ck[s] = 8'(quad >> (LN - 2));
          cj[s] = 8'((16'(p1) << (LN - 1)) | (mid << 1) | 16'(p0));
          ci[s] = 8'(16'(pos) + (u ? 16'(1 << (LN - 1)) : 16'd0));
        end
        default: mid = '0;
      endcase
      slot_bank[s] = cm_bank(ci[s], cj[s], ck[s], log_m, LN);
      saddr[s]     = cm_addr(ci[s], cj[s], ck[s], log_m, LN);
    end
    for (int b = 0; b < 8; b++) begin
      bank_addr[b] = '0;
      bank_slot[b] = '0;
      for (int s = 0; s < 8; s++)
        if (slot_bank[s] == 3'(b)) begin
          bank_addr[b] = AW'(saddr[s]);
          bank_slot[b] = 3'(s);
        end
    end
  end
endmodule
