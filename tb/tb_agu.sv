// tb_agu: exhaustive check of the address generator at n = 8 for m = 1..8 and
// all three phases: every clock's eight slots hit eight different banks, the
// per-bank view agrees with the per-slot view, slot pairs are the two elements
// pos and pos + sz/2 of one line, every tensor element is visited exactly once
// per phase, and no two elements share a (bank, address) word.
module tb_agu;
  import ntt_pkg::*;
  localparam int LN = 3;
  localparam int NN = 8;
  localparam int AW = 3 * LN - 3;

  phase_e phase;
  logic [3:0] log_m;
  logic [15:0] quad;
  logic [7:0] pos;
  logic [7:0] ci [8], cj [8], ck [8];
  logic [2:0] slot_bank [8], bank_slot [8];
  logic [AW-1:0] bank_addr [8];
  int checks = 0, failures = 0;

  agu #(.LN(LN), .AW(AW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lm = 0; lm <= LN; lm++)
      for (int ph = 0; ph < 3; ph++) begin
        int mm, sz, nn, half, seen [], word [];
        if (ph == 0 && lm == 0) continue;
        mm = 1 << lm; nn = NN * NN * mm;
        sz = (ph == 0) ? mm : NN; half = sz / 2;
        seen = new[nn]; word = new[8 << AW];
        for (int c = 0; c < nn / 8; c++) begin
          int used;
          phase = phase_e'(ph); log_m = 4'(lm);
          quad = 16'(c / half); pos = 8'(c % half);
          #1;
          used = 0;
          for (int s = 0; s < 8; s++) begin
            int l, wi;
            used |= 1 << slot_bank[s];
            l = ci[s] + NN * cj[s] + NN * NN * ck[s];
            checks++;
            if (ci[s] >= NN || cj[s] >= NN || ck[s] >= mm || seen[l] != 0) begin
              failures++; $display("bad element ph=%0d lm=%0d c=%0d s=%0d", ph, lm, c, s);
            end else seen[l] = 1;
            wi = (int'(slot_bank[s]) << AW) | int'(bank_addr[slot_bank[s]]);
            checks++;
            if (bank_slot[slot_bank[s]] != 3'(s) || word[wi] != 0) begin
              failures++; $display("bad word ph=%0d lm=%0d c=%0d s=%0d", ph, lm, c, s);
            end else word[wi] = 1 + l;
            if (s[0]) begin
              int ax_u, ax_l;
              ax_u = (ph == 0) ? ck[s-1] : (ph == 1) ? cj[s-1] : ci[s-1];
              ax_l = (ph == 0) ? ck[s]   : (ph == 1) ? cj[s]   : ci[s];
              checks++;
              if (ax_u != int'(pos) || ax_l != int'(pos) + half ||
                  (ph != 0 && ck[s] != ck[s-1]) || (ph != 1 && cj[s] != cj[s-1]) ||
                  (ph != 2 && ci[s] != ci[s-1])) begin
                failures++; $display("bad pair ph=%0d lm=%0d c=%0d s=%0d", ph, lm, c, s);
              end
            end
          end
          checks++;
          if (used != 255) begin
            failures++; $display("bank conflict ph=%0d lm=%0d c=%0d", ph, lm, c);
          end
        end
      end
    // same (i, j, k) must map to the same word in every phase: compare the
    // layout functions with the per-phase results through a second pass
    for (int lm = 0; lm <= LN; lm++) begin
      automatic int mm = 1 << lm;
      for (int l = 0; l < NN * NN * mm; l++) begin
        automatic int i = l % NN, j = (l / NN) % NN, k = l / (NN * NN);
        for (int l2 = l + 1; l2 < NN * NN * mm; l2++) begin
          automatic int i2 = l2 % NN, j2 = (l2 / NN) % NN, k2 = l2 / (NN * NN);
          if (cm_bank(8'(i), 8'(j), 8'(k), 4'(lm), LN) == cm_bank(8'(i2), 8'(j2), 8'(k2), 4'(lm), LN) &&
              cm_addr(8'(i), 8'(j), 8'(k), 4'(lm), LN) == cm_addr(8'(i2), 8'(j2), 8'(k2), 4'(lm), LN)) begin
            failures++;
            $display("alias lm=%0d l=%0d l2=%0d", lm, l, l2);
          end
        end
        checks++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
