// tb_util_pkg: reference arithmetic for the testbenches, written independently
// of the RTL: modular multiply/power/inverse on 128-bit integers, a search for
// primitive 2^k-th roots of unity, and the modulus used by all tests,
// q = 0x0FFFFFFFFE400001 (prime, q = 1 mod 2^20, below 2^60).
package tb_util_pkg;
  typedef logic [63:0] u64;
  localparam u64 Q = 64'h0FFFFFFFFE400001;

  function automatic u64 mulm(u64 a, u64 b);
    logic [127:0] p;
    p = 128'(a) * 128'(b);
    return u64'(p % 128'(Q));
  endfunction

  function automatic u64 addm(u64 a, u64 b);
    return u64'((128'(a) + 128'(b)) % 128'(Q));
  endfunction

  function automatic u64 subm(u64 a, u64 b);
    return u64'((128'(a) + 128'(Q) - 128'(b)) % 128'(Q));
  endfunction

  function automatic u64 powm(u64 b, u64 e);
    u64 r;
    r = 1;
    while (e != 0) begin
      if (e[0]) r = mulm(r, b);
      b = mulm(b, b);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic u64 invm(u64 a);
    return powm(a, Q - 2);
  endfunction

  // primitive (2^lg)-th root of unity, lg <= 20
  function automatic u64 root2k(int lg);
    u64 x, r;
    x = 3;
    forever begin
      r = powm(x, (Q - 1) >> lg);
      if (lg == 0) return 1;
      if (powm(r, u64'(1) << (lg - 1)) == Q - 1) return r;
      x = x + 1;
    end
  endfunction

  function automatic int brv(int x, int w);
    int r;
    r = 0;
    for (int b = 0; b < w; b++) if (x[b]) r = r | (1 << (w - 1 - b));
    return r;
  endfunction
endpackage
