// Shared testbench helpers for the RNS blocks (included inside a module
// after "import rns_pkg::*;"). They give an independent reference: residues
// are formed with the % operator on wide integers, and residue vectors are
// turned back into integers with a Chinese-remainder reconstruction whose
// inverses are computed here by exponentiation, not taken from rns_pkg.

  // a*b mod m for 128-bit values
  function automatic logic [127:0] u_mulm(input logic [127:0] a, input logic [127:0] b,
                                          input logic [127:0] m);
    logic [255:0] p;
    p = 256'(a) * 256'(b);
    return 128'(p % 256'(m));
  endfunction
  function automatic logic [127:0] u_powm(input logic [127:0] a, input logic [127:0] e,
                                          input logic [127:0] m);
    logic [127:0] r, x;
    r = 128'd1 % m; x = a % m;
    for (int i = 0; i < 128; i++) begin
      if (e[i]) r = u_mulm(r, x, m);
      x = u_mulm(x, x, m);
    end
    return r;
  endfunction
  // mod-M helpers
  function automatic logic [127:0] mm(input logic [127:0] a, input logic [127:0] b);
    return u_mulm(a, b, SYS_M);
  endfunction
  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
  // all nine residues of x
  function automatic rns_t to_rns(input logic [255:0] x);
    rns_t r;
    for (int c = 0; c < NCH; c++) r[c] = 32'(x % 256'(MODS[c]));
    return r;
  endfunction
  // base-1 dynamic range D
  function automatic logic [255:0] u_d1();
    logic [255:0] d;
    d = 256'd1;
    for (int i = 0; i < KB; i++) d = d * 256'(MODS[i]);
    return d;
  endfunction
  // integer in [0, D) with the given base-1 residues (CRT); the inverses
  // |D_i^-1|_i are computed on first use and kept
  logic [127:0] u_crt_inv [KB];
  bit           u_crt_ready = 1'b0;
  function automatic logic [255:0] from_rns1(input rns_t r);
    logic [255:0] d, di, s;
    logic [127:0] sig;
    d = u_d1();
    s = '0;
    for (int i = 0; i < KB; i++) begin
      di = d / 256'(MODS[i]);
      if (!u_crt_ready)
        u_crt_inv[i] = u_powm(128'(di % 256'(MODS[i])), 128'(MODS[i]) - 128'd2, 128'(MODS[i]));
      sig = u_mulm(128'(r[i]), u_crt_inv[i], 128'(MODS[i]));
      s   = s + 256'(sig) * di;
    end
    u_crt_ready = 1'b1;
    return s % d;
  endfunction
  // true when every channel of r is the residue of the same integer < D
  function automatic bit rns_consistent(input rns_t r);
    return to_rns(from_rns1(r)) == r;
  endfunction
