// rsa_ref_pkg: reference arithmetic for the RSA testbenches.
//
// Plain software models, written independently of the RTL, on 64-bit
// integers (enough for keys of up to 32 bits): primality by trial division,
// gcd, modular inverse, modular exponentiation by repeated multiplication
// with a binary ladder, the Montgomery product by its definition
// a*b*R^-1 mod n, and the step counts of Euclid's and the extended Euclid
// algorithm that the RTL timing depends on.
package rsa_ref_pkg;

  typedef longint unsigned u64;

  function automatic bit is_prime(u64 x);
    if (x < 2) return 0;
    for (u64 k = 2; k * k <= x; k++) if (x % k == 0) return 0;
    return 1;
  endfunction

  function automatic u64 gcd(u64 a, u64 b);
    while (b != 0) begin
      u64 t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Inverse of a mod m (gcd(a, m) = 1), by the extended algorithm on signed
  // values, normalised into 0..m-1.
  function automatic u64 mod_inverse(u64 a, u64 m);
    longint r0 = longint'(m), r1 = longint'(a % m);
    longint s0 = 0, s1 = 1;
    while (r1 != 0) begin
      longint qq = r0 / r1;
      longint t;
      t = r0 - qq * r1; r0 = r1; r1 = t;
      t = s0 - qq * s1; s0 = s1; s1 = t;
    end
    if (s0 < 0) s0 += longint'(m);
    return u64'(s0);
  endfunction

  // Number of update steps of the extended Euclid loop run until the
  // remainder reaches 1 (the loop condition of the hardware).
  function automatic int ext_euclid_iters(u64 phi, u64 e);
    u64 a3 = phi, b3 = e;
    int it = 0;
    while (b3 != 1 && b3 != 0) begin
      u64 t = a3 % b3;
      a3 = b3;
      b3 = t;
      it++;
    end
    return it;
  endfunction

  // Number of remainders Euclid's algorithm forms on (a, b) up to and
  // including the first zero remainder.
  function automatic int euclid_steps(u64 a, u64 b);
    int st = 0;
    while (1) begin
      u64 r = a % b;
      st++;
      if (r == 0) break;
      a = b;
      b = r;
    end
    return st;
  endfunction

  function automatic u64 mod_pow(u64 b, u64 x, u64 m);
    u64 r = 1 % m;
    b = b % m;
    while (x != 0) begin
      if (x[0]) r = (r * b) % m;
      b = (b * b) % m;
      x = x >> 1;
    end
    return r;
  endfunction

  // a*b*2^-k mod n for odd n
  function automatic u64 mont_ref(u64 a, u64 b, u64 n, int k);
    u64 rmod = (u64'(1) << k) % n;
    u64 rinv = mod_inverse(rmod, n);
    return (((a * b) % n) * rinv) % n;
  endfunction

endpackage
