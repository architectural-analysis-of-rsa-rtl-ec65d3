// tb_rsa_top: end-to-end sessions of the RSA transceiver in all four
// architectural cases at 8-bit keys: 'dut' is the top with every parameter
// at its default (case 1: square-and-multiply, parallel extended Euclid);
// dut2..dut4 are cases 2..4. Each session uses a new LFSR seed and a random
// message. Checked against software models: p, q distinct odd primes,
// n and phi, e the smallest odd exponent coprime with phi, d the inverse of e,
// the ciphertext, and that decryption gives back the message (mod n).
// Each mechanism of the design is counted and must occur at least once:
// composite prime candidates, rejected exponent candidates,
// encryption running alongside private key generation, negative B2
// correction, the three-cycle shared-multiplier schedule, exponent bits 0
// and 1, Montgomery closing subtraction, and a message reduced mod n.
// dut5, a 16-bit Montgomery instance with its own seeds and messages, widens
// the key space so that the rarer mechanisms occur.
module tb_rsa_top;
  import rsa_pkg::*;
  import rsa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int K = 8;
  localparam int NDUT = 4;

  logic            start;
  logic [K/2-1:0]  seed;
  logic [K-1:0]    message;
  logic [K/2-1:0]  p [NDUT], q [NDUT];
  logic [K-1:0]    n [NDUT], phi [NDUT], e [NDUT], d [NDUT], c [NDUT], m [NDUT];
  logic            kerr [NDUT], busy [NDUT], done [NDUT];

  rsa_top dut (
    .clk, .rst_n, .start, .seed, .message, .p(p[0]), .q(q[0]), .n(n[0]), .phi(phi[0]),
    .e(e[0]), .d(d[0]), .cipher(c[0]), .plain(m[0]), .key_error(kerr[0]), .busy(busy[0]), .done(done[0]));
  rsa_top #(.KEY_BITS(K), .EXP_ALG(EXP_SQUARE_MULTIPLY), .EE_SCHED(EE_SEQUENTIAL)) dut2 (
    .clk, .rst_n, .start, .seed, .message, .p(p[1]), .q(q[1]), .n(n[1]), .phi(phi[1]),
    .e(e[1]), .d(d[1]), .cipher(c[1]), .plain(m[1]), .key_error(kerr[1]), .busy(busy[1]), .done(done[1]));
  rsa_top #(.KEY_BITS(K), .EXP_ALG(EXP_MONTGOMERY), .EE_SCHED(EE_PARALLEL)) dut3 (
    .clk, .rst_n, .start, .seed, .message, .p(p[2]), .q(q[2]), .n(n[2]), .phi(phi[2]),
    .e(e[2]), .d(d[2]), .cipher(c[2]), .plain(m[2]), .key_error(kerr[2]), .busy(busy[2]), .done(done[2]));
  rsa_top #(.KEY_BITS(K), .EXP_ALG(EXP_MONTGOMERY), .EE_SCHED(EE_SEQUENTIAL)) dut4 (
    .clk, .rst_n, .start, .seed, .message, .p(p[3]), .q(q[3]), .n(n[3]), .phi(phi[3]),
    .e(e[3]), .d(d[3]), .cipher(c[3]), .plain(m[3]), .key_error(kerr[3]), .busy(busy[3]), .done(done[3]));

  // a 16-bit Montgomery instance widens the key space the mechanisms see
  logic [7:0]  seed5, p5, q5;
  logic [15:0] message5, n5, phi5, e5, d5, c5, m5;
  logic        kerr5, busy5, done5;
  rsa_top #(.KEY_BITS(16), .EXP_ALG(EXP_MONTGOMERY), .EE_SCHED(EE_PARALLEL)) dut5 (
    .clk, .rst_n, .start, .seed(seed5), .message(message5), .p(p5), .q(q5), .n(n5), .phi(phi5),
    .e(e5), .d(d5), .cipher(c5), .plain(m5), .key_error(kerr5), .busy(busy5), .done(done5));

  // ---- mechanism counters ----------------------------------------------
  int n_composite = 0, n_e_reject = 0, n_overlap = 0;
  int n_neg_b2 = 0, n_seq_lane = 0, n_bit0 = 0, n_bit1 = 0, n_mont_sub = 0;
  int n_msg_reduced = 0, n_decrypt = 0;

  always @(posedge clk) if (rst_n) begin
    // prime_gen in its test state (2)
    if (dut.u_prime_gen.state == 2'd2 && (dut.u_prime_gen.cand < 3 ||
        (dut.u_prime_gen.div_sq <= 8'(dut.u_prime_gen.cand) && dut.u_prime_gen.rem == 0)))
      n_composite++;
    if (dut5.u_private_key_gen.state == 1'b1 && dut5.u_private_key_gen.b[2] == 1 &&
        dut5.u_private_key_gen.b[1] < 0) n_neg_b2++;
    if (dut5.g_mont.u_modexp.u_mp_c.closing &&
        dut5.g_mont.u_modexp.u_mp_c.acc >= 18'(dut5.g_mont.u_modexp.u_mp_c.n_r)) n_mont_sub++;
    if (dut5.g_mont.u_modexp.u_mp_p.closing &&
        dut5.g_mont.u_modexp.u_mp_p.acc >= 18'(dut5.g_mont.u_modexp.u_mp_p.n_r)) n_mont_sub++;
    if (dut3.g_mont.u_modexp.u_mp_p.closing &&
        dut3.g_mont.u_modexp.u_mp_p.acc >= 10'(dut3.g_mont.u_modexp.u_mp_p.n_r)) n_mont_sub++;
    if (dut.u_public_key_gen.state == 2'd3) n_e_reject++;          // next candidate
    if (dut.u_private_key_gen.busy && dut.g_sqm.u_modexp.busy) n_overlap++;
    if (dut.u_private_key_gen.state == 1'b1 && dut.u_private_key_gen.b[2] == 1 &&
        dut.u_private_key_gen.b[1] < 0) n_neg_b2++;
    if (dut2.u_private_key_gen.busy && dut2.u_private_key_gen.lane == 2'd2) n_seq_lane++;
    if (dut.g_sqm.u_modexp.busy) begin
      if (dut.g_sqm.u_modexp.exp_r[dut.g_sqm.u_modexp.i]) n_bit1++;
      else n_bit0++;
    end
    if (dut3.g_mont.u_modexp.u_mp_c.closing &&
        dut3.g_mont.u_modexp.u_mp_c.acc >= 10'(dut3.g_mont.u_modexp.u_mp_c.n_r)) n_mont_sub++;
    if (dut.state == 3'd4 && dut.g_sqm.u_modexp.done) n_decrypt++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic check_session(int k, logic [K-1:0] msg);
    u64 pp = p[k], qq = q[k], nn, ph, ee, mm;
    nn = pp * qq;
    ph = (pp - 1) * (qq - 1);
    ee = 3;
    while (gcd(ph, ee) != 1) ee += 2;
    mm = msg % nn;
    chk(is_prime(pp) && is_prime(qq) && pp != qq && pp > 2 && qq > 2,
        $sformatf("dut%0d primes %0d %0d", k + 1, pp, qq));
    chk(n[k] == K'(nn) && phi[k] == K'(ph), $sformatf("dut%0d n/phi", k + 1));
    chk(e[k] == K'(ee), $sformatf("dut%0d e=%0d expected %0d", k + 1, e[k], ee));
    chk(d[k] == K'(mod_inverse(ee, ph)), $sformatf("dut%0d d=%0d", k + 1, d[k]));
    chk(c[k] == K'(mod_pow(mm, ee, nn)), $sformatf("dut%0d cipher=%0d expected %0d", k + 1, c[k], mod_pow(mm, ee, nn)));
    chk(m[k] == K'(mm) && !kerr[k], $sformatf("dut%0d plain=%0d expected %0d", k + 1, m[k], mm));
  endtask

  initial begin
    bit seen [NDUT];
    bit seen5;
    start = 0; seed = 0; message = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 48; s++) begin
      seed    = (K/2)'(s);
      // mostly below the smallest modulus (15); every fourth session any value
      message = (s % 4 == 3) ? K'($urandom) : K'($urandom % 15);
      seed5    = 8'($urandom);
      message5 = 16'($urandom % 3233);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      foreach (seen[k]) seen[k] = 0;
      seen5 = 0;
      while (!(seen[0] && seen[1] && seen[2] && seen[3] && seen5)) begin
        @(posedge clk);
        #1;
        for (int k = 0; k < NDUT; k++) if (done[k]) seen[k] = 1;
        if (done5) seen5 = 1;
      end
      begin
        u64 nn5, ph5, ee5;
        nn5 = u64'(p5) * q5;
        ph5 = u64'(p5 - 1) * (q5 - 1);
        ee5 = 3;
        while (gcd(ph5, ee5) != 1) ee5 += 2;
        chk(is_prime(p5) && is_prime(q5) && p5 != q5 && n5 == 16'(nn5) && phi5 == 16'(ph5) &&
            e5 == 16'(ee5) && d5 == 16'(mod_inverse(ee5, ph5)) &&
            c5 == 16'(mod_pow(message5 % nn5, ee5, nn5)) && m5 == 16'(message5 % nn5) && !kerr5,
            $sformatf("16-bit session p=%0d q=%0d n=%0d/%0d phi=%0d/%0d e=%0d/%0d d=%0d/%0d c=%0d/%0d m=%0d/%0d msg=%0d", p5, q5, n5, nn5, phi5, ph5, e5, ee5, d5, mod_inverse(ee5, ph5), c5, mod_pow(message5 % nn5, ee5, nn5), m5, message5 % nn5, message5));
      end
      for (int k = 0; k < NDUT; k++) check_session(k, message);
      if (message >= n[0]) n_msg_reduced++;
      // all four cases draw the same keys from the same seed
      chk(p[1] == p[0] && p[2] == p[0] && p[3] == p[0] && d[3] == d[0] && c[2] == c[0],
          "cases disagree");
    end
    $display("composite candidates rejected      : %0d", n_composite);
    $display("exponent candidates rejected       : %0d", n_e_reject);
    $display("cycles enc. alongside private key  : %0d", n_overlap);
    $display("negative B2 corrected              : %0d", n_neg_b2);
    $display("shared-multiplier iterations       : %0d", n_seq_lane);
    $display("exponent bits 0 / 1                : %0d / %0d", n_bit0, n_bit1);
    $display("Montgomery closing subtractions    : %0d", n_mont_sub);
    $display("messages reduced mod n             : %0d", n_msg_reduced);
    $display("decryptions on the shared unit     : %0d", n_decrypt);
    chk(n_composite > 0, "no composite candidate");
    chk(n_e_reject > 0, "no rejected exponent");
    chk(n_overlap > 0, "encryption never overlapped private key generation");
    chk(n_neg_b2 > 0, "no negative B2");
    chk(n_seq_lane > 0, "sequential schedule never ran");
    chk(n_bit0 > 0 && n_bit1 > 0, "exponent bits not both seen");
    chk(n_mont_sub > 0, "no Montgomery closing subtraction");
    chk(n_msg_reduced > 0, "no message reduced mod n");
    chk(n_decrypt == 48, "decryption count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
