// rsa_case_runner: testbench helper that wraps one rsa_top of a given key
// size and architectural case, runs a session when 'go' pulses, and checks
// the outcome against the software models of rsa_ref_pkg: p, q distinct odd
// primes, n, phi, e the smallest odd exponent coprime with phi, d its
// inverse, the ciphertext and the recovered message (message mod n).
// It reports the session length in cycles and keeps running counts of checks
// and failures.
module rsa_case_runner
  import rsa_pkg::*;
  import rsa_ref_pkg::*;
#(
  parameter int unsigned KEY_BITS = 16,
  parameter exp_alg_e    EXP_ALG  = EXP_SQUARE_MULTIPLY,
  parameter ee_sched_e   EE_SCHED = EE_PARALLEL
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  go,
  input  logic [KEY_BITS/2-1:0] seed,
  input  logic [KEY_BITS-1:0]   message,
  output logic                  finished,
  output int                    cycles,
  output int                    checks,
  output int                    failures
);
  logic [KEY_BITS/2-1:0] p, q;
  logic [KEY_BITS-1:0]   n, phi, e, d, c, m;
  logic                  kerr, busy, done;

  rsa_top #(.KEY_BITS(KEY_BITS), .EXP_ALG(EXP_ALG), .EE_SCHED(EE_SCHED)) u_dut (
    .clk, .rst_n, .start(go), .seed, .message, .p, .q, .n, .phi, .e, .d,
    .cipher(c), .plain(m), .key_error(kerr), .busy, .done);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%0d-bit, alg %0d, sched %0d): %s", KEY_BITS, EXP_ALG, EE_SCHED, what);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
  end

  always @(posedge clk) begin
    if (!rst_n || go) begin
      finished <= 1'b0;
      cycles   <= 0;
    end else if (busy) begin
      cycles <= cycles + 1;
    end
  end

  always @(posedge clk) if (rst_n && done) begin
    u64 nn, ph, ee, mm;
    nn = u64'(p) * q;
    ph = u64'(p - 1) * (q - 1);
    ee = 3;
    while (gcd(ph, ee) != 1) ee += 2;
    mm = message % nn;
    chk(is_prime(p) && is_prime(q) && p != q && p > 2 && q > 2, $sformatf("primes %0d %0d", p, q));
    chk(n == KEY_BITS'(nn) && phi == KEY_BITS'(ph), "n / phi");
    chk(e == KEY_BITS'(ee), $sformatf("e=%0d expected %0d", e, ee));
    chk(d == KEY_BITS'(mod_inverse(ee, ph)), $sformatf("d=%0d", d));
    chk(c == KEY_BITS'(mod_pow(mm, ee, nn)), $sformatf("cipher=%0d", c));
    chk(m == KEY_BITS'(mm) && !kerr, $sformatf("plain=%0d expected %0d", m, mm));
    finished <= 1'b1;
  end
endmodule
