// tb_public_key_gen: feeds pairs of distinct odd primes to the public key
// generator (8- and 32-bit keys) and checks n = p*q, phi = (p-1)(q-1), that
// e is the smallest odd number >= 3 coprime with phi, and the cycle count:
// one set-up cycle, one cycle per Euclid remainder of each candidate and one
// cycle between candidates.
module tb_public_key_gen;
  import rsa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [3:0]  p4, q4;
  logic [15:0] p16, q16;
  logic [7:0]  n8, phi8, e8;
  logic [31:0] n32, phi32, e32;
  logic busy8, done8, busy32, done32;
  int rejected = 0;

  public_key_gen #(.KEY_BITS(8))  u8  (.clk, .rst_n, .start, .p(p4),  .q(q4),  .n(n8),  .phi(phi8),  .e(e8),  .busy(busy8),  .done(done8));
  public_key_gen #(.KEY_BITS(32)) u32 (.clk, .rst_n, .start, .p(p16), .q(q16), .n(n32), .phi(phi32), .e(e32), .busy(busy32), .done(done32));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic u64 random_prime(int bits);
    u64 x;
    do x = (u64'($urandom) & ((u64'(1) << bits) - 1)) | 1;
    while (!is_prime(x) || x < 3);
    return x;
  endfunction

  // expected e and latency
  task automatic expect_key(u64 phi, output u64 e, output int lat);
    e = 3;
    lat = 1;
    while (gcd(phi, e) != 1) begin
      lat += euclid_steps(phi, e) + 1;
      e += 2;
    end
    lat += euclid_steps(phi, e);
  endtask

  initial begin
    u64 pa, qa, pb, qb, e_exp8, e_exp32;
    int lat8, lat32, cyc;
    bit seen8, seen32;
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      do begin pa = random_prime(4); qa = random_prime(4); end while (pa == qa);
      do begin pb = random_prime(16); qb = random_prime(16); end while (pb == qb);
      if (t == 0) begin pa = 5; qa = 7; end      // phi = 24: e = 3 rejected
      p4 = 4'(pa); q4 = 4'(qa); p16 = 16'(pb); q16 = 16'(qb);
      expect_key((pa - 1) * (qa - 1), e_exp8, lat8);
      expect_key((pb - 1) * (qb - 1), e_exp32, lat32);
      if (e_exp8 != 3) rejected++;
      @(negedge clk);
      start = 1;
      @(posedge clk);
      #1 start = 0;
      cyc = 0; seen8 = 0; seen32 = 0;
      while (!(seen8 && seen32)) begin
        @(posedge clk);
        cyc++;
        #1;
        if (done8 && !seen8) begin
          seen8 = 1;
          chk(cyc == lat8, $sformatf("8-bit latency %0d expected %0d", cyc, lat8));
        end
        if (done32 && !seen32) begin
          seen32 = 1;
          chk(cyc == lat32, $sformatf("32-bit latency %0d expected %0d", cyc, lat32));
        end
      end
      chk(n8 == 8'(pa * qa) && phi8 == 8'((pa - 1) * (qa - 1)), $sformatf("8-bit n/phi for %0d,%0d", pa, qa));
      chk(e8 == 8'(e_exp8), $sformatf("8-bit e=%0d expected %0d (phi %0d)", e8, e_exp8, phi8));
      chk(n32 == 32'(pb * qb) && phi32 == 32'((pb - 1) * (qb - 1)), "32-bit n/phi");
      chk(e32 == 32'(e_exp32) && e32 < phi32, $sformatf("32-bit e=%0d expected %0d", e32, e_exp32));
    end
    chk(rejected > 0, "no candidate exponent was ever rejected");
    $display("sessions with rejected exponent candidates (8-bit): %0d", rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
