// tb_rsa_full: the transceiver exactly as delivered - every parameter at its
// default (8-bit keys, square-and-multiply, parallel extended Euclid) - run
// through complete sessions for every LFSR seed, each with a random message
// below the smallest possible modulus. Every key, the ciphertext and the
// recovered message are checked against software models.
module tb_rsa_full;
  import rsa_pkg::*;
  import rsa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int K = DEFAULT_KEY_BITS;

  logic           start;
  logic [K/2-1:0] seed, p, q;
  logic [K-1:0]   message, n, phi, e, d, cipher, plain;
  logic           key_error, busy, done;

  rsa_top dut (
    .clk, .rst_n, .start, .seed, .message, .p, .q, .n, .phi, .e, .d,
    .cipher, .plain, .key_error, .busy, .done);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    u64 nn, ph, ee;
    int cyc;
    start = 0; seed = 0; message = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < (1 << (K / 2)); s++) begin
      seed    = (K/2)'(s);
      message = K'($urandom % 15);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      nn = u64'(p) * q;
      ph = u64'(p - 1) * (q - 1);
      ee = 3;
      while (gcd(ph, ee) != 1) ee += 2;
      chk(is_prime(p) && is_prime(q) && p != q && p > 2 && q > 2, $sformatf("primes %0d %0d", p, q));
      chk(n == K'(nn) && phi == K'(ph), "n / phi");
      chk(e == K'(ee), $sformatf("e=%0d expected %0d", e, ee));
      chk(d == K'(mod_inverse(ee, ph)), $sformatf("d=%0d", d));
      chk(cipher == K'(mod_pow(message, ee, nn)), $sformatf("cipher=%0d", cipher));
      chk(plain == message && !key_error, $sformatf("plain=%0d expected %0d", plain, message));
      $display("seed %0d: p=%0d q=%0d n=%0d e=%0d d=%0d  M=%0d C=%0d M'=%0d  %0d cycles",
               s, p, q, n, e, d, message, cipher, plain, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
