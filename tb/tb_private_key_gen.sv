// tb_private_key_gen: checks both schedules of the extended Euclid unit
// (16- and 32-bit keys) on random coprime (e, phi) pairs and on pairs that
// share a factor. d must satisfy d*e = 1 mod phi with 0 <= d < phi; the
// cycle count must be iterations + 1 for the parallel schedule and
// 3*iterations + 1 for the sequential one, where the iteration count comes
// from a software model of the loop.
module tb_private_key_gen;
  import rsa_pkg::*;
  import rsa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [15:0] e16, phi16;
  logic [31:0] e32, phi32;
  logic [15:0] d_p16, d_s16;
  logic [31:0] d_p32, d_s32;
  logic ni_p16, ni_s16, ni_p32, ni_s32;
  logic bz[4], dn[4];
  int negative_b2 = 0;

  private_key_gen #(.KEY_BITS(16), .SCHED(EE_PARALLEL))   u_p16 (.clk, .rst_n, .start, .e(e16), .phi(phi16), .d(d_p16), .no_inverse(ni_p16), .busy(bz[0]), .done(dn[0]));
  private_key_gen #(.KEY_BITS(16), .SCHED(EE_SEQUENTIAL)) u_s16 (.clk, .rst_n, .start, .e(e16), .phi(phi16), .d(d_s16), .no_inverse(ni_s16), .busy(bz[1]), .done(dn[1]));
  private_key_gen #(.KEY_BITS(32), .SCHED(EE_PARALLEL))   u_p32 (.clk, .rst_n, .start, .e(e32), .phi(phi32), .d(d_p32), .no_inverse(ni_p32), .busy(bz[2]), .done(dn[2]));
  private_key_gen #(.KEY_BITS(32), .SCHED(EE_SEQUENTIAL)) u_s32 (.clk, .rst_n, .start, .e(e32), .phi(phi32), .d(d_s32), .no_inverse(ni_s32), .busy(bz[3]), .done(dn[3]));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    u64 pa, pb, ea, eb, inv_a, inv_b;
    int it_a, it_b, cyc;
    int lat [4];
    bit seen [4];
    bit coprime_a, coprime_b;
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      pa = (u64'($urandom) & 16'hFFFE) | 2;       // even, >= 2
      pb = u64'($urandom) & 32'hFFFF_FFFE;
      if (pa < 8) pa = 8;
      if (pb < 8) pb = 8;
      ea = 3 + u64'($urandom) % (pa - 3);
      eb = 3 + u64'($urandom) % (pb - 3);
      if (t == 0) begin pa = 8; ea = 3; end      // smallest key pair
      coprime_a = gcd(pa, ea) == 1;
      coprime_b = gcd(pb, eb) == 1;
      it_a = ext_euclid_iters(pa, ea);
      it_b = ext_euclid_iters(pb, eb);
      lat[0] = it_a + 1; lat[1] = 3 * it_a + 1;
      lat[2] = it_b + 1; lat[3] = 3 * it_b + 1;
      e16 = 16'(ea); phi16 = 16'(pa); e32 = 32'(eb); phi32 = 32'(pb);
      @(negedge clk);
      start = 1;
      @(posedge clk);
      #1 start = 0;
      cyc = 0;
      foreach (seen[k]) seen[k] = 0;
      while (!(seen[0] && seen[1] && seen[2] && seen[3])) begin
        @(posedge clk);
        cyc++;
        #1;
        for (int k = 0; k < 4; k++) if (dn[k] && !seen[k]) begin
          seen[k] = 1;
          chk(cyc == lat[k], $sformatf("unit %0d latency %0d expected %0d", k, cyc, lat[k]));
        end
      end
      if (coprime_a) begin
        inv_a = mod_inverse(ea, pa);
        chk(!ni_p16 && !ni_s16 && d_p16 == 16'(inv_a) && d_s16 == 16'(inv_a),
            $sformatf("16-bit e=%0d phi=%0d: d=%0d/%0d expected %0d", ea, pa, d_p16, d_s16, inv_a));
        if (u_p16.b[1] < 0) negative_b2++;
      end else begin
        chk(ni_p16 && ni_s16 && d_p16 == 0, "16-bit no_inverse expected");
      end
      if (coprime_b) begin
        inv_b = mod_inverse(eb, pb);
        chk(!ni_p32 && !ni_s32 && d_p32 == 32'(inv_b) && d_s32 == 32'(inv_b),
            $sformatf("32-bit e=%0d phi=%0d: d=%0d/%0d expected %0d", eb, pb, d_p32, d_s32, inv_b));
      end else begin
        chk(ni_p32 && ni_s32, "32-bit no_inverse expected");
      end
    end
    chk(negative_b2 > 0, "a negative B2 was never corrected");
    $display("negative B2 corrected (16-bit): %0d", negative_b2);
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
