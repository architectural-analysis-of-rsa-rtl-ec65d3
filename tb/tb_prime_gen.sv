// tb_prime_gen: runs the prime generator with 4-, 8- and 16-bit primes for
// many seeds and checks that p and q are odd primes, differ, and that p is
// the first prime among the odd-forced LFSR states following the seed
// (the LFSR itself is checked on its own elsewhere, so its state is
// observed here, not modelled).
module tb_prime_gen;
  import rsa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [3:0]  seed4,  p4,  q4;
  logic [7:0]  seed8,  p8,  q8;
  logic [15:0] seed16, p16, q16;
  logic busy4, done4, busy8, done8, busy16, done16;

  prime_gen #(.PW(4))  u4  (.clk, .rst_n, .start, .seed(seed4),  .p(p4),  .q(q4),  .busy(busy4),  .done(done4));
  prime_gen #(.PW(8))  u8  (.clk, .rst_n, .start, .seed(seed8),  .p(p8),  .q(q8),  .busy(busy8),  .done(done8));
  // 5-bit primes from seed 15: the LFSR draws p's odd twin again before a
  // new prime, so the repeated-prime rejection is exercised
  logic [4:0] p5, q5;
  logic busy5, done5;
  int repeats5 = 0;
  prime_gen #(.PW(5)) u5 (.clk, .rst_n, .start, .seed(5'd15), .p(p5), .q(q5), .busy(busy5), .done(done5));
  always @(posedge clk)
    if (u5.state == 2'd2 && u5.have_p && u5.cand == u5.p && u5.div_sq > 10'(u5.cand)) repeats5++;

  prime_gen #(.PW(16)) u16 (.clk, .rst_n, .start, .seed(seed16), .p(p16), .q(q16), .busy(busy16), .done(done16));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int composites_seen = 0;
  // observe the odd candidates the 8-bit instance draws: the first prime
  // drawn must become p
  longint unsigned first_prime8;
  bit got_first8;
  always @(posedge clk) begin
    if (u8.state == 2'd1 && !got_first8) begin       // drawing a candidate
      if (is_prime(u8.u_lfsr.state | 8'd1) && (u8.u_lfsr.state | 8'd1) >= 3) begin
        first_prime8 = u8.u_lfsr.state | 8'd1;
        got_first8 = 1;
      end else composites_seen++;
    end
  end

  initial begin
    start = 0;
    seed4 = 0; seed8 = 0; seed16 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 40; s++) begin
      seed4 = 4'($urandom); seed8 = 8'($urandom); seed16 = 16'($urandom);
      if (s == 0) begin seed4 = 4'd4; seed8 = 8'd0; end
      got_first8 = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      fork
        wait (done4);
        wait (done8);
        wait (done16);
        wait (done5);
      join
      @(negedge clk);
      chk(is_prime(p4) && is_prime(q4) && p4 != q4 && p4[0] && q4[0], $sformatf("4-bit p=%0d q=%0d", p4, q4));
      chk(is_prime(p8) && is_prime(q8) && p8 != q8 && p8[0] && q8[0], $sformatf("8-bit p=%0d q=%0d", p8, q8));
      chk(is_prime(p5) && is_prime(q5) && p5 != q5, $sformatf("5-bit p=%0d q=%0d", p5, q5));
      chk(is_prime(p16) && is_prime(q16) && p16 != q16 && p16[0] && q16[0], $sformatf("16-bit p=%0d q=%0d", p16, q16));
      chk(got_first8 && p8 == first_prime8, $sformatf("8-bit p=%0d is not the first prime drawn (%0d)", p8, first_prime8));
    end
    chk(repeats5 > 0, "repeated prime never rejected");
    $display("repeated primes rejected (5-bit): %0d", repeats5);
    chk(composites_seen > 0, "no composite candidate was ever rejected");
    $display("composite or unit candidates rejected (8-bit): %0d", composites_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
