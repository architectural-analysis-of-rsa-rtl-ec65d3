// tb_mont_prod: checks the bit-serial Montgomery product for 8- and 32-bit
// operands against the definition a*b*2^-k mod n (odd n, a < n), including
// the case that needs the closing subtraction, and checks that every result
// takes KEY_BITS + 1 cycles.
module tb_mont_prod;
  import rsa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [7:0]  a8, b8, n8, s8;
  logic [31:0] a32, b32, n32, s32;
  logic busy8, done8, busy32, done32;
  int final_subs = 0;

  mont_prod #(.KEY_BITS(8))  u8  (.clk, .rst_n, .start, .a(a8),  .b(b8),  .n(n8),  .s(s8),  .busy(busy8),  .done(done8));
  mont_prod #(.KEY_BITS(32)) u32 (.clk, .rst_n, .start, .a(a32), .b(b32), .n(n32), .s(s32), .busy(busy32), .done(done32));

  always @(posedge clk)
    if (u8.busy && u8.closing && u8.acc >= 10'(u8.n_r)) final_subs++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int cyc;
    bit f8, f32;
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      n8 = 8'($urandom) | 8'd1;   if (n8 < 3) n8 = 3;
      n32 = $urandom | 32'd1;     if (n32 < 3) n32 = 3;
      a8 = 8'($urandom) % n8;  a32 = $urandom % n32;
      b8 = 8'($urandom);       b32 = $urandom;
      if (t == 0) begin a8 = n8 - 1; b8 = 8'hFF; a32 = n32 - 1; b32 = '1; end
      @(negedge clk);
      start = 1;
      @(posedge clk);
      #1 start = 0;
      cyc = 0; f8 = 0; f32 = 0;
      while (!(f8 && f32)) begin
        @(posedge clk);
        cyc++;
        #1;
        if (done8 && !f8) begin f8 = 1; chk(cyc == 9, $sformatf("8-bit latency %0d", cyc)); end
        if (done32 && !f32) begin f32 = 1; chk(cyc == 33, $sformatf("32-bit latency %0d", cyc)); end
      end
      chk(s8 == 8'(mont_ref(a8, b8, n8, 8)), $sformatf("8-bit MP(%0d,%0d,%0d)=%0d", a8, b8, n8, s8));
      chk(s32 == 32'(mont_ref(a32, b32, n32, 32)), $sformatf("32-bit MP(%0d,%0d,%0d)=%0d", a32, b32, n32, s32));
    end
    chk(final_subs > 0, "closing subtraction never needed");
    $display("closing subtractions (8-bit): %0d", final_subs);
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
