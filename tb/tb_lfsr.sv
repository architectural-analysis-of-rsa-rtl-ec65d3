// tb_lfsr: checks that the LFSR is of maximal length for several widths -
// starting from a seed it visits every nonzero state exactly once in
// 2^WIDTH - 1 steps and returns to the seed - and that load, hold and the
// zero-seed substitution behave as specified.
module tb_lfsr;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load, step;
  logic [3:0]  seed4,  st4;
  logic [7:0]  seed8,  st8;
  logic [12:0] seed13, st13;
  logic [15:0] seed16, st16;

  lfsr #(.WIDTH(4))  u4  (.clk, .rst_n, .load, .seed(seed4),  .step, .state(st4));
  lfsr #(.WIDTH(8))  u8  (.clk, .rst_n, .load, .seed(seed8),  .step, .state(st8));
  lfsr #(.WIDTH(13)) u13 (.clk, .rst_n, .load, .seed(seed13), .step, .state(st13));
  lfsr #(.WIDTH(16)) u16 (.clk, .rst_n, .load, .seed(seed16), .step, .state(st16));

  bit seen4 [16];
  bit seen8 [256];
  bit seen13 [8192];
  bit seen16 [65536];
  int first_repeat4, first_repeat8, first_repeat13, first_repeat16;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    load = 0; step = 0;
    seed4 = 4'h9; seed8 = 8'hA5; seed13 = 13'h1234; seed16 = 16'hBEEF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    chk(st4 == 1 && st8 == 1 && st13 == 1 && st16 == 1, "reset state is 1");
    load <= 1;
    @(posedge clk);
    load <= 0;
    @(negedge clk);
    chk(st4 == 4'h9 && st8 == 8'hA5 && st13 == 13'h1234 && st16 == 16'hBEEF, "load");
    // hold without step
    repeat (3) @(posedge clk);
    @(negedge clk);
    chk(st8 == 8'hA5, "hold while step low");
    first_repeat4 = 0; first_repeat8 = 0; first_repeat13 = 0; first_repeat16 = 0;
    step <= 1;
    for (int i = 1; i <= 65535; i++) begin
      @(negedge clk);
      if (st4 == 0 || st8 == 0 || st13 == 0 || st16 == 0) begin
        chk(0, "zero state reached");
        break;
      end
      if (i < 15 && seen4[st4]) chk(0, "4-bit state repeated early");
      if (i < 255 && seen8[st8]) chk(0, "8-bit state repeated early");
      if (i < 8191 && seen13[st13]) chk(0, "13-bit state repeated early");
      if (seen16[st16]) chk(0, "16-bit state repeated early");
      if (i < 15) seen4[st4] = 1;
      if (i < 255) seen8[st8] = 1;
      if (i < 8191) seen13[st13] = 1;
      seen16[st16] = 1;
      if (i == 15)    chk(st4 == 4'h9, "4-bit period 15");
      if (i == 255)   chk(st8 == 8'hA5, "8-bit period 255");
      if (i == 8191)  chk(st13 == 13'h1234, "13-bit period 8191");
      if (i == 65535) chk(st16 == 16'hBEEF, "16-bit period 65535");
    end
    step <= 0;
    // zero seed is replaced by 1
    seed8 = 0;
    load <= 1;
    @(posedge clk);
    load <= 0;
    @(negedge clk);
    chk(st8 == 8'd1, "zero seed loads 1");
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
