// tb_divmod: checks the combinational divider against the language's own
// / and % operators, for a narrow (16/8) and a wide (65/32) instance, on
// corner values and random operands.
module tb_divmod;
  int checks = 0, failures = 0;

  logic [15:0] n1, q1;  logic [7:0]  d1, r1;
  logic [64:0] n2, q2;  logic [31:0] d2, r2;

  divmod #(.NW(16), .DW(8))  u_small (.num(n1), .den(d1), .quo(q1), .rem(r1));
  divmod #(.NW(65), .DW(32)) u_wide  (.num(n2), .den(d2), .quo(q2), .rem(r2));

  task automatic check_small(logic [15:0] a, logic [7:0] b);
    n1 = a; d1 = b; #1;
    checks++;
    if (q1 !== a / b || r1 !== a % b) begin
      failures++;
      $display("small %0d / %0d: got q=%0d r=%0d", a, b, q1, r1);
    end
  endtask

  task automatic check_wide(logic [64:0] a, logic [31:0] b);
    n2 = a; d2 = b; #1;
    checks++;
    if (q2 !== a / 65'(b) || r2 !== 32'(a % 65'(b))) begin
      failures++;
      $display("wide %0d / %0d: got q=%0d r=%0d", a, b, q2, r2);
    end
  endtask

  initial begin
    check_small(16'hFFFF, 8'd1);
    check_small(16'hFFFF, 8'hFF);
    check_small(16'd0, 8'd7);
    check_small(16'd254, 8'd255);
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] b = 8'($urandom);
      if (b == 0) b = 1;
      check_small(16'($urandom), b);
    end
    check_wide({1'b1, 64'd0}, 32'd143);
    check_wide({1'b1, 64'd0}, 32'hFFFF_FFFF);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] b = $urandom;
      if (b == 0) b = 3;
      check_wide({1'($urandom), 32'($urandom), 32'($urandom)}, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
