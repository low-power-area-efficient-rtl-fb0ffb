// rc1_arith_logic_unit_tb: checks the combined arithmetic-and-logical unit.
// 1. The published 8-bit vector for a=0 and a=1 against the published
//    result words p..u of the combined mode.
// 2. Random operands and both control values against a reference written
//    with ordinary operators.
// Combinational; a time-based watchdog ends the run if it ever hangs.
module rc1_arith_logic_unit_tb;
  localparam int unsigned W = 8;
  logic         a;
  logic [W-1:0] b, c, d, p, q, r, s, t, u;
  int checks = 0, failures = 0;

  rc1_arith_logic_unit #(.W(W)) dut (
    .a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s), .t(t), .u(u)
  );

  task automatic expect6(input logic [W-1:0] e0, e1, e2, e3, e4, e5, input string what);
    checks++;
    if ({p, q, r, s, t, u} !== {e0, e1, e2, e3, e4, e5}) begin
      failures++;
      $display("FAIL %s a=%b b=%b c=%b d=%b: %b %b %b %b %b %b", what, a, b, c, d,
               p, q, r, s, t, u);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b = 8'b10101010; c = 8'b01010101; d = 8'b11110000;
    a = 1'b0; #1;
    expect6(8'b00000000, 8'b10101011, 8'b01010101,
            8'b10100000, 8'b11111111, 8'b11110101, "published a=0");
    a = 1'b1; #1;
    expect6(8'b11111111, 8'b10101010, 8'b01010110,
            8'b10101111, 8'b00001010, 8'b00000000, "published a=1");
    for (int n = 0; n < 1000; n++) begin
      a = n[0]; b = W'($urandom); c = W'($urandom); d = W'($urandom); #1;
      if (a) expect6({W{1'b1}}, b, W'(-b), b | ~d, b & ~d, ~(b ^ c), "random");
      else   expect6('0, W'(b + 1), ~b, b & d, b ^ c, c | d, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
