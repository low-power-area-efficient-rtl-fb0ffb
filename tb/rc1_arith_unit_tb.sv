// rc1_arith_unit_tb: checks the arithmetic unit.
// 1. The published 8-bit vector (b=10101010, c=01010101) for a=0 and a=1
//    against the published result words.
// 2. Every b value for both a values against a reference model written
//    with ordinary operators: p = {W{a}}, q = b + !a, r = -b or ~b.
// Combinational; a time-based watchdog ends the run if it ever hangs.
module rc1_arith_unit_tb;
  localparam int unsigned W = 8;
  logic         a;
  logic [W-1:0] b, c, p, q, r;
  int checks = 0, failures = 0;

  rc1_arith_unit #(.W(W)) dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic expect3(input logic [W-1:0] ep, eq, er, input string what);
    checks++;
    if (p !== ep || q !== eq || r !== er) begin
      failures++;
      $display("FAIL %s a=%b b=%b: p=%b q=%b r=%b expected %b %b %b",
               what, a, b, p, q, r, ep, eq, er);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published results, z = 00.
    b = 8'b10101010; c = 8'b01010101;
    a = 1'b0; #1; expect3(8'b00000000, 8'b10101011, 8'b01010101, "published a=0");
    a = 1'b1; #1; expect3(8'b11111111, 8'b10101010, 8'b01010110, "published a=1");
    // All operands, both controls.
    for (int v = 0; v < (1 << W); v++) begin
      for (int k = 0; k < 2; k++) begin
        a = k[0];
        b = W'(v);
        c = W'($urandom);
        #1;
        if (a) expect3({W{1'b1}}, b, W'(0 - v), "sweep");
        else   expect3('0, W'(v + 1), W'(~v), "sweep");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
