// rc1_alu_tb: end-to-end test of the ALU at its default width (8 bits).
//
// 1. The six published simulation cases (b=10101010, c=01010101,
//    d=11110000 with z0 z1 a = 000, 001, 01x, 100, 101) against the
//    published result words; s, t, u are expected to be zero in arithmetic
//    mode, where the published run leaves them undriven.
// 2. Every z0, z1, a combination with random operands, plus operands that
//    make the increment and the 2's complement wrap, against a reference
//    model written with ordinary operators.
// Each mechanism (arithmetic, logical and combined mode with a = 0 and 1,
// the forced a of code 11, increment wrap, 2's complement of zero) is
// counted; one that never occurred counts as a failure. Combinational; a
// time-based watchdog ends the run if it ever hangs.
module rc1_alu_tb;
  localparam int unsigned W = alu_pkg::ALU_WIDTH;
  logic         z0, z1, a;
  logic [W-1:0] b, c, d, p, q, r, s, t, u;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_arith0 = 0, n_arith1 = 0, n_logic = 0, n_combo0 = 0, n_combo1 = 0;
  int n_code11 = 0, n_inc_wrap = 0, n_neg_zero = 0;

  rc1_alu dut (
    .z0(z0), .z1(z1), .a(a), .b(b), .c(c), .d(d),
    .p(p), .q(q), .r(r), .s(s), .t(t), .u(u)
  );

  task automatic check6(input logic [W-1:0] e0, e1, e2, e3, e4, e5, input string what);
    checks++;
    if ({p, q, r, s, t, u} !== {e0, e1, e2, e3, e4, e5}) begin
      failures++;
      $display("FAIL %s z0=%b z1=%b a=%b b=%b c=%b d=%b", what, z0, z1, a, b, c, d);
      $display("     got      %b %b %b %b %b %b", p, q, r, s, t, u);
      $display("     expected %b %b %b %b %b %b", e0, e1, e2, e3, e4, e5);
    end
  endtask

  // Reference model and mechanism counting for the applied inputs.
  task automatic check_model(input string what);
    logic         ae;
    logic [W-1:0] ap, aq, ar;
    ae = a | (z0 & z1);
    ap = {W{ae}};
    aq = ae ? b : W'(b + 1);
    ar = ae ? W'(~b + 1) : ~b;
    if (!ae && b == '1) n_inc_wrap++;
    if (ae && b == '0 && !(!z0 && z1)) n_neg_zero++;
    case ({z0, z1})
      2'b00: begin
        if (ae) n_arith1++; else n_arith0++;
        check6(ap, aq, ar, '0, '0, '0, what);
      end
      2'b01: begin
        n_logic++;
        check6(b & d, b ^ c, c | d, b | ~d, b & ~d, ~(b ^ c), what);
      end
      default: begin
        if (z1) n_code11++;
        if (ae) begin
          n_combo1++;
          check6(ap, aq, ar, b | ~d, b & ~d, ~(b ^ c), what);
        end else begin
          n_combo0++;
          check6(ap, aq, ar, b & d, b ^ c, c | d, what);
        end
      end
    endcase
  endtask

  task automatic report_mechanism(input string name, input int n);
    checks++;
    $display("mechanism %-28s occurred %0d times", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never occurred", name);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published cases.
    b = 8'b10101010; c = 8'b01010101; d = 8'b11110000;
    {z0, z1, a} = 3'b000; #1;
    check6(8'b00000000, 8'b10101011, 8'b01010101, 8'b0, 8'b0, 8'b0, "published z=00 a=0");
    check_model("published z=00 a=0");
    {z0, z1, a} = 3'b011; #1;
    check6(8'b10100000, 8'b11111111, 8'b11110101, 8'b10101111, 8'b00001010, 8'b00000000,
           "published z=01 a=1");
    check_model("published z=01 a=1");
    {z0, z1, a} = 3'b001; #1;
    check6(8'b11111111, 8'b10101010, 8'b01010110, 8'b0, 8'b0, 8'b0, "published z=00 a=1");
    check_model("published z=00 a=1");
    {z0, z1, a} = 3'b100; #1;
    check6(8'b00000000, 8'b10101011, 8'b01010101, 8'b10100000, 8'b11111111, 8'b11110101,
           "published z=10 a=0");
    check_model("published z=10 a=0");
    {z0, z1, a} = 3'b010; #1;
    check6(8'b10100000, 8'b11111111, 8'b11110101, 8'b10101111, 8'b00001010, 8'b00000000,
           "published z=01 a=0");
    check_model("published z=01 a=0");
    {z0, z1, a} = 3'b101; #1;
    check6(8'b11111111, 8'b10101010, 8'b01010110, 8'b10101111, 8'b00001010, 8'b00000000,
           "published z=10 a=1");
    check_model("published z=10 a=1");

    // Wrap-around corner cases in every select combination.
    for (int v = 0; v < 8; v++) begin
      {z0, z1, a} = 3'(v);
      b = '1; c = W'($urandom); d = W'($urandom); #1; check_model("b all ones");
      b = '0; c = W'($urandom); d = W'($urandom); #1; check_model("b zero");
    end

    // Random operands in every select combination.
    for (int n = 0; n < 4000; n++) begin
      {z0, z1, a} = 3'(n);
      b = W'($urandom); c = W'($urandom); d = W'($urandom);
      #1;
      check_model("random");
    end

    report_mechanism("arithmetic mode, a=0", n_arith0);
    report_mechanism("arithmetic mode, a=1", n_arith1);
    report_mechanism("logical mode", n_logic);
    report_mechanism("combined mode, a=0", n_combo0);
    report_mechanism("combined mode, a=1", n_combo1);
    report_mechanism("code 11 (a forced to 1)", n_code11);
    report_mechanism("increment wraps to zero", n_inc_wrap);
    report_mechanism("2's complement of zero", n_neg_zero);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
