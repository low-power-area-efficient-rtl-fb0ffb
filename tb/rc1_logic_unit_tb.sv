// rc1_logic_unit_tb: checks the logical unit.
// 1. The published 8-bit vector (b=10101010, c=01010101, d=11110000)
//    against the published result words p..u of logical mode.
// 2. Random operands against a reference written with ordinary operators.
// Combinational; a time-based watchdog ends the run if it ever hangs.
module rc1_logic_unit_tb;
  localparam int unsigned W = 8;
  logic [W-1:0] b, c, d;
  logic [W-1:0] and_bd, xor_bc, or_cd, or_bnd, and_bnd, xnor_bc;
  int checks = 0, failures = 0;

  rc1_logic_unit #(.W(W)) dut (
    .b(b), .c(c), .d(d), .and_bd(and_bd), .xor_bc(xor_bc), .or_cd(or_cd),
    .or_bnd(or_bnd), .and_bnd(and_bnd), .xnor_bc(xnor_bc)
  );

  task automatic expect6(input logic [W-1:0] e0, e1, e2, e3, e4, e5, input string what);
    checks++;
    if ({and_bd, xor_bc, or_cd, or_bnd, and_bnd, xnor_bc} !== {e0, e1, e2, e3, e4, e5}) begin
      failures++;
      $display("FAIL %s b=%b c=%b d=%b: %b %b %b %b %b %b", what, b, c, d,
               and_bd, xor_bc, or_cd, or_bnd, and_bnd, xnor_bc);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b = 8'b10101010; c = 8'b01010101; d = 8'b11110000; #1;
    expect6(8'b10100000, 8'b11111111, 8'b11110101,
            8'b10101111, 8'b00001010, 8'b00000000, "published");
    for (int n = 0; n < 1000; n++) begin
      b = W'($urandom); c = W'($urandom); d = W'($urandom); #1;
      expect6(b & d, b ^ c, c | d, b | ~d, b & ~d, ~(b ^ c), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
