// rc1_alu_widths_tb: the ALU at 1-bit and 4-bit widths, every operand
// and select combination, against a reference model written with ordinary
// operators (the same table as the 8-bit design: p = {W{a'}},
// q = a' ? b : b+1, r = a' ? -b : ~b in arithmetic and combined modes,
// logical results b&d, b^c, c|d, b|~d, b&~d, ~(b^c), where a' is a, or 1
// when z0 z1 = 11). Combinational; a time-based watchdog ends the run if
// it ever hangs.
module rc1_alu_widths_tb;
  int checks = 0, failures = 0;

  logic z0, z1, a;
  logic [0:0] b1, c1, d1, p1, q1, r1, s1, t1, u1;
  logic [3:0] b4, c4, d4, p4, q4, r4, s4, t4, u4;

  rc1_alu #(.W(1)) dut1 (
    .z0(z0), .z1(z1), .a(a), .b(b1), .c(c1), .d(d1),
    .p(p1), .q(q1), .r(r1), .s(s1), .t(t1), .u(u1)
  );
  rc1_alu #(.W(4)) dut4 (
    .z0(z0), .z1(z1), .a(a), .b(b4), .c(c4), .d(d4),
    .p(p4), .q(q4), .r(r4), .s(s4), .t(t4), .u(u4)
  );

  // Reference result of one ALU as six 4-bit words, computed for width w.
  function automatic logic [23:0] ref_alu(int w, logic z0_, z1_, a_, logic [3:0] b, c, d);
    logic [3:0] m, ap, aq, ar;
    logic       ae;
    m  = 4'((1 << w) - 1);
    ae = a_ | (z0_ & z1_);
    ap = ae ? m : 4'b0;
    aq = (ae ? b : 4'(b + 1)) & m;
    ar = (ae ? 4'(-b) : ~b) & m;
    case ({z0_, z1_})
      2'b00:   return {ap, aq, ar, 12'b0};
      2'b01:   return {b & d, b ^ c, c | d, (b | ~d) & m, b & ~d, ~(b ^ c) & m};
      default: return ae ? {ap, aq, ar, (b | ~d) & m, b & ~d, ~(b ^ c) & m}
                         : {ap, aq, ar, b & d, b ^ c, c | d};
    endcase
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] e;
    for (int sel = 0; sel < 8; sel++) begin
      for (int v = 0; v < 4096; v++) begin
        {z0, z1, a} = 3'(sel);
        {b4, c4, d4} = 12'(v);
        {b1, c1, d1} = {b4[0], c4[0], d4[0]};
        #1;
        e = ref_alu(4, z0, z1, a, b4, c4, d4);
        checks++;
        if ({p4, q4, r4, s4, t4, u4} !== e) begin
          failures++;
          $display("FAIL W=4 z0z1a=%03b b=%b c=%b d=%b got %h expected %h",
                   3'(sel), b4, c4, d4, {p4, q4, r4, s4, t4, u4}, e);
        end
        if (v < 8) begin
          e = ref_alu(1, z0, z1, a, {3'b0, b1}, {3'b0, c1}, {3'b0, d1});
          checks++;
          if ({p1, q1, r1, s1, t1, u1} !== {e[20], e[16], e[12], e[8], e[4], e[0]}) begin
            failures++;
            $display("FAIL W=1 z0z1a=%03b b=%b c=%b d=%b got %b", 3'(sel), b1, c1, d1,
                     {p1, q1, r1, s1, t1, u1});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
