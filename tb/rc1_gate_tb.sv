// rc1_gate_tb: exhaustive check of the RC-1 gate against its published
// truth table (all eight input vectors), plus a check that the gate is
// one-to-one (every output vector appears exactly once) and that applying
// the inverse mapping recovers the inputs. Combinational; a time-based
// watchdog ends the run if it ever hangs.
module rc1_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  rc1_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // Truth table rows, index = {A,B,C}, value = {P,Q,R}.
  localparam logic [2:0] TT [8] = '{3'b000, 3'b011, 3'b010, 3'b001,
                                    3'b101, 3'b110, 3'b100, 3'b111};

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [7:0] seen;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== TT[v]) begin
        failures++;
        $display("FAIL abc=%03b pqr=%03b expected %03b", 3'(v), {p, q, r}, TT[v]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL outputs are not one-to-one: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
