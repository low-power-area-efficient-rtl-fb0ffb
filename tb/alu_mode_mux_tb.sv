// alu_mode_mux_tb: all eight combinations of z0, z1, a against the
// expected mode and effective a. Combinational; a time-based watchdog
// ends the run if it ever hangs.
module alu_mode_mux_tb;
  import alu_pkg::*;
  logic      z0, z1, a, a_eff;
  alu_mode_e mode;
  int checks = 0, failures = 0;

  alu_mode_mux dut (.z0(z0), .z1(z1), .a(a), .mode(mode), .a_eff(a_eff));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_mode_e emode;
    logic      ea;
    for (int v = 0; v < 8; v++) begin
      {z0, z1, a} = 3'(v);
      #1;
      case ({z0, z1})
        2'b00:   begin emode = MODE_ARITH; ea = a;    end
        2'b01:   begin emode = MODE_LOGIC; ea = a;    end
        2'b10:   begin emode = MODE_COMBO; ea = a;    end
        default: begin emode = MODE_COMBO; ea = 1'b1; end
      endcase
      checks++;
      if (mode !== emode || a_eff !== ea) begin
        failures++;
        $display("FAIL z0=%b z1=%b a=%b: mode=%0d a_eff=%b expected %0d %b",
                 z0, z1, a, mode, a_eff, emode, ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
