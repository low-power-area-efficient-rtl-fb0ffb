// rc1_mux2_tb: drives the RC-1 multiplexer with random words and both
// select values and compares y with sel ? x1 : x0. Combinational; a
// time-based watchdog ends the run if it ever hangs.
module rc1_mux2_tb;
  localparam int unsigned W = 8;
  logic         sel;
  logic [W-1:0] x0, x1, y;
  int checks = 0, failures = 0;

  rc1_mux2 #(.W(W)) dut (.sel(sel), .x0(x0), .x1(x1), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      x0  = W'($urandom);
      x1  = W'($urandom);
      sel = n[0];
      #1;
      checks++;
      if (y !== (sel ? x1 : x0)) begin
        failures++;
        $display("FAIL sel=%b x0=%h x1=%h y=%h", sel, x0, x1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
