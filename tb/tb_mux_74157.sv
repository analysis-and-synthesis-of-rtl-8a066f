// tb_mux_74157: exhaustive check of the quad 2-to-1 multiplexer.
//
// Applies every combination of sel, g_n, a and b (1024 in all) and compares
// y with the selected input, or with zero while the enable g_n is high.
module tb_mux_74157;

  logic       sel, g_n;
  logic [3:0] a, b, y;
  int unsigned checks = 0, failures = 0;

  mux_74157 #(.WIDTH(4)) dut (.sel(sel), .g_n(g_n), .a(a), .b(b), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] expected;
    for (int v = 0; v < 1024; v++) begin
      {sel, g_n, a, b} = 10'(v);
      #1;
      if (g_n)      expected = 4'h0;
      else if (sel) expected = b;
      else          expected = a;
      checks++;
      if (y !== expected) begin
        failures++;
        $display("FAIL sel=%b g_n=%b a=%h b=%h y=%h expected=%h", sel, g_n, a, b, y, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
