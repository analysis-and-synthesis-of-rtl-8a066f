// tb_srsi_excitation: exhaustive check of the forward feedback function.
//
// For all 64 states the output is compared with the sum of products ~Q5 + ~Q4 + Q1~Q0,
// and for the seven states of the main cycle with the bit the forward step
// must shift in to reach the next state of the cycle.
module tb_srsi_excitation;
  import csg_pkg::*;

  logic [5:0]  q;
  logic        out;
  int unsigned checks = 0, failures = 0;

  srsi_excitation dut (.q(q), .srsi(out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      q = 6'(v);
      #1;
      checks++;
      if (out !== ((q[5] == 1'b0) || (q[4] == 1'b0) || (q[1] == 1'b1 && q[0] == 1'b0))) begin
        failures++;
        $display("FAIL state %0d: feedback=%b", v, out);
      end
    end
    for (int k = 0; k < CYCLE_LEN; k++) begin
      q = MAIN_CYCLE[k];
      #1;
      checks++;
      // the successor of a cycle state has the new bit in its LSB
      if (out !== MAIN_CYCLE[(k + 1) % CYCLE_LEN][0]) begin
        failures++;
        $display("FAIL cycle state %0d: feedback=%b", q, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
