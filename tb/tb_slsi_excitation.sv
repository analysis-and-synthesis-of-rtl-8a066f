// tb_slsi_excitation: exhaustive check of the backward feedback function.
//
// For all 64 states the output is compared with the sum of products ~Q0 + ~Q1 + Q4~Q5,
// and for the seven states of the main cycle with the bit the backward step
// must shift in to reach the next state of the cycle.
module tb_slsi_excitation;
  import csg_pkg::*;

  logic [5:0]  q;
  logic        out;
  int unsigned checks = 0, failures = 0;

  slsi_excitation dut (.q(q), .slsi(out));

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
      if (out !== ((q[0] == 1'b0) || (q[1] == 1'b0) || (q[4] == 1'b1 && q[5] == 1'b0))) begin
        failures++;
        $display("FAIL state %0d: feedback=%b", v, out);
      end
    end
    for (int k = 0; k < CYCLE_LEN; k++) begin
      q = MAIN_CYCLE[k];
      #1;
      checks++;
      // going backwards, the predecessor's MSB is the bit shifted in
      if (out !== MAIN_CYCLE[(k + CYCLE_LEN - 1) % CYCLE_LEN][5]) begin
        failures++;
        $display("FAIL cycle state %0d: feedback=%b", q, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
