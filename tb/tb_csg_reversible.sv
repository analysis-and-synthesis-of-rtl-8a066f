// tb_csg_reversible: end-to-end test of the reversible code sequence
// generator at its default size.
//
// 1. Clears the register with load low and checks q = 0.
// 2. Loads d = 22 with s = 11, runs 14 forward steps with s = 01 and checks
//    the values 45, 27, 55, 46, 29, 59, 54, 45, 27, 55, 46, 29, 59, 54; one
//    more forward step and a switch to s = 10 show 59, and eight backward
//    steps give 29, 46, 55, 27, 45, 54, 59, 29 (the reference trace of the
//    design). Checks one new state per clock and that s = 00 holds.
// 3. Checks the switch back from s = 10 to s = 01.
// 4. Starts from every one of the 64 states in each direction (loaded with
//    s = 11, random bits outside the window) and checks 64 steps against a
//    model of the step rule N+ = 2N + x (forward) or N/2 + 32x (backward),
//    with x from the sum-of-products feedback. Checks which states end in the
//    main cycle against a hand-derived list of the 11-state second cycle,
//    and compares the forward successor of every state with the arrows of
//    the design's full state graph, where two states are known to differ.
// Counts each mechanism (clear, load, hold, forward, backward, both
// direction switches, recovery into the main cycle, lock-up in the second
// cycle) and fails if one never happened.
module tb_csg_reversible;
  import csg_pkg::*;

  logic       c = 1'b0;
  logic       load;
  logic [1:0] s;
  logic [7:0] d;
  logic [5:0] q;

  int unsigned checks = 0, failures = 0;
  int unsigned n_clear = 0, n_load = 0, n_hold = 0, n_fwd = 0, n_bwd = 0;
  int unsigned n_sw_rl = 0, n_sw_lr = 0, n_recover = 0, n_lockup = 0;

  csg_reversible dut (.c(c), .load(load), .s(s), .d(d), .q(q));

  always #5 c = ~c;

  initial begin : watchdog
    repeat (20000) @(posedge c);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic logic x_fwd(logic [5:0] n);
    return !n[5] || !n[4] || (n[1] && !n[0]);
  endfunction
  function automatic logic x_bwd(logic [5:0] n);
    return !n[0] || !n[1] || (n[4] && !n[5]);
  endfunction
  function automatic logic [5:0] next_fwd(logic [5:0] n);
    int unsigned v;
    v = (n < 6'd32) ? 2 * int'(n) + x_fwd(n) : 2 * (int'(n) - 32) + x_fwd(n);
    return 6'(v);
  endfunction
  function automatic logic [5:0] next_bwd(logic [5:0] n);
    return 6'(int'(n) / 2 + 32 * x_bwd(n));
  endfunction
  function automatic bit in_main(logic [5:0] n);
    foreach (MAIN_CYCLE[k]) if (MAIN_CYCLE[k] == n) return 1'b1;
    return 1'b0;
  endfunction
  // The second closed cycle of the feedback functions, worked out by hand.
  function automatic bit in_second(logic [5:0] n);
    case (n)
      6'd21, 6'd23, 6'd31, 6'd42, 6'd43, 6'd47, 6'd53, 6'd58, 6'd61, 6'd62, 6'd63: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction
  // Forward successor of each state as drawn in the design's full state
  // graph. Its arrows 23 -> 46 and 35 -> 39 differ from the feedback
  // equation (which gives 47 and 7); all others agree.
  function automatic logic [5:0] graph_next(logic [5:0] n);
    case (n)
      0: return 1;   1: return 3;   2: return 5;   3: return 7;   4: return 9;
      5: return 11;  6: return 13;  7: return 15;  8: return 17;  9: return 19;
      10: return 21; 11: return 23; 12: return 25; 13: return 27; 14: return 29;
      15: return 31; 16: return 33; 17: return 35; 18: return 37; 19: return 39;
      20: return 41; 21: return 43; 22: return 45; 23: return 46; 24: return 49;
      25: return 51; 26: return 53; 27: return 55; 28: return 57; 29: return 59;
      30: return 61; 31: return 63; 32: return 1;  33: return 3;  34: return 5;
      35: return 39; 36: return 9;  37: return 11; 38: return 13; 39: return 15;
      40: return 17; 41: return 19; 42: return 21; 43: return 23; 44: return 25;
      45: return 27; 46: return 29; 47: return 31; 48: return 32; 49: return 34;
      50: return 37; 51: return 38; 52: return 40; 53: return 42; 54: return 45;
      55: return 46; 56: return 48; 57: return 50; 58: return 53; 59: return 54;
      60: return 56; 61: return 58; 62: return 61; 63: return 62;
      default: return 0;
    endcase
  endfunction

  task automatic expect_q(logic [5:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0d expected=%0d", what, q, exp);
    end
  endtask

  // Apply s and d at the falling edge, then wait for the rising edge.
  task automatic clock(logic [1:0] mode, logic [7:0] data = 8'h00);
    @(negedge c);
    s = mode;
    d = data;
    @(posedge c);
    #1;
    case (mode)
      2'b00: n_hold++;
      2'b01: n_fwd++;
      2'b10: n_bwd++;
      2'b11: n_load++;
    endcase
  endtask

  localparam logic [5:0] FWD_TRACE [14] =
    '{45, 27, 55, 46, 29, 59, 54, 45, 27, 55, 46, 29, 59, 54};
  localparam logic [5:0] BWD_TRACE [8] = '{29, 46, 55, 27, 45, 54, 59, 29};

  initial begin
    logic [5:0] model, prev1, prev2, start;
    time t0;
    int unsigned steps, n_main_f, n_main_b;

    // 1. clear
    load = 1'b1; s = 2'b00; d = 8'h00;
    #1 load = 1'b0;
    #1 expect_q(6'd0, "clear");
    n_clear++;
    @(negedge c) load = 1'b1;

    // 2. reference trace
    clock(2'b11, 8'd22);
    expect_q(6'd5, "load 22, left window shown");
    t0 = $time;
    s = 2'b01;
    #1 expect_q(6'd22, "load 22");
    foreach (FWD_TRACE[k]) begin
      clock(2'b01);
      expect_q(FWD_TRACE[k], $sformatf("forward step %0d", k));
    end
    checks++;  // one state per clock
    if (($time - t0) != 14 * 10) begin
      failures++;
      $display("FAIL 14 forward steps took %0t", $time - t0);
    end
    clock(2'b01);            // hidden step to 45
    expect_q(6'd45, "forward step 14");
    s = 2'b10;               // output switches to the left window at once
    #1 expect_q(6'd59, "switch to backward");
    n_sw_rl++;
    foreach (BWD_TRACE[k]) begin
      clock(2'b10);
      expect_q(BWD_TRACE[k], $sformatf("backward step %0d", k));
    end
    // s = 00 selects the right window, which after backward steps holds the
    // state two steps back (54); it must not move while held.
    repeat (3) begin
      clock(2'b00);
      expect_q(6'd54, "hold");
    end
    s = 2'b10;
    #1 expect_q(6'd29, "left window after hold");

    // 3. switch back: the right window shows the state two backward steps ago
    clock(2'b10); prev2 = q;   // 46
    clock(2'b10); prev1 = q;   // 55
    expect_q(6'd55, "backward step");
    clock(2'b10);              // 27
    s = 2'b01;
    #1 expect_q(prev2, "switch to forward");
    n_sw_lr++;
    clock(2'b01);
    expect_q(next_fwd(6'd46), "forward after switch");

    // 4. every start state, both directions
    n_main_f = 0; n_main_b = 0;
    for (int v = 0; v < 64; v++) begin
      start = 6'(v);
      checks++;
      if ((graph_next(start) == next_fwd(start)) != !(v == 23 || v == 35)) begin
        failures++;
        $display("FAIL state graph arrow from %0d: graph %0d, rule %0d",
                 v, graph_next(start), next_fwd(start));
      end
      // forward
      clock(2'b11, {2'($urandom), start});
      s = 2'b01; #1;
      expect_q(start, "forward start");
      model = start;
      for (steps = 0; steps < 64; steps++) begin
        clock(2'b01);
        model = next_fwd(model);
        expect_q(model, $sformatf("forward walk from %0d", v));
      end
      checks++;
      if ((in_main(start) && !in_main(q)) || (in_second(start) && !in_second(q))) begin
        failures++;
        $display("FAIL forward from %0d left its cycle, ends at %0d", v, q);
      end
      if (in_main(q)) begin
        n_main_f++;
        if (!in_main(start)) n_recover++;
      end else begin
        n_lockup++;
        checks++;
        if (!in_second(q)) begin
          failures++;
          $display("FAIL forward from %0d trapped at %0d outside known cycle", v, q);
        end
      end
      // backward
      clock(2'b11, {start, 2'($urandom)});
      expect_q(start, "backward start");
      model = start;
      for (steps = 0; steps < 64; steps++) begin
        clock(2'b10);
        model = next_bwd(model);
        expect_q(model, $sformatf("backward walk from %0d", v));
      end
      if (in_main(q)) begin
        n_main_b++;
      end else begin
        n_lockup++;
        checks++;
        if (!in_second(q)) begin
          failures++;
          $display("FAIL backward from %0d trapped at %0d outside known cycle", v, q);
        end
      end
    end
    $display("states ending in the main cycle: forward %0d backward %0d of 64", n_main_f, n_main_b);

    // clear while running
    clock(2'b01);
    #2 load = 1'b0;
    #1 expect_q(6'd0, "clear while running");
    n_clear++;
    @(negedge c) load = 1'b1;

    $display("mechanisms: clear=%0d load=%0d hold=%0d forward=%0d backward=%0d sw_rl=%0d sw_lr=%0d recover=%0d lockup=%0d",
             n_clear, n_load, n_hold, n_fwd, n_bwd, n_sw_rl, n_sw_lr, n_recover, n_lockup);
    begin
      int unsigned counts [9];
      counts = '{n_clear, n_load, n_hold, n_fwd, n_bwd, n_sw_rl, n_sw_lr, n_recover, n_lockup};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
