// tb_shift_reg_74198: random test of the 8-bit bidirectional shift register.
//
// Drives random modes, serial inputs and load data for 2000 clocks, with an
// occasional asynchronous clear between edges, and compares q after every
// event with a bit-by-bit model kept in the testbench. Also counts that each
// mode and the clear were exercised and that q stays still between edges.
module tb_shift_reg_74198;
  import csg_pkg::*;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         clr_n;
  mode_e        mode;
  logic         srsi, slsi;
  logic [W-1:0] d, q, model;
  int unsigned  checks = 0, failures = 0;
  int unsigned  seen [4];
  int unsigned  clears = 0;

  shift_reg_74198 #(.WIDTH(W)) dut (
    .clk(clk), .clr_n(clr_n), .mode(mode), .srsi(srsi), .slsi(slsi), .d(d), .q(q)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%b expected=%b", what, q, model);
    end
  endtask

  // Reference step, written per bit.
  function automatic logic [W-1:0] step(logic [W-1:0] cur, mode_e m, logic sr, logic sl,
                                        logic [W-1:0] din);
    logic [W-1:0] nxt;
    nxt = cur;
    case (m)
      MODE_RIGHT: begin
        nxt[0] = sr;
        for (int i = 1; i < W; i++) nxt[i] = cur[i-1];
      end
      MODE_LEFT: begin
        nxt[W-1] = sl;
        for (int i = 0; i < W - 1; i++) nxt[i] = cur[i+1];
      end
      MODE_LOAD: nxt = din;
      default:   nxt = cur;
    endcase
    return nxt;
  endfunction

  initial begin
    clr_n = 1'b1; mode = MODE_HOLD; srsi = 0; slsi = 0; d = '0;
    #1 clr_n = 1'b0;
    model = '0;
    #2 check("clear at start");
    @(negedge clk) clr_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      mode = mode_e'($urandom_range(3));
      srsi = 1'($urandom);
      slsi = 1'($urandom);
      d    = W'($urandom);
      seen[mode]++;
      #2 check("between edges");
      @(posedge clk);
      model = step(model, mode, srsi, slsi, d);
      #1 check("after edge");
      if ($urandom_range(49) == 0) begin
        #1 clr_n = 1'b0;
        model = '0;
        clears++;
        #1 check("asynchronous clear");
        #1 clr_n = 1'b1;
      end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mode %0d never applied", m);
      end
    end
    checks++;
    if (clears == 0) begin
      failures++;
      $display("FAIL clear never applied");
    end
    $display("modes hold=%0d right=%0d left=%0d load=%0d clears=%0d",
             seen[0], seen[1], seen[2], seen[3], clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
