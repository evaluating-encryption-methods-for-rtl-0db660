// tb_jtag_tap_fsm: self-checking testbench for jtag_tap_fsm.
//
// Drives a random TMS stream and compares every state with a reference
// transition table (IEEE 1149.1 TAP diagram, written here as a list of
// (state, TMS=0 successor, TMS=1 successor) rows). Checks that five TMS = 1
// clocks reach Test-Logic-Reset from every state, that trst_n resets, and
// that every one of the 32 transitions was exercised.
module tb_jtag_tap_fsm;
  import secure_debug_pkg::*;
  logic tck = 1'b0, trst_n = 1'b0, tms = 1'b1;
  tap_state_e state;
  int checks = 0, failures = 0;

  jtag_tap_fsm dut (.tck, .trst_n, .tms, .state);

  always #5 tck = ~tck;

  initial begin : watchdog
    repeat (20000) @(posedge tck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // row i: state i, successor on TMS=0, successor on TMS=1
  tap_state_e tbl[16][3] = '{
    '{TEST_LOGIC_RESET, RUN_TEST_IDLE,   TEST_LOGIC_RESET},
    '{RUN_TEST_IDLE,    RUN_TEST_IDLE,   SELECT_DR_SCAN},
    '{SELECT_DR_SCAN,   CAPTURE_DR,      SELECT_IR_SCAN},
    '{CAPTURE_DR,       SHIFT_DR,        EXIT1_DR},
    '{SHIFT_DR,         SHIFT_DR,        EXIT1_DR},
    '{EXIT1_DR,         PAUSE_DR,        UPDATE_DR},
    '{PAUSE_DR,         PAUSE_DR,        EXIT2_DR},
    '{EXIT2_DR,         SHIFT_DR,        UPDATE_DR},
    '{UPDATE_DR,        RUN_TEST_IDLE,   SELECT_DR_SCAN},
    '{SELECT_IR_SCAN,   CAPTURE_IR,      TEST_LOGIC_RESET},
    '{CAPTURE_IR,       SHIFT_IR,        EXIT1_IR},
    '{SHIFT_IR,         SHIFT_IR,        EXIT1_IR},
    '{EXIT1_IR,         PAUSE_IR,        UPDATE_IR},
    '{PAUSE_IR,         PAUSE_IR,        EXIT2_IR},
    '{EXIT2_IR,         SHIFT_IR,        UPDATE_IR},
    '{UPDATE_IR,        RUN_TEST_IDLE,   SELECT_DR_SCAN}
  };

  function automatic tap_state_e ref_next(tap_state_e s, logic t);
    foreach (tbl[i]) if (tbl[i][0] == s) return t ? tbl[i][2] : tbl[i][1];
    return TEST_LOGIC_RESET;
  endfunction

  // TMS paths from Test-Logic-Reset to each state, in encoding order
  string path[16] = '{"", "0", "01", "010", "0100", "0101", "01010", "010101",
                      "01011", "011", "0110", "01100", "01101", "011010",
                      "0110101", "011011"};
  bit seen[16][2];
  tap_state_e model, start_s;
  int covered;

  initial begin
    #12;
    checks++;
    if (state != TEST_LOGIC_RESET) begin failures++; $display("FAIL trst"); end
    trst_n = 1'b1;
    model = TEST_LOGIC_RESET;
    for (int i = 0; i < 5000; i++) begin
      @(negedge tck);
      tms = ($urandom % 3) == 0;  // bias towards TMS=0 to reach deep states
      seen[int'(model)][tms] = 1'b1;
      @(posedge tck);
      #1;
      model = ref_next(model, tms);
      checks++;
      if (state != model) begin
        failures++;
        $display("FAIL step %0d: state %s expected %s", i, state.name(), model.name());
        model = state;
      end
    end
    covered = 0;
    foreach (seen[i, j]) covered += seen[i][j];
    checks++;
    if (covered != 32) begin failures++; $display("FAIL only %0d transitions", covered); end
    // five TMS=1 from every state
    for (int s = 0; s < 16; s++) begin
      @(negedge tck);
      trst_n = 1'b0;
      tms    = 1'b1;
      @(negedge tck);
      trst_n = 1'b1;
      // walk to state s along a fixed TMS path from Test-Logic-Reset
      start_s = tap_state_e'(s);
      foreach (path[s][k]) begin
        @(negedge tck);
        tms = path[s][k] == "1";
      end
      @(negedge tck);
      checks++;
      if (state != start_s) begin
        failures++;
        $display("FAIL path to %s ended in %s", start_s.name(), state.name());
      end
      repeat (5) begin
        @(negedge tck);
        tms = 1'b1;
      end
      @(negedge tck);
      checks++;
      if (state != TEST_LOGIC_RESET) begin
        failures++;
        $display("FAIL five TMS=1 from %s", start_s.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
