// tb_jtag_ir: self-checking testbench for jtag_ir.
//
// Drives the TAP state directly: checks the reset instruction (BYPASS), that
// Capture-IR loads the 0001 pattern which then shifts out LSB first, that
// bits shifted in are copied to the instruction only in Update-IR, and that
// Test-Logic-Reset restores BYPASS.
module tb_jtag_ir;
  import secure_debug_pkg::*;
  logic tck = 1'b0, trst_n = 1'b0, tdi = 1'b0;
  tap_state_e state = TEST_LOGIC_RESET;
  logic so;
  ir_t  instr;
  int checks = 0, failures = 0;

  jtag_ir dut (.tck, .trst_n, .state, .tdi, .so, .instr);

  always #5 tck = ~tck;

  initial begin : watchdog
    repeat (2000) @(posedge tck);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic clock_in(tap_state_e s, logic d);
    @(negedge tck);
    state = s;
    tdi   = d;
    @(posedge tck);
    #1;
  endtask

  task automatic load_ir(logic [3:0] code, output logic [3:0] captured);
    clock_in(CAPTURE_IR, 1'b0);
    for (int i = 0; i < 4; i++) begin
      captured[i] = so;
      clock_in(SHIFT_IR, code[i]);
    end
    clock_in(EXIT1_IR, 1'b0);
    check("instr unchanged before Update-IR", instr, 4'hF);
    clock_in(UPDATE_IR, 1'b0);
  endtask

  logic [3:0] cap;
  initial begin
    #12 trst_n = 1'b1;
    check("reset instruction", instr, 4'hF);
    load_ir(4'h1, cap);
    check("captured pattern", cap, 4'b0001);
    check("instruction SEED", instr, 4'h1);
    clock_in(RUN_TEST_IDLE, 1'b1);
    check("instruction held", instr, 4'h1);
    clock_in(TEST_LOGIC_RESET, 1'b0);
    check("Test-Logic-Reset gives BYPASS", instr, 4'hF);
    load_ir(4'h2, cap);
    check("captured pattern again", cap, 4'b0001);
    check("instruction RESULT", instr, 4'h2);
    clock_in(TEST_LOGIC_RESET, 1'b0);
    load_ir(4'hA, cap);
    check("instruction A", instr, 4'hA);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
