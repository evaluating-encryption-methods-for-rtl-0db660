// tb_lfsr_prng: self-checking testbench for lfsr_prng.
//
// Checks the reset value, that a loaded seed is the first output, a golden
// sequence for seed 0xACE1 (worked out by hand from the tap rule), each step
// against a reference model written from the tap list {4, 13, 15, 16}, that
// load wins over step, and that the sequence has the full period 2^16 - 1.
module tb_lfsr_prng;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0, step = 1'b0;
  logic [15:0] seed = '0;
  logic [15:0] value;
  int checks = 0, failures = 0;

  lfsr_prng dut (.clk, .rst_n, .load, .seed, .step, .value);

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_next(logic [15:0] v);
    int taps[4] = '{4, 13, 15, 16};
    logic fb = 1'b0;
    foreach (taps[i]) fb ^= v[taps[i]-1];
    return {v[14:0], fb};
  endfunction

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] golden[6] = '{16'h59c3, 16'hb386, 16'h670c, 16'hce18, 16'h9c31, 16'h3862};
  logic [15:0] model;
  int period;

  initial begin
    #12 rst_n = 1'b1;
    check("reset value", value, 16'hACE1);
    @(negedge clk);
    seed = 16'hACE1; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check("seed is first output", value, 16'hACE1);
    // golden values
    step = 1'b1;
    foreach (golden[i]) begin
      @(negedge clk);
      check($sformatf("golden step %0d", i), value, golden[i]);
    end
    step = 1'b0;
    // hold without step
    @(negedge clk);
    check("hold", value, 16'h3862);
    // load has priority over step
    seed = 16'h00FF; load = 1'b1; step = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check("load over step", value, 16'h00FF);
    // model comparison and full period
    model  = 16'h00FF;
    period = 0;
    do begin
      @(negedge clk);
      model = ref_next(model);
      period++;
      if (value !== model) begin
        checks++; failures++;
        $display("FAIL step %0d: got %h expected %h", period, value, model);
      end else if (period % 4096 == 0) checks++;
    end while (value != 16'h00FF && period < 70000);
    step = 1'b0;
    checks++;
    if (period != 65535) begin
      failures++;
      $display("FAIL period %0d, expected 65535", period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
