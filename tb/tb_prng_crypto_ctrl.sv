// tb_prng_crypto_ctrl: self-checking testbench for prng_crypto_ctrl.
//
// The two exponentiation units are replaced by simple models that answer
// after a fixed delay: the "decryption" returns a plaintext chosen by the
// testbench, the "encryption" returns a tagged copy of the PRNG value, and a
// reference LFSR follows prng_load / prng_step. Checks the seed -> load ->
// encrypt -> ready flow, one PRNG step per read, that a read while busy is
// ignored, rejection of invalid seeds, a seed arriving while busy and that
// the encryption starts only after the PRNG has stepped.
module tb_prng_crypto_ctrl;
  localparam int W = 64;
  localparam int LAT = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic seed_strobe = 1'b0, take_strobe = 1'b0;
  logic ready, seed_error, seeded;
  logic [W-1:0] cipher;
  logic prng_load, prng_step;
  logic [15:0] prng_seed;
  logic dec_start, dec_done, enc_start, enc_done;
  logic [W-1:0] dec_result, enc_result;
  int checks = 0, failures = 0;

  prng_crypto_ctrl dut (.clk, .rst_n, .seed_strobe, .take_strobe, .ready, .seed_error,
                        .cipher, .prng_load, .prng_seed, .prng_step, .seeded,
                        .dec_start, .dec_done, .dec_result, .enc_start, .enc_done,
                        .enc_result);

  always #5 clk = ~clk;

  // reference PRNG
  logic [15:0] prng;
  int loads = 0, steps = 0, enc_starts = 0, dec_starts = 0, order_err = 0;
  logic stepped_last;
  function automatic logic [15:0] lfsr_next(logic [15:0] v);
    return {v[14:0], v[15] ^ v[14] ^ v[12] ^ v[3]};
  endfunction

  // unit models
  logic [W-1:0] plain;
  int dec_cnt = 0, enc_cnt = 0;
  always @(posedge clk) begin
    dec_done <= 1'b0;
    enc_done <= 1'b0;
    stepped_last <= prng_step;
    if (prng_load) begin prng <= prng_seed; loads++; end
    if (prng_step) begin prng <= lfsr_next(prng); steps++; end
    if (enc_start && prng_step) order_err++;
    if (dec_start) begin dec_cnt <= LAT; dec_starts++; end
    else if (dec_cnt > 0) begin
      dec_cnt <= dec_cnt - 1;
      if (dec_cnt == 1) begin dec_done <= 1'b1; dec_result <= plain; end
    end
    if (enc_start) begin enc_cnt <= LAT; enc_starts++; enc_result <= {48'hC1F0_0000_0000, prng}; end
    else if (enc_cnt > 0) begin
      enc_cnt <= enc_cnt - 1;
      if (enc_cnt == 1) enc_done <= 1'b1;
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic pulse_seed(logic [W-1:0] p);
    @(negedge clk);
    plain = p;
    seed_strobe = 1'b1;
    @(negedge clk);
    seed_strobe = 1'b0;
  endtask

  task automatic take();
    @(negedge clk);
    take_strobe = 1'b1;
    @(negedge clk);
    take_strobe = 1'b0;
  endtask

  task automatic wait_ready();
    int guard = 0;
    while (!ready && guard < 500) begin @(negedge clk); guard++; end
  endtask

  logic [15:0] expv;
  initial begin
    plain = '0; dec_result = '0; enc_result = '0; prng = '0;
    dec_done = 1'b0; enc_done = 1'b0;
    #12 rst_n = 1'b1;
    check("not ready after reset", {seeded, ready}, 2'b00);
    pulse_seed(64'hACE1);
    wait_ready();
    check("ready after seed", ready, 1'b1);
    check("seeded", seeded, 1'b1);
    check("first output is the seed", cipher, {48'hC1F0_0000_0000, 16'hACE1});
    expv = 16'hACE1;
    for (int i = 0; i < 4; i++) begin
      take();
      check("ready drops after read", ready, 1'b0);
      // a read while busy must be ignored
      take();
      wait_ready();
      expv = lfsr_next(expv);
      check($sformatf("output %0d", i + 1), cipher, {48'hC1F0_0000_0000, expv});
    end
    check("one step per read", steps, 4);
    // invalid seeds: too wide, zero
    pulse_seed(64'h1_0001);
    repeat (LAT + 5) @(negedge clk);
    check("wide seed rejected", {seed_error, ready, seeded}, 3'b100);
    pulse_seed(64'h0);
    repeat (LAT + 5) @(negedge clk);
    check("zero seed rejected", {seed_error, ready}, 2'b10);
    check("no load for invalid seeds", loads, 1);
    // a new seed clears the error; a second seed during the encryption wins
    pulse_seed(64'h1234);
    repeat (LAT + 5) @(negedge clk);
    pulse_seed(64'h8421);                // arrives while encrypting 0x1234
    wait_ready();
    check("seed error cleared", seed_error, 1'b0);
    repeat (2 * LAT + 10) @(negedge clk);
    wait_ready();
    check("pending seed applied", cipher, {48'hC1F0_0000_0000, 16'h8421});
    check("decryptions started", dec_starts, 5);
    check("encryption never with step", order_err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
