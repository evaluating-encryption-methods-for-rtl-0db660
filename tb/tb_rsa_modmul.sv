// tb_rsa_modmul: self-checking testbench for rsa_modmul.
//
// Random 64-bit operands with an odd modulus are multiplied and compared with
// a 128-bit product reduced by the simulator's own % operator. Also checks an
// operand a >= n (reduction by b = 1) and the fixed latency of WIDTH clocks
// from the start clock to done.
module tb_rsa_modmul;
  localparam int W = 64;
  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] a, b, n;
  logic         busy, done;
  logic [W-1:0] p;
  int checks = 0, failures = 0;

  rsa_modmul dut (.clk, .rst_n, .start, .a, .b, .n, .busy, .done, .p);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [W-1:0] ta, logic [W-1:0] tb_, logic [W-1:0] tn);
    logic [2*W-1:0] prod;
    logic [W-1:0]   expv;
    int cycles = 0;
    prod = {{W{1'b0}}, ta} * {{W{1'b0}}, tb_};
    expv = W'(prod % {{W{1'b0}}, tn});
    @(negedge clk);
    a = ta; b = tb_; n = tn; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (p !== expv) begin
      failures++;
      $display("FAIL %h * %h mod %h = %h, expected %h", ta, tb_, tn, p, expv);
    end
    checks++;
    if (cycles != W) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, W);
    end
  endtask

  logic [W-1:0] rn, rb;
  initial begin
    a = '0; b = '0; n = 64'd3;
    #12 rst_n = 1'b1;
    run(64'd7, 64'd9, 64'd11);
    run(64'hFFFF_FFFF_FFFF_FFFF, 64'd1, 64'hFFFF_FFEA_0000_0055);  // a >= n
    run(64'hFFFF_FFEA_0000_0054, 64'hFFFF_FFEA_0000_0054, 64'hFFFF_FFEA_0000_0055);
    for (int i = 0; i < 200; i++) begin
      rn = {$urandom, $urandom} | 64'h1;
      if (i % 3 == 0) rn[W-1] = 1'b1;
      rb = {$urandom, $urandom} % rn;
      run({$urandom, $urandom}, rb, rn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
