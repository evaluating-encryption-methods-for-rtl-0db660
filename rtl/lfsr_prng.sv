// lfsr_prng: 16-bit Fibonacci LFSR pseudo-random number generator.
//
// On `load` the register takes `seed`, and that seed is the first output.
// Each cycle with `step` high the bits at positions 4, 13, 15 and 16 of the
// current output (counted from 1 at the LSB) are XORed, the register shifts
// one place towards the MSB (the old MSB is dropped) and the XOR result
// enters at the LSB. With these taps (x^16 + x^15 + x^13 + x^4 + 1) every
// non-zero seed runs through all 2^16 - 1 non-zero values before repeating.
//
// The width, taps, left shift and "seed is the first output" follow the
// design description. The asynchronous reset value RESET_SEED (Hamming
// weight 8, as the description asks of a seed), giving `load` priority over
// `step`, and the synchronous load port are this design's own choices.
//
// Interface: clk, rst_n (async, active low), load/seed, step, value.
// Timing: `value` changes one clock after load or step; one number per clock.
module lfsr_prng #(
  parameter int unsigned           WIDTH      = 16,
  // bit i set = position i+1 is a tap
  parameter logic [WIDTH-1:0]      TAP_MASK   = 16'hD008,
  parameter logic [WIDTH-1:0]      RESET_SEED = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             step,
  output logic [WIDTH-1:0] value
);

  logic feedback;
  assign feedback = ^(value & TAP_MASK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      value <= RESET_SEED;
    else if (load)   value <= seed;
    else if (step)   value <= {value[WIDTH-2:0], feedback};
  end

endmodule
