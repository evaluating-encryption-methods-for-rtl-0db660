// rsa_modmul: bit-serial (interleaved) modular multiplier, p = a * b mod n.
//
// Scans `a` from its MSB, one bit per clock: r <- 2r + a[i]*b, reduced into
// [0, n) after each step by at most two conditional subtractions of n. The
// invariant r < n holds as long as b < n; `a` may be any WIDTH-bit value, so
// a*1 mod n also reduces an arbitrary operand. Constant time: WIDTH clocks
// per product whatever the operands, which gives away nothing through timing.
//
// The design description only asks for y = x^e mod n; this multiplier
// structure is this design's own choice as the simplest that does it.
//
// Interface: start (one clock, operands sampled), busy, done (one-clock pulse
// with p valid; p holds until the next start). n must be odd or at least > b.
// Timing: done rises WIDTH clocks after the start clock.
module rsa_modmul #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] n,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] p
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] a_q, b_q, n_q;
  logic [CW-1:0]    cnt;
  logic [WIDTH+1:0] r_dbl, r_add, r_sub1, r_next;

  // One interleaved step on the running remainder p (< n).
  always_comb begin
    r_dbl  = {1'b0, p, 1'b0};
    r_sub1 = (r_dbl >= {2'b00, n_q}) ? r_dbl - {2'b00, n_q} : r_dbl;
    r_add  = r_sub1 + (a_q[WIDTH-1] ? {2'b00, b_q} : '0);
    r_next = (r_add >= {2'b00, n_q}) ? r_add - {2'b00, n_q} : r_add;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      n_q  <= '0;
      p    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        a_q  <= a;
        b_q  <= b;
        n_q  <= n;
        p    <= '0;
        cnt  <= CW'(WIDTH);
        busy <= 1'b1;
      end else if (busy) begin
        p   <= r_next[WIDTH-1:0];
        a_q <= {a_q[WIDTH-2:0], 1'b0};
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
