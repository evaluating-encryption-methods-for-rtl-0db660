// rsa_modexp: RSA modular exponentiation, result = base^exponent mod modulus.
//
// Serves both RSA directions of the design: with the private key (n, d) it
// decrypts x = y^d mod n, with the public key (n, e) it encrypts
// y = x^e mod n. Left-to-right binary exponentiation over all WIDTH exponent
// bits, "square and multiply always": for every bit the running value is
// squared and then multiplied by the base, and the product is kept only when
// the bit is 1. The number of clocks therefore does not depend on the key or
// the data, which closes the timing side channel. The base is first reduced
// mod n (base * 1 mod n), so any WIDTH-bit input is accepted.
//
// The operand width (64-bit keys) and the RSA equations follow the design
// description; the exponentiation schedule, the single shared bit-serial
// multiplier (rsa_modmul) and the handshake are this design's own choices.
//
// Interface: start (one clock; base, exponent and modulus sampled), busy,
// done (one-clock pulse, result valid and held until the next start).
// Requires an odd modulus > 1 with its top bit anywhere.
// Timing: done rises (2*WIDTH+1)*(WIDTH+2) clocks after the start
// clock (8514 clocks for WIDTH = 64).
module rsa_modexp #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] base,
  input  logic [WIDTH-1:0] exponent,
  input  logic [WIDTH-1:0] modulus,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] result
);

  localparam int unsigned IW = $clog2(WIDTH);

  typedef enum logic [1:0] {S_IDLE, S_REDUCE, S_SQUARE, S_MULTIPLY} state_e;

  state_e           state;
  logic [WIDTH-1:0] base_q, exp_q, n_q, base_red, acc;
  logic [IW-1:0]    idx;
  logic             mm_go, mm_busy, mm_done;
  logic [WIDTH-1:0] mm_a, mm_b, mm_p;

  always_comb begin
    unique case (state)
      S_REDUCE:   begin mm_a = base_q;   mm_b = WIDTH'(1); end
      S_SQUARE:   begin mm_a = acc;      mm_b = acc;       end
      default:    begin mm_a = base_red; mm_b = acc;       end
    endcase
  end

  rsa_modmul #(.WIDTH(WIDTH)) u_modmul (
    .clk  (clk),
    .rst_n(rst_n),
    .start(mm_go),
    .a    (mm_a),
    .b    (mm_b),
    .n    (n_q),
    .busy (mm_busy),
    .done (mm_done),
    .p    (mm_p)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      base_q   <= '0;
      exp_q    <= '0;
      n_q      <= '0;
      base_red <= '0;
      acc      <= '0;
      idx      <= '0;
      mm_go    <= 1'b0;
      done     <= 1'b0;
      result   <= '0;
    end else begin
      mm_go <= 1'b0;
      done  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          base_q <= base;
          exp_q  <= exponent;
          n_q    <= modulus;
          state  <= S_REDUCE;
          mm_go  <= 1'b1;
        end
        S_REDUCE: if (mm_done) begin
          base_red <= mm_p;
          acc      <= WIDTH'(1);
          idx      <= IW'(WIDTH - 1);
          state    <= S_SQUARE;
          mm_go    <= 1'b1;
        end
        S_SQUARE: if (mm_done) begin
          acc   <= mm_p;
          state <= S_MULTIPLY;
          mm_go <= 1'b1;
        end
        S_MULTIPLY: if (mm_done) begin
          if (exp_q[WIDTH-1]) acc <= mm_p;
          exp_q <= {exp_q[WIDTH-2:0], 1'b0};
          if (idx == '0) begin
            state  <= S_IDLE;
            done   <= 1'b1;
            result <= exp_q[WIDTH-1] ? mm_p : acc;
          end else begin
            idx   <= idx - 1'b1;
            state <= S_SQUARE;
            mm_go <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The multiplier is only launched while it is idle.
  assert property (@(posedge clk) disable iff (!rst_n) mm_go |-> !mm_busy);

endmodule
