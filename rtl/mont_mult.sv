// High-radix (default radix-16) Montgomery modular multiplier.
//
// Computes p = a * b * R^-1 mod N with R = 2^W, without any division: the
// multiplier a is scanned one RB-bit digit a_i per clock from the least
// significant end, and each step adds a_i*B and a quotient multiple q_i*N
// chosen so that the low RB bits of the sum are zero, which makes the
// division by the radix a plain shift:
//     T   = S + a_i*B
//     q_i = (T mod 2^RB) * (-N^-1 mod 2^RB) mod 2^RB
//     S   = (T + q_i*N) / 2^RB
// Both a_i*B and q_i*N are read from lookup tables of digit multiples
// (mult_table), so a step needs only two additions. After W/RB steps S is
// below 2N whenever a*b < R*N, and one conditional subtraction reduces it
// below N. The internal sum is W+RB+2 bits wide.
//
// Interface: a one-cycle `start` samples a, b and n (n must be odd) while
// busy is low. `done` pulses for one cycle with p valid; p holds until the
// next result. Timing: done is high 2^RB + W/RB + 1 cycles after
// the clock edge that sampled start (81 cycles for W = 256, radix 16):
// 2^RB-1 cycles fill both tables, one cycle hands over, W/RB cycles run the
// digit steps and one cycle does the final subtraction.
//
// The radix-16, 256-bit configuration and the use of lookup tables follow
// the design; the recurrence details, table filling, on-chip computation of
// -N^-1 mod 2^RB and the handshake are this design's own choices.
module mont_mult #(
  parameter int unsigned W  = mont_pkg::KEY_BITS,
  parameter int unsigned RB = mont_pkg::RADIX_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] p
);

  localparam int unsigned DIGITS  = W / RB;
  localparam int unsigned SW      = W + RB + 2;   // width of the running sum
  localparam int unsigned CW      = $clog2(DIGITS + 1);

  typedef enum logic [1:0] {IDLE, FILL, LOOP, FIX} state_e;
  state_e state;

  logic [W-1:0]    a_sh;     // remaining digits of a, next digit at the bottom
  logic [W-1:0]    n_q;
  logic [SW-1:0]   s;
  logic [CW-1:0]   cnt;

  logic            b_rdy, n_rdy;
  logic [RB-1:0]   q;
  logic [W+RB-1:0] ab_mult, qn_mult;
  logic [RB-1:0]   ninv;
  logic [SW-1:0]   t, u;
  logic [W-1:0]    s_minus_n;

  mult_table #(.W(W), .RB(RB)) u_tab_b (
    .clk, .rst_n, .load(start && state == IDLE), .x(b),
    .ready(b_rdy), .sel(a_sh[RB-1:0]), .mult(ab_mult)
  );

  mult_table #(.W(W), .RB(RB)) u_tab_n (
    .clk, .rst_n, .load(start && state == IDLE), .x(n),
    .ready(n_rdy), .sel(q), .mult(qn_mult)
  );

  // Digit step: the product below is RB bits wide, i.e. taken mod 2^RB.
  assign ninv = RB'(mont_pkg::neg_inv_mod2k(16'(n_q)));
  assign t    = s + SW'(ab_mult);
  assign q    = t[RB-1:0] * ninv;
  assign u    = t + SW'(qn_mult);

  // Used only when N <= s < 2N, so the difference fits in W bits.
  assign s_minus_n = s[W-1:0] - n_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      a_sh  <= '0;
      n_q   <= '0;
      s     <= '0;
      cnt   <= '0;
      done  <= 1'b0;
      p     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          a_sh  <= a;
          n_q   <= n;
          s     <= '0;
          cnt   <= '0;
          state <= FILL;
        end
        FILL: if (b_rdy && n_rdy) state <= LOOP;
        LOOP: begin
          s    <= u >> RB;
          a_sh <= a_sh >> RB;
          cnt  <= cnt + CW'(1);
          if (cnt == CW'(DIGITS - 1)) state <= FIX;
        end
        FIX: begin
          // s < 2N here: one subtraction is enough.
          p     <= (s >= SW'(n_q)) ? s_minus_n : s[W-1:0];
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // The quotient digit only exists for an odd modulus; the radix must
  // divide the operand width.
  always_ff @(posedge clk) begin
    if (start && state == IDLE) begin
      assert (n[0]) else $error("mont_mult: even modulus");
    end
  end

  initial begin
    assert (W % RB == 0) else $fatal(1, "mont_mult: RB must divide W");
    assert (RB <= 16) else $fatal(1, "mont_mult: RB too large");
  end

endmodule
