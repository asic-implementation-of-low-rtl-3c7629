// Montgomery modular exponentiation: result = base^exponent mod N.
//
// One Montgomery multiplier (mont_mult) is reused for every step of a
// left-to-right binary square-and-multiply:
//   1. xm  = MM(base, R^2 mod N)        base in Montgomery form, base*R mod N
//   2. scan the exponent from its top bit; leading zero bits cost one cycle
//      each and the first one bit sets acc = xm without a multiplication
//   3. for every lower bit: acc = MM(acc, acc), and if the bit is one also
//      acc = MM(acc, xm)
//   4. result = MM(acc, 1)              back out of Montgomery form
// MM(x, y) = x*y*R^-1 mod N with R = 2^W. An all-zero exponent gives 1.
//
// Interface: a one-cycle `start` while busy is low samples base (< N),
// exponent, the odd modulus N > 1 and r2 = R^2 mod N. `done` pulses for one
// cycle with result valid; result holds until the next operation.
// Timing: each multiplication step takes M = 2^RB + W/RB + 3 cycles (83 for
// the default 256-bit radix-16 configuration: one cycle to issue it, the
// multiplier's latency and one cycle to take the result), each exponent bit
// scanned before and including the top one bit takes one cycle. With h the
// index of the exponent's top one bit and k the number of one bits below
// it, done is high M*(2 + h + k) + (W - h) cycles after the start edge
// (M + W for a zero exponent); for a 256-bit exponent with its top bit set
// and half its bits one this is about 32,000 cycles, for e = 65537 it is
// M*19 + 240 = 1817 cycles.
//
// Exponentiation by repeated Montgomery multiplications follows the design;
// the scan order, leading-zero skipping and domain conversion with a
// supplied R^2 mod N are this design's own choices.
module mod_exp #(
  parameter int unsigned W  = mont_pkg::KEY_BITS,
  parameter int unsigned RB = mont_pkg::RADIX_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] base,
  input  logic [W-1:0] exponent,
  input  logic [W-1:0] modulus,
  input  logic [W-1:0] r2,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] result
);

  localparam int unsigned IW = $clog2(W);

  typedef enum logic [2:0] {IDLE, CONV, SCAN, SQR, MUL, OUT} state_e;
  state_e state;

  logic [W-1:0]  base_q, e_q, n_q, r2_q;
  logic [W-1:0]  xm;        // base * R mod N
  logic [W-1:0]  acc;       // running power, Montgomery form
  logic [IW-1:0] idx;       // exponent bit being processed
  logic          mm_wait;   // multiplication issued, waiting for done

  logic          mm_start, mm_busy, mm_done;
  logic [W-1:0]  mm_a, mm_b, mm_p;

  always_comb begin
    mm_a = acc;
    mm_b = acc;
    unique case (state)
      CONV:    begin mm_a = base_q; mm_b = r2_q; end
      MUL:     begin mm_a = acc;    mm_b = xm;   end
      OUT:     begin mm_a = acc;    mm_b = W'(1); end
      default: ;
    endcase
  end

  assign mm_start = !mm_wait &&
                    (state == CONV || state == SQR || state == MUL || state == OUT);

  mont_mult #(.W(W), .RB(RB)) u_mm (
    .clk, .rst_n, .start(mm_start), .a(mm_a), .b(mm_b), .n(n_q),
    .busy(mm_busy), .done(mm_done), .p(mm_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      base_q  <= '0;
      e_q     <= '0;
      n_q     <= '0;
      r2_q    <= '0;
      xm      <= '0;
      acc     <= '0;
      idx     <= '0;
      mm_wait <= 1'b0;
      done    <= 1'b0;
      result  <= '0;
    end else begin
      done <= 1'b0;
      if (mm_start) mm_wait <= 1'b1;
      if (mm_done)  mm_wait <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          base_q <= base;
          e_q    <= exponent;
          n_q    <= modulus;
          r2_q   <= r2;
          state  <= CONV;
        end
        CONV: if (mm_done) begin
          xm    <= mm_p;
          idx   <= IW'(W - 1);
          state <= SCAN;
        end
        SCAN: begin
          if (e_q[idx]) begin
            acc <= xm;
            if (idx == '0) state <= OUT;
            else begin
              idx   <= idx - IW'(1);
              state <= SQR;
            end
          end else if (idx == '0) begin
            // Zero exponent: x^0 = 1.
            result <= W'(1);
            done   <= 1'b1;
            state  <= IDLE;
          end else begin
            idx <= idx - IW'(1);
          end
        end
        SQR: if (mm_done) begin
          acc <= mm_p;
          if (e_q[idx]) state <= MUL;
          else if (idx == '0) state <= OUT;
          else idx <= idx - IW'(1);
        end
        MUL: if (mm_done) begin
          acc <= mm_p;
          if (idx == '0) state <= OUT;
          else begin
            idx   <= idx - IW'(1);
            state <= SQR;
          end
        end
        OUT: if (mm_done) begin
          result <= mm_p;
          done   <= 1'b1;
          state  <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // The multiplier must be idle whenever a new multiplication is issued.
  always_ff @(posedge clk) begin
    if (mm_start) assert (!mm_busy) else $error("mod_exp: multiplier busy");
  end

endmodule
