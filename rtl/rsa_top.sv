// RSA cipher unit built on radix-16 Montgomery modular exponentiation.
//
// Stores one RSA key (modulus N, public exponent e, private exponent d) and
// the Montgomery constant R^2 mod N (R = 2^KEY_BITS), and on request
// encrypts a block (data_out = data_in^e mod N) or decrypts one
// (data_out = data_in^d mod N) with the mod_exp exponentiator.
//
// Interface: key registers are written through key_we / key_sel / key_data
// (key_sel values as in mont_pkg::key_sel_e); writes are ignored while busy.
// A one-cycle `start` while busy is low samples data_in (which must be
// below N) and `decrypt` (0 selects e, 1 selects d). `done` pulses for one
// cycle with data_out valid; data_out holds until the next result.
// Timing: the exponentiation begins one clock after start, so done is high
// 1 + (mod_exp latency) cycles after the start edge: 83 cycles per
// Montgomery multiplication step in the default configuration, about 1.5
// steps per exponent bit. Encryption with e = 65537 takes 1818 cycles, a
// decryption with a full 256-bit private exponent about 32,000.
//
// The 256-bit key and radix-16 multiplier follow the design; the key
// register interface, the supplied R^2 mod N and the decrypt select are
// this design's own choices.
module rsa_top #(
  parameter int unsigned KEY_BITS   = mont_pkg::KEY_BITS,
  parameter int unsigned RADIX_BITS = mont_pkg::RADIX_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                key_we,
  input  mont_pkg::key_sel_e  key_sel,
  input  logic [KEY_BITS-1:0] key_data,
  input  logic                start,
  input  logic                decrypt,
  input  logic [KEY_BITS-1:0] data_in,
  output logic                busy,
  output logic                done,
  output logic [KEY_BITS-1:0] data_out
);

  import mont_pkg::*;

  logic [KEY_BITS-1:0] key_n, key_e, key_d, key_r2;
  logic [KEY_BITS-1:0] msg_q;
  logic                dec_q;
  logic                exp_start, exp_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_n     <= '0;
      key_e     <= '0;
      key_d     <= '0;
      key_r2    <= '0;
      msg_q     <= '0;
      dec_q     <= 1'b0;
      exp_start <= 1'b0;
    end else begin
      exp_start <= 1'b0;
      if (key_we && !busy) begin
        unique case (key_sel)
          KEY_N:  key_n  <= key_data;
          KEY_E:  key_e  <= key_data;
          KEY_D:  key_d  <= key_data;
          KEY_R2: key_r2 <= key_data;
          default: ;
        endcase
      end
      if (start && !busy) begin
        msg_q     <= data_in;
        dec_q     <= decrypt;
        exp_start <= 1'b1;
      end
    end
  end

  mod_exp #(.W(KEY_BITS), .RB(RADIX_BITS)) u_exp (
    .clk, .rst_n,
    .start    (exp_start),
    .base     (msg_q),
    .exponent (dec_q ? key_d : key_e),
    .modulus  (key_n),
    .r2       (key_r2),
    .busy     (exp_busy),
    .done,
    .result   (data_out)
  );

  assign busy = exp_start || exp_busy;

endmodule
