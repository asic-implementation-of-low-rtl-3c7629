// Checker used by tb_rsa_key_sizes: runs rsa_top at one key size.
//
// Instantiates rsa_top with KEY_BITS = W, loads a random odd modulus N with
// its top bit set, e = 65537, a random full-width d and R^2 mod N, then
// encrypts and "decrypts" one random block each and compares both results
// with a square-and-multiply reference using wide `%`. (A random N is not an
// RSA modulus, so the two results are checked separately rather than as a
// round trip.) Raises `finished` with its check and failure counts and the
// cycle counts of the public- and private-exponent operations. The
// latency is checked against 1 + M*(2 + h + k) + (W - h),
// M = 2^RB + W/RB + 3.
module rsa_size_check #(
  parameter int unsigned W  = 1024,
  parameter int unsigned RB = 4
) (
  input  logic clk,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   pub_cycles,
  output int   priv_cycles
);
  import mont_pkg::*;
  localparam int unsigned M = (1 << RB) + W / RB + 3;

  logic         rst_n;
  logic         key_we;
  key_sel_e     key_sel;
  logic [W-1:0] key_data;
  logic         start;
  logic         decrypt;
  logic [W-1:0] data_in;
  logic         busy, done;
  logic [W-1:0] data_out;

  rsa_top #(.KEY_BITS(W), .RADIX_BITS(RB)) dut (.*);

  function automatic logic [W-1:0] rand_wide();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [W-1:0] ref_modexp(input logic [W-1:0] x,
                                              input logic [W-1:0] e,
                                              input logic [W-1:0] nv);
    logic [2*W-1:0] r;
    r = (2*W)'(1) % (2*W)'(nv);
    for (int i = W - 1; i >= 0; i--) begin
      r = (r * r) % (2*W)'(nv);
      if (e[i]) r = (r * (2*W)'(x)) % (2*W)'(nv);
    end
    return r[W-1:0];
  endfunction

  function automatic int expected_cycles(input logic [W-1:0] e);
    int h, k;
    h = -1; k = 0;
    for (int i = 0; i < W; i++) if (e[i]) h = i;
    if (h < 0) return 1 + M + W;
    for (int i = 0; i < h; i++) if (e[i]) k++;
    return 1 + M * (2 + h + k) + (W - h);
  endfunction

  task automatic write_key(input key_sel_e sel, input logic [W-1:0] val);
    @(negedge clk);
    key_we = 1'b1; key_sel = sel; key_data = val;
    @(negedge clk);
    key_we = 1'b0;
  endtask

  task automatic run(input logic dec, input logic [W-1:0] x,
                     input logic [W-1:0] e, input logic [W-1:0] nv,
                     output int cyc_out);
    int cyc;
    logic [W-1:0] expv;
    expv = ref_modexp(x, e, nv);
    @(negedge clk);
    data_in = x; decrypt = dec; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 10000000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (data_out != expv) begin
      failures++;
      $display("FAIL W=%0d %s result mismatch", W, dec ? "decrypt" : "encrypt");
    end
    checks++;
    if (cyc != expected_cycles(e)) begin
      failures++;
      $display("FAIL W=%0d cycles %0d expected %0d", W, cyc, expected_cycles(e));
    end
    $display("  W=%0d radix %0d %s: %0d cycles", W, 1 << RB,
             dec ? "private exponent" : "e = 65537", cyc);
    cyc_out = cyc;
  endtask

  initial begin
    logic [W-1:0] nv, dv;
    logic [2*W-1:0] rr;
    checks = 0; failures = 0; finished = 1'b0; pub_cycles = 0; priv_cycles = 0;
    rst_n = 1'b0; key_we = 1'b0; key_sel = KEY_N; key_data = '0;
    start = 1'b0; decrypt = 1'b0; data_in = '0;
    wait (go);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    nv = rand_wide() | {1'b1, {(W-1){1'b0}}} | W'(1);
    dv = rand_wide() | {1'b1, {(W-1){1'b0}}};
    // R^2 mod N = 2 * (2^(2W-1) mod N) mod N, kept within 2W bits.
    rr = ((2*W)'(1) << (2*W-1)) % (2*W)'(nv);
    rr = (rr << 1) % (2*W)'(nv);
    write_key(KEY_N, nv);
    write_key(KEY_E, W'(65537));
    write_key(KEY_D, dv);
    write_key(KEY_R2, rr[W-1:0]);
    run(1'b0, rand_wide() % nv, W'(65537), nv, pub_cycles);
    run(1'b1, rand_wide() % nv, dv, nv, priv_cycles);
    finished = 1'b1;
  end
endmodule
