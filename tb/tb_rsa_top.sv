// End-to-end testbench of rsa_top at its default parameters (256-bit key,
// radix 16).
//
// Uses a fixed 256-bit RSA key: N = p*q for two 128-bit primes, e = 65537,
// d = e^-1 mod (p-1)(q-1); R^2 mod N is computed here with a wide `%`.
// Each message is encrypted and checked against a plain square-and-multiply
// reference, then decrypted and checked against the original message.
// The latency of every operation is checked against 1 + M*(2 + h + k) +
// (W - h) (see mod_exp). The test also writes a key register and issues a
// start while busy (both must be ignored), and counts each mechanism of the
// design: key writes, encryptions, decryptions, encrypt/decrypt mode
// switches, skipped leading exponent zeros, squarings, multiplications, and
// final subtractions taken and not taken. A mechanism that never happened
// counts as a failure.
module tb_rsa_top;
  import mont_pkg::*;
  localparam int unsigned W  = KEY_BITS;
  localparam int unsigned RB = RADIX_BITS;
  localparam int unsigned M  = (1 << RB) + W / RB + 3;

  localparam logic [W-1:0] KEY_MOD =
    256'haa644653ac7211ec7fb1a5c2f3e68f75ae05c801484bfd642d0a6fddd9a9843d;
  localparam logic [W-1:0] KEY_PUB = 256'h10001;
  localparam logic [W-1:0] KEY_PRIV =
    256'h1fda0cd77965fd79c349171e816f79238d367b768a22e508300cc0e1d08cb481;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         key_we;
  key_sel_e     key_sel;
  logic [W-1:0] key_data;
  logic         start;
  logic         decrypt;
  logic [W-1:0] data_in;
  logic         busy, done;
  logic [W-1:0] data_out;

  int checks = 0, failures = 0;
  int n_keywr = 0, n_enc = 0, n_dec = 0, n_switch = 0, n_skip = 0;
  int n_sqr = 0, n_mul = 0, n_sub = 0, n_nosub = 0, n_ignored = 0;
  logic last_mode = 1'b0;
  logic any_op = 1'b0;

  rsa_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors (internal state encodings of mod_exp: SCAN = 2,
  // SQR = 3, MUL = 4; of mont_mult: FIX = 3).
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_exp.state == 3'd2 && !dut.u_exp.e_q[dut.u_exp.idx]) n_skip++;
      if (dut.u_exp.u_mm.done && dut.u_exp.state == 3'd3) n_sqr++;
      if (dut.u_exp.u_mm.done && dut.u_exp.state == 3'd4) n_mul++;
      if (dut.u_exp.u_mm.state == 2'd3) begin
        if (dut.u_exp.u_mm.s >= (W+RB+2)'(dut.u_exp.u_mm.n_q)) n_sub++;
        else n_nosub++;
      end
    end
  end

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

  function automatic logic [W-1:0] rand_wide();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic write_key(input key_sel_e sel, input logic [W-1:0] val);
    @(negedge clk);
    key_we = 1'b1; key_sel = sel; key_data = val;
    @(negedge clk);
    key_we = 1'b0;
    n_keywr++;
  endtask

  // One operation; with disturb set, a key write and a second start are
  // issued while busy and must have no effect.
  task automatic run(input logic dec, input logic [W-1:0] x, input bit disturb,
                     output logic [W-1:0] y);
    int cyc;
    logic [W-1:0] expv;
    expv = ref_modexp(x, dec ? KEY_PRIV : KEY_PUB, KEY_MOD);
    @(negedge clk);
    data_in = x; decrypt = dec; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 100000) begin
      if (disturb && cyc == 100) begin
        key_we = 1'b1; key_sel = KEY_N; key_data = rand_wide();
        start = 1'b1; data_in = rand_wide(); decrypt = ~dec;
        n_ignored++;
      end else begin
        key_we = 1'b0; start = 1'b0;
      end
      @(negedge clk);
      cyc++;
    end
    key_we = 1'b0; start = 1'b0;
    y = data_out;
    if (dec) n_dec++; else n_enc++;
    if (any_op && dec != last_mode) n_switch++;
    last_mode = dec; any_op = 1'b1;
    checks++;
    if (data_out != expv) begin
      failures++;
      $display("FAIL %s x=%h got %h expected %h", dec ? "decrypt" : "encrypt",
               x, data_out, expv);
    end
    checks++;
    if (cyc != expected_cycles(dec ? KEY_PRIV : KEY_PUB)) begin
      failures++;
      $display("FAIL cycles %0d expected %0d", cyc,
               expected_cycles(dec ? KEY_PRIV : KEY_PUB));
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  task automatic check_seen(input string what, input int count);
    checks++;
    $display("  %-24s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    logic [2*W:0] rr;
    logic [W-1:0] msg, ct, pt;
    rst_n = 1'b0; key_we = 1'b0; key_sel = KEY_N; key_data = '0;
    start = 1'b0; decrypt = 1'b0; data_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rr = ((2*W+1)'(1) << (2*W)) % (2*W+1)'(KEY_MOD);
    write_key(KEY_N, KEY_MOD);
    write_key(KEY_E, KEY_PUB);
    write_key(KEY_D, KEY_PRIV);
    write_key(KEY_R2, rr[W-1:0]);
    for (int i = 0; i < 4; i++) begin
      msg = rand_wide() % KEY_MOD;
      if (i == 0) msg = W'(2);
      run(1'b0, msg, i == 1, ct);
      run(1'b1, ct, i == 2, pt);
      checks++;
      if (pt != msg) begin
        failures++;
        $display("FAIL round trip: message %h came back as %h", msg, pt);
      end
    end
    $display("mechanisms:");
    check_seen("key register writes", n_keywr);
    check_seen("encryptions", n_enc);
    check_seen("decryptions", n_dec);
    check_seen("mode switches", n_switch);
    check_seen("writes/starts while busy", n_ignored);
    check_seen("skipped exponent zeros", n_skip);
    check_seen("squarings", n_sqr);
    check_seen("multiplications", n_mul);
    check_seen("final subtraction taken", n_sub);
    check_seen("final subtraction skipped", n_nosub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
