// Self-checking testbench of mod_exp, the Montgomery modular exponentiator.
//
// Runs base^e mod N for random odd 256-bit moduli, random bases below N and
// exponents that are random, zero, one, two, all ones, 65537 and short
// (to exercise leading-zero skipping). The expected value comes from a
// plain square-and-multiply with wide `%` reduction, and R^2 mod N from a
// wide `%`, both computed here. The cycle count is checked against
// M*(2 + h + k) + (W - h) with M = 2^RB + W/RB + 3, h the top one bit of e
// and k the number of one bits below it (M + W for e = 0).
module tb_mod_exp;
  localparam int unsigned W  = 256;
  localparam int unsigned RB = 4;
  localparam int unsigned M  = (1 << RB) + W / RB + 3;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start;
  logic [W-1:0] base, exponent, modulus, r2;
  logic         busy, done;
  logic [W-1:0] result;

  int checks = 0, failures = 0;

  mod_exp #(.W(W), .RB(RB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    if (h < 0) return M + W;
    for (int i = 0; i < h; i++) if (e[i]) k++;
    return M * (2 + h + k) + (W - h);
  endfunction

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] e,
                     input logic [W-1:0] nv);
    int cyc;
    logic [W-1:0] expv;
    logic [2*W:0] rr;
    rr = ((2*W+1)'(1) << (2*W)) % (2*W+1)'(nv);
    @(negedge clk);
    base = x; exponent = e; modulus = nv; r2 = rr[W-1:0]; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 200000) begin
      @(negedge clk);
      cyc++;
    end
    expv = ref_modexp(x, e, nv);
    checks++;
    if (result != expv) begin
      failures++;
      $display("FAIL x=%h e=%h n=%h got %h expected %h", x, e, nv, result, expv);
    end
    checks++;
    if (cyc != expected_cycles(e)) begin
      failures++;
      $display("FAIL cycles %0d expected %0d", cyc, expected_cycles(e));
    end
  endtask

  initial begin
    logic [W-1:0] nv;
    rst_n = 1'b0; start = 1'b0; base = '0; exponent = '0; modulus = '0; r2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    nv = rand_wide() | {1'b1, {(W-1){1'b0}}} | W'(1);
    run(rand_wide() % nv, '0, nv);
    run(rand_wide() % nv, W'(1), nv);
    run(rand_wide() % nv, W'(2), nv);
    run(rand_wide() % nv, W'(65537), nv);
    run(nv - 1, W'(3), nv);
    run('0, W'(5), nv);
    run(rand_wide() % nv, '1, nv);
    for (int i = 0; i < 6; i++) begin
      nv = rand_wide() | W'(1);
      run(rand_wide() % nv, rand_wide(), nv);
      run(rand_wide() % nv, rand_wide() >> ($urandom % W), nv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
