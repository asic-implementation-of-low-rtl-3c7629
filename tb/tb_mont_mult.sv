// Self-checking testbench of mont_mult, the radix-16 Montgomery multiplier.
//
// For random odd moduli N with the top bit set and random a, b < N (plus
// corner operands 0, 1 and N-1, and a modulus of 3), checks that the result
// p satisfies p < N and p*R = a*b (mod N), with R = 2^W, evaluated here
// with wide integer arithmetic. Also checks that done arrives exactly
// 2^RB + W/RB + 1 cycles after the start edge and that busy is high
// meanwhile. Default parameters (256 bits, radix 16).
module tb_mont_mult;
  localparam int unsigned W  = 256;
  localparam int unsigned RB = 4;
  localparam int unsigned LATENCY = (1 << RB) + W / RB + 1;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start;
  logic [W-1:0] a, b, n;
  logic         busy, done;
  logic [W-1:0] p;

  int checks = 0, failures = 0;

  mont_mult #(.W(W), .RB(RB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic run(input logic [W-1:0] av, input logic [W-1:0] bv,
                     input logic [W-1:0] nv);
    int cyc;
    logic [2*W+1:0] lhs, rhs;
    @(negedge clk);
    a = av; b = bv; n = nv; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;   // cycles after the start edge
    while (!done && cyc < 1000) begin
      if (!busy) begin
        failures++;
        $display("FAIL busy low during operation");
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != LATENCY) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cyc, LATENCY);
    end
    lhs = ({(W+2)'(0), p} << W) % (2*W+2)'(nv);
    rhs = ((2*W+2)'(av) * (2*W+2)'(bv)) % (2*W+2)'(nv);
    checks++;
    if (p >= nv || lhs != rhs) begin
      failures++;
      $display("FAIL a=%h b=%h n=%h p=%h", av, bv, nv, p);
    end
  endtask

  initial begin
    logic [W-1:0] nv;
    rst_n = 1'b0; start = 1'b0; a = '0; b = '0; n = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    nv = rand_wide() | {1'b1, {(W-1){1'b0}}} | W'(1);
    run('0, rand_wide() % nv, nv);
    run(rand_wide() % nv, '0, nv);
    run(W'(1), W'(1), nv);
    run(nv - 1, nv - 1, nv);
    run(nv - 1, W'(1), nv);
    run(W'(2), W'(1), W'(3));
    run('1, '1, '1);
    for (int i = 0; i < 200; i++) begin
      nv = rand_wide() | W'(1);
      if (i % 2 == 0) nv[W-1] = 1'b1;
      run(rand_wide() % nv, rand_wide() % nv, nv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
