// Latency of the 256-bit RSA cipher at radix 2, 4 and 16 (RADIX_BITS 1, 2
// and 4), the three multiplier variants the design is compared across.
// Each variant runs one e = 65537 encryption and one full-width
// private-exponent operation on the same kind of random key, all results
// checked against a wide-integer reference. The radix-16 encryption must be
// at least 55% faster than the radix-2 one (the design aims at a reduction
// of nearly 60%); the reductions are printed.
module tb_radix_latency;
  logic clk = 1'b0;
  logic go = 1'b0;
  logic fin2, fin4, fin16;
  int   c2, c4, c16, f2, f4, f16;
  int   pub2, pub4, pub16, priv2, priv4, priv16;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsa_size_check #(.W(256), .RB(1)) u_r2  (.clk, .go(go),   .finished(fin2),
    .checks(c2),  .failures(f2),  .pub_cycles(pub2),  .priv_cycles(priv2));
  rsa_size_check #(.W(256), .RB(2)) u_r4  (.clk, .go(fin2), .finished(fin4),
    .checks(c4),  .failures(f4),  .pub_cycles(pub4),  .priv_cycles(priv4));
  rsa_size_check #(.W(256), .RB(4)) u_r16 (.clk, .go(fin4), .finished(fin16),
    .checks(c16), .failures(f16), .pub_cycles(pub16), .priv_cycles(priv16));

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c4 + c16, f2 + f4 + f16 + 1);
    $finish;
  end

  initial begin
    real red4, red16;
    repeat (2) @(posedge clk);
    go = 1'b1;
    wait (fin16);
    @(posedge clk);
    checks = c2 + c4 + c16;
    failures = f2 + f4 + f16;
    red4  = 100.0 * (1.0 - real'(pub4)  / real'(pub2));
    red16 = 100.0 * (1.0 - real'(pub16) / real'(pub2));
    $display("encryption latency reduction against radix 2: radix 4 %0.1f%%, radix 16 %0.1f%%",
             red4, red16);
    checks += 2;
    if (!(red16 >= 55.0)) begin
      failures++;
      $display("FAIL radix-16 reduction %0.1f%% below 55%%", red16);
    end
    if (!(pub16 < pub4 && pub4 < pub2 && priv16 < priv4 && priv4 < priv2)) begin
      failures++;
      $display("FAIL latency does not fall with the radix");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
