// Runs the RSA cipher at the three key sizes the design is meant to be
// evaluated with: 256, 1024 and 2048 bits (radix 16 throughout), one after
// the other, each with one public-exponent and one full-width
// private-exponent operation checked against a wide-integer reference.
// The 256-bit size is the default configuration; the other two override
// KEY_BITS.
module tb_rsa_key_sizes;
  logic clk = 1'b0;
  logic go256 = 1'b0;
  logic fin256, fin1024, fin2048;
  int   c256, c1024, c2048, f256, f1024, f2048;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsa_size_check #(.W(256))  u_256  (.clk, .go(go256),   .finished(fin256),
                                     .checks(c256),  .failures(f256),
                                     .pub_cycles(), .priv_cycles());
  rsa_size_check #(.W(1024)) u_1024 (.clk, .go(fin256),  .finished(fin1024),
                                     .checks(c1024), .failures(f1024),
                                     .pub_cycles(), .priv_cycles());
  rsa_size_check #(.W(2048)) u_2048 (.clk, .go(fin1024), .finished(fin2048),
                                     .checks(c2048), .failures(f2048),
                                     .pub_cycles(), .priv_cycles());

  initial begin
    repeat (5000000) @(posedge clk);
    checks = c256 + c1024 + c2048;
    failures = f256 + f1024 + f2048 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    go256 = 1'b1;
    wait (fin2048);
    @(posedge clk);
    checks = c256 + c1024 + c2048;
    failures = f256 + f1024 + f2048;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
