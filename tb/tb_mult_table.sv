// Self-checking testbench of mult_table, the digit-multiple lookup table.
//
// Loads random operands (and the corner values zero and all ones), checks
// that `ready` rises exactly 2^RB-1 cycles after the load, and that every
// entry k reads back k*x computed here by multiplication. A second load
// during filling must restart the fill. Default parameters (256 bits,
// radix 16).
module tb_mult_table;
  localparam int unsigned W  = 256;
  localparam int unsigned RB = 4;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            load;
  logic [W-1:0]    x;
  logic            ready;
  logic [RB-1:0]   sel;
  logic [W+RB-1:0] mult;

  int checks = 0, failures = 0;

  mult_table #(.W(W), .RB(RB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic fill_and_check(input logic [W-1:0] val);
    int cyc;
    @(negedge clk);
    x = val; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    cyc = 0;   // cycles after the load edge
    while (!ready && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != (1 << RB) - 1) begin
      failures++;
      $display("FAIL ready after %0d cycles, expected %0d", cyc, (1 << RB) - 1);
    end
    for (int k = 0; k < (1 << RB); k++) begin
      logic [W+RB-1:0] exp_v;
      sel = RB'(k);
      exp_v = (W+RB)'(val) * (W+RB)'(k);
      #1;
      checks++;
      if (mult !== exp_v) begin
        failures++;
        $display("FAIL entry %0d: got %h expected %h", k, mult, exp_v);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; x = '0; sel = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (ready) begin failures++; $display("FAIL ready after reset"); end
    fill_and_check('0);
    fill_and_check('1);
    for (int i = 0; i < 20; i++) fill_and_check(rand_wide());
    // Restart in the middle of a fill.
    @(negedge clk);
    x = rand_wide(); load = 1'b1;
    @(negedge clk); load = 1'b0;
    repeat (5) @(negedge clk);
    fill_and_check(rand_wide());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
