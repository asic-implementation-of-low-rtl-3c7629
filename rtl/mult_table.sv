// Digit-multiple lookup table of the high-radix Montgomery multiplier.
//
// Holds the 2^RB multiples k*x (k = 0 .. 2^RB-1) of a W-bit operand x, so
// that the multiplier can add "digit times operand" with one table read
// instead of a multiplication. A higher radix processes more bits per step
// and needs a larger table; with the default radix 16 there are 16 entries.
//
// Filling: a one-cycle `load` pulse samples x. Entry 0 is constant zero; in
// each following cycle one entry is written with the previous entry plus x,
// using a single W+RB-bit adder. `ready` rises 2^RB-1 cycles after the
// load cycle (15 for radix 16) and stays high until the next load.
// Reading: `mult` = table[sel], combinational. Reads during filling return
// stale or partial contents.
//
// That the table exists and grows with the radix follows the design; its
// contents and the fill-by-addition scheme are this design's own choice.
module mult_table #(
  parameter int unsigned W  = mont_pkg::KEY_BITS,
  parameter int unsigned RB = mont_pkg::RADIX_BITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [W-1:0]    x,
  output logic            ready,
  input  logic [RB-1:0]   sel,
  output logic [W+RB-1:0] mult
);

  localparam int unsigned ENTRIES = 1 << RB;

  logic [W+RB-1:0] tab [1:ENTRIES-1];
  logic [W+RB-1:0] acc;      // next multiple to be written
  logic [W-1:0]    x_q;      // operand being tabulated
  logic [RB-1:0]   idx;      // entry written this cycle
  logic            filling;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      filling <= 1'b0;
      ready   <= 1'b0;
      idx     <= '0;
      acc     <= '0;
      x_q     <= '0;
    end else if (load) begin
      filling <= 1'b1;
      ready   <= 1'b0;
      idx     <= RB'(1);
      acc     <= {{RB{1'b0}}, x};
      x_q     <= x;
    end else if (filling) begin
      acc <= acc + {{RB{1'b0}}, x_q};
      idx <= idx + RB'(1);
      if (idx == RB'(ENTRIES - 1)) begin
        filling <= 1'b0;
        ready   <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (filling && !load) tab[idx] <= acc;
  end

  assign mult = (sel == '0) ? '0 : tab[sel];

endmodule
