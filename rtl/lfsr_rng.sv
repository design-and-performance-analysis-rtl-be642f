// Pseudo random number generator of the lottery managers.
//
// A 4-bit Fibonacci LFSR that shifts left and feeds q[3] XOR q[0] into bit 0
// (polynomial x^4 + x^3 + 1). From the reset seed 4'hF it runs through all 15
// non-zero values, F E D A 5 B 6 C 9 2 4 8 1 3 7, and repeats: the sequence
// shown for the random number n1 in the waveforms of all three arbiters. The
// range 1..15 follows the source design; the tap positions and the seed were
// chosen so that this sequence comes out.
//
// Interface: 'en' advances the register by one step per clock; 'num' is the
// register itself, so a new number is visible one cycle after each enabled
// edge. Reset is synchronous and active high.
module lfsr_rng
  import lottery_pkg::*;
#(
  parameter rand_t SEED = 4'hF   // any non-zero value
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  output rand_t num
);

  logic feedback;
  assign feedback = num[3] ^ num[0];

  always_ff @(posedge clk) begin
    if (rst)     num <= SEED;
    else if (en) num <= {num[2:0], feedback};
  end

  // The all-zero state is a lock-up state of this LFSR and must never occur.
  a_never_zero: assert property (@(posedge clk) disable iff (rst) num != '0);

endmodule
