// pp_generator -- partial product generator (AND-gate array).
//
// Forms one partial product row per bit of the rounded multiplier operand:
// row i is the multiplicand a ANDed with b_round[i] and shifted left by i
// places, i.e. the bits a[j]&b_round[i] of weight 2^(i+j), as in the usual
// N x N AND matrix of an array or Wallace multiplier. Because b_round comes out
// of the rounding block with few set bits, most rows are inactive: they are all
// zeros. row_active marks the rows that can be non-zero (simply b_round[i]).
//
// Interface: a (WIDTH bits), b_round (WIDTH+1 bits, so the operand rounded up
// to 2^WIDTH is covered) in; rows[0..WIDTH], each 2*WIDTH bits wide, and
// row_active out. Purely combinational.
//
// The AND-matrix follows the classic partial product layout; the extra row WIDTH
// for the rounded-up operand is this design's own.
module pp_generator #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH:0]     b_round,
  output logic [2*WIDTH-1:0] rows [WIDTH+1],
  output logic [WIDTH:0]     row_active
);

  always_comb begin
    for (int i = 0; i <= WIDTH; i++) begin
      rows[i] = (2*WIDTH)'(a & {WIDTH{b_round[i]}}) << i;
    end
  end

  assign row_active = b_round;

endmodule
