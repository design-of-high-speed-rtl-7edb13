// active_row_select -- builds only the active partial product rows.
//
// After rounding, the multiplier operand is mant << shift with mant only
// ROUND_BITS bits wide, so at most ROUND_BITS rows of the full partial product
// matrix can be non-zero and they are adjacent: rows shift .. shift+ROUND_BITS-1.
// This block forms just those rows. Row k is the multiplicand ANDed with mant[k]
// (the AND gates of the ordinary matrix) and shifted left by shift+k, i.e. the
// row that bit shift+k of the rounded operand would select in the full matrix.
// All the inactive, all-zero rows are left out, so the reduction tree behind it
// has ROUND_BITS inputs instead of WIDTH+1. With ROUND_BITS = 1 the single row
// is a shifted copy of a and no reduction is needed at all.
//
// Interface: a (WIDTH bits), mant (ROUND_BITS bits) and shift in; rows[0..
// ROUND_BITS-1], each 2*WIDTH bits, out. Purely combinational.
//
// Leaving inactive rows out of the reduction follows the design; doing it with
// a shifter per row is this design's own choice.
module active_row_select #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned ROUND_BITS = 1
) (
  input  logic [WIDTH-1:0]             a,
  input  logic [ROUND_BITS-1:0]        mant,
  input  logic [$clog2(WIDTH+1)-1:0]   shift,
  output logic [2*WIDTH-1:0]           rows [ROUND_BITS]
);

  always_comb begin
    for (int k = 0; k < ROUND_BITS; k++) begin
      rows[k] = ((2*WIDTH)'(a & {WIDTH{mant[k]}}) << shift) << k;
    end
  end

endmodule
