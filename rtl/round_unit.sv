// round_unit -- input rounding block of the rounding-based approximate multiplier.
//
// Rounds the multiplier operand b to the nearest value that has at most
// ROUND_BITS significant bits, counted from its leading one. With the default
// ROUND_BITS = 1 the result is the power of two nearest to b, so only one row of
// the partial product array downstream is left active and every other row is
// all zeros.
//
// How it works: a priority search finds the leading one at position n. When
// n+1 <= ROUND_BITS the operand already fits and passes unchanged. Otherwise the
// low d = n+1-ROUND_BITS bits are dropped; if the dropped remainder is more than
// half of 2^d the kept part is incremented by one unit (2^d). A remainder of
// exactly half rounds down (6 -> 4, 3 -> 2). Rounding up can carry into bit
// WIDTH (255 -> 256), so b_round is one bit wider than b.
//
// Interface: b in, b_round out, plus two flags: rounded_up (value increased)
// and exact (b_round == b). The same result is also given in normalised form,
// b_round == mant << shift, with mant ROUND_BITS bits wide and its top bit set
// (unless b is small enough to need no rounding, when shift is 0). The
// multiplier uses that form to build only the active partial product rows.
// Purely combinational, no clock. ROUND_BITS must be between 1 and WIDTH.
//
// Rounding the inputs to powers of two is the technique this multiplier is built
// on. The tie rule, the choice of b as the rounded operand and the generalisation
// to ROUND_BITS > 1 are this design's own choices; ties-down and rounding b reproduce
// the reference result 6 x 3 = 12 of the 8x8 design.
module round_unit #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned ROUND_BITS = 1
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   b_round,
  output logic             rounded_up,
  output logic             exact,
  output logic [ROUND_BITS-1:0]        mant,
  output logic [$clog2(WIDTH+1)-1:0]   shift
);

  localparam int unsigned PW = $clog2(WIDTH + 1);

  logic [PW-1:0]  lead;      // position of the leading one (0 when b == 0)
  logic [PW-1:0]  drop;      // number of low bits removed by rounding
  logic [WIDTH:0] b_ext;
  logic [WIDTH:0] low_mask;  // ones over the dropped bits
  logic [WIDTH:0] rem;       // dropped remainder
  logic [WIDTH:0] half;      // half of one kept unit, 2^(drop-1)
  logic [WIDTH:0] unit;      // one kept unit, 2^drop
  logic [WIDTH:0] kept;      // b_round >> drop, at most 2^ROUND_BITS

  always_comb begin
    lead = '0;
    for (int i = 0; i < WIDTH; i++) begin
      if (b[i]) lead = PW'(i);
    end
    if (b != '0 && 32'(lead) + 1 > ROUND_BITS) drop = PW'(32'(lead) + 1 - ROUND_BITS);
    else                                        drop = '0;

    b_ext    = {1'b0, b};
    low_mask = ~({(WIDTH+1){1'b1}} << drop);
    rem      = b_ext & low_mask;
    unit     = (WIDTH+1)'(1) << drop;
    half     = (drop == '0) ? '0 : unit >> 1;

    rounded_up = (drop != '0) && (rem > half);
    b_round    = (b_ext & ~low_mask) + (rounded_up ? unit : '0);
    exact      = (b_round == b_ext);

    // Normalised form. Rounding up can turn the kept part into exactly
    // 2^ROUND_BITS, one bit too wide: then it is 2^(ROUND_BITS-1) one place up.
    kept = b_round >> drop;
    if (kept[ROUND_BITS]) begin
      mant  = ROUND_BITS'(kept >> 1);
      shift = drop + PW'(1);
    end else begin
      mant  = ROUND_BITS'(kept);
      shift = drop;
    end
  end

endmodule
