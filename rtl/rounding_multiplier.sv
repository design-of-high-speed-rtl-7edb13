// rounding_multiplier -- combinational rounding-based approximate multiplier.
//
// p ~= a * b, computed as a * round(b), where round() keeps only ROUND_BITS
// significant bits of b (default 1: b becomes its nearest power of two, ties
// rounding down). The datapath is the usual multiplier chain with the rounding
// block in front of it:
//
//   b -> round_unit -> (mant, shift) -> active_row_select (ROUND_BITS rows)
//     -> wallace_tree (3:2 layers down to two rows) -> prefix_adder -> p
//
// Rows of the partial product matrix whose b_round bit is zero are inactive:
// all zeros. With ACTIVE_ONLY = 1 (default) they are never built and only the
// ROUND_BITS active rows enter the reduction; with ROUND_BITS = 1 that is a
// single row, a shifted copy of a. With ACTIVE_ONLY = 0 the full (WIDTH+1)-row
// AND matrix of pp_generator is built from b_round and reduced, inactive rows
// included; both give the same product. With ROUND_BITS = WIDTH nothing is
// rounded and p is the exact product. The product always fits 2*WIDTH bits, since a < 2^WIDTH and
// b_round <= 2^WIDTH.
//
// Interface: a, b (WIDTH bits) in; p (2*WIDTH bits) out; also b_round,
// row_active (which rows of the full matrix are live), rounded_up and exact
// for observation. Purely combinational.
module rounding_multiplier #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned ROUND_BITS = 1,
  parameter bit          ACTIVE_ONLY = 1'b1
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p,
  output logic [WIDTH:0]     b_round,
  output logic [WIDTH:0]     row_active,
  output logic               rounded_up,
  output logic               exact
);

  logic [2*WIDTH-1:0]          sum_row;
  logic [2*WIDTH-1:0]          carry_row;
  logic                        cout_unused;
  logic [ROUND_BITS-1:0]       mant;
  logic [$clog2(WIDTH+1)-1:0]  shift;

  round_unit #(.WIDTH(WIDTH), .ROUND_BITS(ROUND_BITS)) u_round (
    .b         (b),
    .b_round   (b_round),
    .rounded_up(rounded_up),
    .exact     (exact),
    .mant      (mant),
    .shift     (shift)
  );

  assign row_active = b_round;

  if (ACTIVE_ONLY) begin : g_active
    // Only the active rows are generated and reduced.
    logic [2*WIDTH-1:0] rows [ROUND_BITS];

    active_row_select #(.WIDTH(WIDTH), .ROUND_BITS(ROUND_BITS)) u_sel (
      .a    (a),
      .mant (mant),
      .shift(shift),
      .rows (rows)
    );

    wallace_tree #(.ROWS(ROUND_BITS), .COLS(2*WIDTH)) u_tree (
      .rows     (rows),
      .sum_row  (sum_row),
      .carry_row(carry_row)
    );
  end else begin : g_full
    // Full matrix: every row is generated and reduced, inactive ones as zeros.
    logic [2*WIDTH-1:0] rows [WIDTH+1];
    logic [WIDTH:0]     row_active_unused;

    pp_generator #(.WIDTH(WIDTH)) u_pp (
      .a         (a),
      .b_round   (b_round),
      .rows      (rows),
      .row_active(row_active_unused)
    );

    wallace_tree #(.ROWS(WIDTH+1), .COLS(2*WIDTH)) u_tree (
      .rows     (rows),
      .sum_row  (sum_row),
      .carry_row(carry_row)
    );
  end

  // The carry out is always zero because the product fits 2*WIDTH bits.
  prefix_adder #(.WIDTH(2*WIDTH)) u_add (
    .x   (sum_row),
    .y   (carry_row),
    .cin (1'b0),
    .sum (p),
    .cout(cout_unused)
  );

endmodule
