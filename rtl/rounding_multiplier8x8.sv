// rounding_multiplier8x8 -- top level of the 8x8 rounding-based approximate
// multiplier.
//
// Ports as in the published block symbol: a[7:0], b[7:0], clk, rst in,
// p[15:0] out. The combinational core (rounding_multiplier) computes
// a * round(b), with b rounded to its nearest power of two by default and only
// the active partial product rows reduced (ACTIVE_ONLY = 1), and the result is captured in a 16-bit output register on every rising clock edge.
// Timing: p shows the product of the a and b sampled at the previous rising
// edge (one cycle of latency, a new operand pair accepted every cycle).
// rst is synchronous and active high and clears p to zero.
//
// The port list and the 8-bit default width follow the design; the output
// register, its one-cycle latency and the synchronous reset are this design's
// own choices. Example: a = 6, b = 3 gives p = 6 * 2 = 12.
module rounding_multiplier8x8 #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned ROUND_BITS = 1,
  parameter bit          ACTIVE_ONLY = 1'b1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  logic [2*WIDTH-1:0] p_comb;
  logic [WIDTH:0]     b_round_unused;
  logic [WIDTH:0]     row_active_unused;
  logic               rounded_up_unused;
  logic               exact_unused;

  rounding_multiplier #(.WIDTH(WIDTH), .ROUND_BITS(ROUND_BITS), .ACTIVE_ONLY(ACTIVE_ONLY)) u_mult (
    .a         (a),
    .b         (b),
    .p         (p_comb),
    .b_round   (b_round_unused),
    .row_active(row_active_unused),
    .rounded_up(rounded_up_unused),
    .exact     (exact_unused)
  );

  always_ff @(posedge clk) begin
    if (rst) p <= '0;
    else     p <= p_comb;
  end

endmodule
