// prefix_adder -- parallel prefix (Kogge-Stone) carry-propagate adder.
//
// Computes sum = x + y + cin. Each bit first forms generate g = x&y and
// propagate p = x^y; the carry-in is folded into bit 0's generate. Then
// ceil(log2 WIDTH) prefix levels combine (G,P) pairs at distance 1, 2, 4, ...
// with G = G_hi | (P_hi & G_lo), P = P_hi & P_lo, so after the last level G[i]
// is the carry out of bit i. Sum bit i is p[i] xor the carry into bit i.
// The carry chain depth is logarithmic in WIDTH instead of linear.
//
// Interface: x, y (WIDTH bits), cin in; sum (WIDTH bits), cout out. Purely
// combinational.
//
// A parallel prefix adder as the final adder is taken from the multiplier's
// description; the Kogge-Stone prefix network is this design's choice.
module prefix_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p0;
  logic [WIDTH-1:0] gl [LEVELS+1];
  logic [WIDTH-1:0] pl [LEVELS+1];
  logic [WIDTH-1:0] carry_in;

  always_comb begin
    p0       = x ^ y;
    gl[0]    = x & y;
    gl[0][0] = (x[0] & y[0]) | (p0[0] & cin);
    pl[0]    = p0;
    for (int k = 0; k < LEVELS; k++) begin
      for (int i = 0; i < WIDTH; i++) begin
        if (i >= (1 << k)) begin
          gl[k+1][i] = gl[k][i] | (pl[k][i] & gl[k][i - (1 << k)]);
          pl[k+1][i] = pl[k][i] & pl[k][i - (1 << k)];
        end else begin
          gl[k+1][i] = gl[k][i];
          pl[k+1][i] = pl[k][i];
        end
      end
    end
    carry_in = {gl[LEVELS][WIDTH-2:0], cin};
    sum      = p0 ^ carry_in;
    cout     = gl[LEVELS][WIDTH-1];
  end

endmodule
