// csa_3to2 -- one row of full adders (3:2 compressor, carry-save adder).
//
// Adds three COLS-bit rows bit by bit: each column is a full adder whose sum
// bit stays in its column and whose carry bit moves one column up. The outputs
// satisfy sum + carry == x + y + z modulo 2^COLS; the carry out of the top
// column is dropped, which is exact whenever the total fits in COLS bits.
// Where one input bit is a constant zero the full adder reduces to a half
// adder after synthesis. Purely combinational.
module csa_3to2 #(
  parameter int unsigned COLS = 16
) (
  input  logic [COLS-1:0] x,
  input  logic [COLS-1:0] y,
  input  logic [COLS-1:0] z,
  output logic [COLS-1:0] sum,
  output logic [COLS-1:0] carry
);

  // Majority (carry) of the columns below the top one; the top column's carry
  // would leave the COLS-bit result and is not formed.
  logic [COLS-2:0] maj;

  assign sum   = x ^ y ^ z;
  assign maj   = (x[COLS-2:0] & y[COLS-2:0]) | (x[COLS-2:0] & z[COLS-2:0])
               | (y[COLS-2:0] & z[COLS-2:0]);
  assign carry = {maj, 1'b0};

endmodule
