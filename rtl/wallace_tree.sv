// wallace_tree -- Wallace reduction of partial product rows to two rows.
//
// The rows are reduced in layers. In each layer the rows are taken in groups of
// three and every group goes through a row of full adders (csa_3to2), which
// turns three rows into a sum row and a carry row; the one or two rows left
// over pass unchanged to the next layer. So a layer maps n rows to
// 2*floor(n/3) + (n mod 3) rows, and layers are added until two rows remain:
// 9 rows take 4 layers (9 -> 6 -> 4 -> 3 -> 2). The two rows go to a
// carry-propagate adder outside this block.
//
// Interface: rows[0..ROWS-1] (COLS bits each) in, sum_row and carry_row out,
// with sum_row + carry_row == sum of all rows modulo 2^COLS. ROWS = 1 passes
// the single row with a zero carry row. Purely combinational.
//
// Reduction with full and half adders into two rows follows the Wallace scheme;
// grouping whole rows (rather than column by column) is this design's choice.
module wallace_tree #(
  parameter int unsigned ROWS = 9,
  parameter int unsigned COLS = 16
) (
  input  logic [COLS-1:0] rows [ROWS],
  output logic [COLS-1:0] sum_row,
  output logic [COLS-1:0] carry_row
);

  // Number of rows after one layer of 3:2 compression.
  function automatic int unsigned rows_after(int unsigned n);
    return 2 * (n / 3) + (n % 3);
  endfunction

  // Number of rows entering layer l.
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned n = ROWS;
    for (int unsigned k = 0; k < l; k++) n = rows_after(n);
    return n;
  endfunction

  // Number of layers needed to get down to two rows.
  function automatic int unsigned num_layers();
    int unsigned n = ROWS;
    int unsigned l = 0;
    while (n > 2) begin
      n = rows_after(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LAYERS = num_layers();

  // Each layer holds its own output rows, so the layers form a chain of
  // separate signals rather than one array read and written in place.
  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    localparam int unsigned N_IN   = rows_at(l);
    localparam int unsigned GROUPS = N_IN / 3;
    localparam int unsigned N_OUT  = rows_after(N_IN);

    logic [COLS-1:0] in_rows  [N_IN];
    logic [COLS-1:0] out_rows [N_OUT];

    if (l == 0) begin : g_first
      assign in_rows = rows;
    end else begin : g_next
      assign in_rows = g_layer[l-1].out_rows;
    end

    for (genvar g = 0; g < GROUPS; g++) begin : g_csa
      csa_3to2 #(.COLS(COLS)) u_csa (
        .x    (in_rows[3*g]),
        .y    (in_rows[3*g+1]),
        .z    (in_rows[3*g+2]),
        .sum  (out_rows[2*g]),
        .carry(out_rows[2*g+1])
      );
    end
    for (genvar k = 0; k < N_IN - 3*GROUPS; k++) begin : g_pass
      assign out_rows[2*GROUPS+k] = in_rows[3*GROUPS+k];
    end
  end

  if (LAYERS > 0) begin : g_out_tree
    assign sum_row   = g_layer[LAYERS-1].out_rows[0];
    assign carry_row = g_layer[LAYERS-1].out_rows[1];
  end else if (ROWS == 2) begin : g_out_two
    assign sum_row   = rows[0];
    assign carry_row = rows[1];
  end else begin : g_out_one
    assign sum_row   = rows[0];
    assign carry_row = '0;
  end

endmodule
