// vmac_pprt: vector partial product reduction tree (PPRT).
//
// A Wallace tree of 3:2 compressor rows reduces the 33 partial products and
// the accumulator (34 rows of 128 bits) to two rows for the final adder.
// Adding the accumulator as one more row costs at most one extra CSA level and
// saves a second carry-propagate addition.
// Vectorizing follows the published second method: the scalar tree is kept
// and every carry that would cross a vector element boundary is killed, at
// every level. Each level groups its rows in threes (sum rows first, then
// carry rows, then rows passed down unchanged). Which rows are carry rows is
// known when the tree is built, so only those get the boundary kill mask: on
// the full adder's carry-in kill when in the third slot, on an and gate in
// the first two slots, and on the outputs if a carry row reaches the end.
// The greedy grouping needs 8 levels for 34 rows; the published estimate,
// ceil(log 34 / log 1.5) = 9, is an upper bound. Combinational.
module vmac_pprt
  import vmac_pkg::*;
#(
  parameter int unsigned W  = RW,      // row width
  parameter int unsigned NR = NROWS    // rows in (partial products + accumulator)
) (
  input  logic [W-1:0] pp   [NR-1],    // partial products
  input  logic [W-1:0] acc,            // accumulator row
  input  logic [W-1:0] kmask,          // columns whose incoming carry is killed
  output logic [W-1:0] out0,
  output logic [W-1:0] out1
);

  function automatic int unsigned rows_at(int unsigned l);
    int unsigned n = NR;
    for (int unsigned i = 0; i < l; i++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l = 0;
    while (rows_at(l) > 2) l++;
    return l;
  endfunction

  // 1 if row idx at level l is a shifted carry row not yet masked.
  function automatic bit is_carry(int unsigned l, int unsigned idx);
    int unsigned n, t;
    if (l == 0) return 1'b0;
    n = rows_at(l - 1);
    t = n / 3;
    if (idx < t)     return 1'b0;
    if (idx < 2 * t) return 1'b1;
    return is_carry(l - 1, 3 * t + idx - 2 * t);
  endfunction

  localparam int unsigned LEVELS = num_levels();

  // Rows of each level, level 0 being the tree's input.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_r
    logic [W-1:0] row [rows_at(l)];
  end

  for (genvar i = 0; i < NR; i++) begin : g_in
    if (i < NR - 1) begin : g_pp
      assign g_r[0].row[i] = pp[i];
    end else begin : g_acc
      assign g_r[0].row[i] = acc;
    end
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned N_IN  = rows_at(l);
    localparam int unsigned T     = N_IN / 3;
    for (genvar m = 0; m < T; m++) begin : g_csa
      vmac_csa_row #(.W(W)) u_row (
        .x     (g_r[l].row[3*m]),
        .y     (g_r[l].row[3*m+1]),
        .z     (g_r[l].row[3*m+2]),
        .kill_x(is_carry(l, 3*m)   ? kmask : '0),
        .kill_y(is_carry(l, 3*m+1) ? kmask : '0),
        .kill_z(is_carry(l, 3*m+2) ? kmask : '0),
        .sum   (g_r[l+1].row[m]),
        .carry (g_r[l+1].row[T+m])
      );
    end
    for (genvar q = 0; q < N_IN % 3; q++) begin : g_pass
      assign g_r[l+1].row[2*T+q] = g_r[l].row[3*T+q];
    end
  end

  assign out0 = g_r[LEVELS].row[0] & ~(is_carry(LEVELS, 0) ? kmask : '0);
  assign out1 = g_r[LEVELS].row[1] & ~(is_carry(LEVELS, 1) ? kmask : '0);

endmodule
