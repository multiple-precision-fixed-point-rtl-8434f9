// vmac_csa_row: one W-bit row of 3:2 compressors (carry-save adder) with
// vector carry kills.
//
// Column c adds x[c], y[c] and z[c] in a vmac_fa_kill cell. Inputs that are
// carry rows (already shifted up by one column) may hold a carry that has
// crossed a vector element boundary; the kill masks remove it: kill_z goes to
// the full adder's carry-in kill, kill_x and kill_y mask x and y with a
// 2-input and gate. The outputs are the sum row and the carry row, the latter
// shifted up one column (bit 0 is 0, the carry out of the top column is
// dropped, as the result is taken modulo 2^W). The carry row is not masked
// here: the row that consumes it does that. Combinational.
module vmac_csa_row #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic [W-1:0] kill_x,
  input  logic [W-1:0] kill_y,
  input  logic [W-1:0] kill_z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] xm, ym, cout;
  assign xm = x & ~kill_x;
  assign ym = y & ~kill_y;

  for (genvar c = 0; c < W; c++) begin : g_fa
    vmac_fa_kill u_fa (
      .a   (xm[c]),
      .b   (ym[c]),
      .cin (z[c]),
      .kill(kill_z[c]),
      .sum (sum[c]),
      .cout(cout[c])
    );
  end

  assign carry = {cout[W-2:0], 1'b0};

endmodule
