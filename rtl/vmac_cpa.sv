// vmac_cpa: final carry-propagate adder (CPA) of the vector MAC, a W-bit
// carry-lookahead adder (CLA) built as a tree of 4-bit CLA blocks.
//
// Level 0 holds the bit generates (a & b) and propagates (a ^ b). Each block
// of level l combines four nodes of level l-1 (bits, then 4-bit groups, then
// 16-bit groups, ...) and hands the carries back down; the top carry-in is
// zero. The width is padded to the next power of four (128 -> 256) with zero
// columns. Vector modes kill the carry into every column set in kmask (the
// element boundaries): each block kills the carry into any child that starts
// on such a column, so no carry crosses a boundary at any level. The carry out
// of the top column is dropped. Combinational.
module vmac_cpa
  import vmac_pkg::*;
#(
  parameter int unsigned W = RW
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] kmask,   // columns whose incoming carry is killed
  output logic [W-1:0] s
);

  function automatic int unsigned clog4(int unsigned x);
    int unsigned l = 0, span = 1;
    while (span < x) begin
      span = span * 4;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned L  = clog4(W);
  localparam int unsigned WP = 4 ** L;

  logic [WP-1:0] g [L+1];
  logic [WP-1:0] p [L+1];
  logic [WP-1:0] c [L+1];
  logic [WP-1:0] km;

  assign g[0] = WP'(a & b);
  assign p[0] = WP'(a ^ b);
  assign km   = WP'(kmask);
  assign c[L] = '0;

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int unsigned NODES = 4 ** (L - l);
    localparam int unsigned CSPAN = 4 ** (l - 1);   // columns per child
    for (genvar n = 0; n < NODES; n++) begin : g_node
      logic [3:0] kill;
      for (genvar i = 0; i < 4; i++) begin : g_k
        assign kill[i] = km[(4*n+i)*CSPAN];
      end
      vmac_cla4 u_cla (
        .g   (g[l-1][4*n +: 4]),
        .p   (p[l-1][4*n +: 4]),
        .cin (c[l][n]),
        .kill(kill),
        .c   (c[l-1][4*n +: 4]),
        .gout(g[l][n]),
        .pout(p[l][n])
      );
    end
    if (NODES < WP) begin : g_pad
      assign g[l][WP-1:NODES] = '0;
      assign p[l][WP-1:NODES] = '0;
    end
    if (l < L) begin : g_cpad
      assign c[l][WP-1:4**(L-l)] = '0;
    end
  end

  assign s = p[0][W-1:0] ^ c[0][W-1:0];

endmodule
