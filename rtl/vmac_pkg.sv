// vmac_pkg: shared sizes, types and mode helpers of the 64-bit vector
// multiply-accumulator (MAC).
//
// The MAC multiplies two 64-bit operands A and B and adds a 128-bit
// accumulator C. A one-hot mode word mode[3:0] splits it into one 64x64, two
// 32x32, four 16x16 or eight 8x8 multiply-accumulates. Element i of width w
// takes A[w*i +: w] and B[w*i +: w] and C[2w*i +: 2w] and gives R[2w*i +: 2w].
// The bit order of mode (bit 0 = 8-bit mode ... bit 3 = 64-bit mode) is the
// numbering of the vector-mode mux inputs in the published mux diagram. The
// decoding of a mode word that is not one-hot (lowest set bit wins, zero means
// 64-bit) is this design's own choice.
package vmac_pkg;

  localparam int unsigned N      = 64;          // operand width
  localparam int unsigned RW     = 2 * N;       // result / accumulator width
  localparam int unsigned NDIG   = N / 2;       // radix-4 Booth digits per operand
  localparam int unsigned NPP    = NDIG + 1;    // partial products incl. the unsigned one
  localparam int unsigned NROWS  = NPP + 1;     // rows into the tree incl. accumulator
  localparam int unsigned MAXEL  = N / 8;       // most vector elements (8-bit mode)

  typedef logic [3:0] vmode_t;
  localparam vmode_t MODE8  = 4'b0001;
  localparam vmode_t MODE16 = 4'b0010;
  localparam vmode_t MODE32 = 4'b0100;
  localparam vmode_t MODE64 = 4'b1000;

  // One-hot Booth selects of one radix-4 digit.
  typedef struct packed {
    logic ze;   // select 0
    logic p1;   // select +a
    logic p2;   // select +2a
    logic n1;   // select -a
    logic n2;   // select -2a
  } booth_sel_t;

  // Element width in bits for a mode word.
  function automatic int unsigned elem_width(vmode_t m);
    if (m[0])      return 8;
    else if (m[1]) return 16;
    else if (m[2]) return 32;
    else           return 64;
  endfunction

  // Columns of the 128-bit result where a carry from the column below must
  // be killed: every element boundary above bit 0.
  function automatic logic [RW-1:0] result_kill(vmode_t m);
    logic [RW-1:0] k;
    int unsigned   w2;
    w2 = 2 * elem_width(m);
    k  = '0;
    for (int unsigned c = 1; c < RW; c++)
      if (c % w2 == 0) k[c] = 1'b1;
    return k;
  endfunction

endpackage
