// vmac_vppg: vector partial product generator (PPG) of the vector MAC.
//
// From the multiplicand A and the Booth selects of the 32 multiplier digits
// it forms 33 partial products, each given here aligned to the 128-bit
// result. Row j (0..31) belongs to the vector element e whose multiplier bits
// hold bit 2j. The row keeps only element e's multiplicand bits (the masking
// "and" gates), adds the element's sign extension bit above them (A's MSB of
// the element when signed, 0 when unsigned) and passes them through the Booth
// mux, so the row's data lands at column 2j + w*e. The negatively weighted
// sign n of the row is replaced by sign-encoding bits placed right above the
// element's data: {p,n,n} for the first row of an element and {1,p} for the
// others (p = ~n). Rows other than the first of an element also carry the
// two "hot ones" of the row below, which complete its two's complement:
// seln1 of row j-1 at column 2(j-1) + w*e, where that row's data starts, and
// seln2 one column higher. All bits outside the element's 2w result columns are dropped, which
// truncates the top "1" of an element's last row.
// Row 32 is the extra partial product for unsigned operands. It holds, per
// element, A's element bits at column 2w*e + w when the element's extra
// Booth digit selects +1, plus the hot ones of the element's last row. The
// extra digit is 0 or +1 only, so the row needs no sign encoding.
// How the per-element pieces are combined into rows follows the published
// 8-bit-mode array; doing it on full 128-bit rows rather than the 69-bit rows
// of the published block diagram is this design's choice. Combinational.
module vmac_vppg
  import vmac_pkg::*;
(
  input  logic [N-1:0]  a,                 // multiplicand
  input  booth_sel_t    sel     [NDIG],    // Booth selects of digits 0..31
  input  booth_sel_t    ext_sel [MAXEL],   // selects of the extra digit per element
  input  vmode_t        mode,
  input  logic          uns,
  output logic [RW-1:0] pp      [NPP]      // partial products, result aligned
);

  int unsigned w;
  assign w = elem_width(mode);

  // Per row: vectorized multiplicand, Booth mux, then placement of data,
  // sign encoding and hot ones at their result columns.
  for (genvar j = 0; j < NDIG; j++) begin : g_row
    localparam int unsigned JP = (j > 0) ? j - 1 : 0;   // row below (row 0 is always first)
    int unsigned   lo, top;
    logic          first, sext, n;
    logic [N:0]    emask, v, fmask, data;
    logic [RW-1:0] row, keep;

    always_comb begin
      lo    = (2 * j / w) * w;             // lowest operand bit of the element
      emask = ((N+1)'(1) << w) - 1;
      sext  = ~uns & a[lo + w - 1];
      v     = ((N+1)'(a) & (emask << lo)) | ((N+1)'(sext) << (lo + w));
      fmask = ((emask << 1) | (N+1)'(1)) << lo;
    end

    vmac_booth_mux u_mux (
      .v    (v),
      .fmask(fmask),
      .sext (sext),
      .sel  (sel[j]),
      .data (data),
      .n    (n)
    );

    always_comb begin
      top   = lo + w + 1;                  // row-relative column of the sign
      first = (2 * j) % w == 0;
      row   = RW'(data) << (2 * j);
      if (first) begin
        row[2*j + top]     = n;
        row[2*j + top + 1] = n;
        row[2*j + top + 2] = ~n;
      end else begin
        row[2*j + top] = ~n;
        if (2 * j + top + 1 < 2 * (lo + w)) row[2*j + top + 1] = 1'b1;
        row[2*JP + lo]     = sel[JP].n1;
        row[2*JP + lo + 1] = sel[JP].n2;
      end
      keep  = ((RW'(1) << (2 * w)) - 1) << (2 * lo);
      pp[j] = row & keep;
    end
  end

  // Extra partial product for unsigned support, one slice per element.
  always_comb begin
    logic [RW-1:0] row;
    int unsigned   lo, jl;
    row = '0;
    for (int unsigned e = 0; e < MAXEL; e++) begin
      lo = w * e;
      jl = (lo + w) / 2 - 1;               // last digit of the element
      if (e < N / w) begin
        if (ext_sel[e].p1)
          row = row | ((RW'(a) >> lo & ((RW'(1) << w) - 1)) << (2 * lo + w));
        row[2*jl + lo]     = sel[jl].n1;
        row[2*jl + lo + 1] = sel[jl].n2;
      end
    end
    pp[NDIG] = row;
  end

endmodule
