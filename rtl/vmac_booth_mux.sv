// vmac_booth_mux: Booth mux of one partial-product row.
//
// Selects 0, +a, +2a, -a or -2a of the vectorized multiplicand v, as given by
// the one-hot Booth selects. v holds the multiplicand bits of the row's own
// vector element at their operand positions, plus the element's sign
// extension bit just above them; all other bits are zero. fmask marks the
// w+1 data bits of the element's field. The -a and -2a cases are formed by
// inversion only: the +1 that completes the two's complement is added later
// as a "hot one" in the next row (bit 0 of the field for -a, bit 1 for -2a).
// For -2a the inverted a is shifted with a 0 coming in, so -2a = (~a << 1) + 2. Output n is the sign of the selected multiple,
// which the partial product generator turns into the sign-encoding bits.
// Combinational.
module vmac_booth_mux
  import vmac_pkg::*;
(
  input  logic [N:0]  v,       // vectorized multiplicand with sign extension bit
  input  logic [N:0]  fmask,   // data bits of the element field
  input  logic        sext,    // sign extension bit of the element
  input  booth_sel_t  sel,
  output logic [N:0]  data,    // data bits of the partial product
  output logic        n        // sign of the selected multiple
);

  logic [N:0] two_v, inv_v, two_inv_v;
  assign two_v     = {v[N-1:0], 1'b0};
  assign inv_v     = ~v & fmask;
  assign two_inv_v = {inv_v[N-1:0], 1'b0};   // shift in 0 after inverting

  always_comb begin
    unique case (1'b1)
      sel.p1:  data =  v;
      sel.p2:  data =  two_v;
      sel.n1:  data = inv_v;
      sel.n2:  data = two_inv_v;
      default: data = '0;
    endcase
    data = data & fmask;
    n    = ~sel.ze & (sext ^ (sel.n1 | sel.n2));
  end

endmodule
