// vmac_booth_mask: vector masking and vector sign extension of the
// multiplier B, giving the "vectorized multiplier" that feeds the radix-4
// Booth recoder.
//
// Digit j (0..31) of the recoder reads the triplet {B[2j+1], B[2j], B[2j-1]}.
// Where bit 2j is the lowest bit of a vector element, the third bit is forced
// to 0 instead of reading B[2j-1] from the element below: the zero insertion
// at element boundaries, done by masking B with a function of mode and bit
// position. For the extra unsigned-support digit each element e gets its own
// triplet {s_e, s_e, msb_e}, with s_e = msb_e & ~uns (the published sign
// bits), so an element's multiplier is read as w+2 bits. The
// element triplets sit in ext_trip[e]; entries beyond the element count of
// the mode are zero. Purely combinational.
module vmac_booth_mask
  import vmac_pkg::*;
(
  input  logic [N-1:0]       b,         // multiplier operand
  input  vmode_t             mode,      // one-hot vector mode
  input  logic               uns,       // 1: unsigned multiply
  output logic [2:0]         trip     [NDIG],   // Booth triplets, digits 0..31
  output logic [2:0]         ext_trip [MAXEL]   // extra digit, one per element
);

  int unsigned w;
  assign w = elem_width(mode);

  // Masked copy of B[2j-1]: zero at the bottom of every element.
  always_comb begin
    for (int unsigned j = 0; j < NDIG; j++) begin
      logic low;
      if (j == 0 || (2 * j) % w == 0) low = 1'b0;
      else                            low = b[2*j-1];
      trip[j] = {b[2*j+1], b[2*j], low};
    end
  end

  // Sign bits and extra triplet per element.
  always_comb begin
    for (int unsigned e = 0; e < MAXEL; e++) begin
      logic msb, s;
      msb = (e < N / w) ? b[w*e + w - 1] : 1'b0;
      s   = msb & ~uns;
      ext_trip[e] = {s, s, msb};
    end
  end

endmodule
