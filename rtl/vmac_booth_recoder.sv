// vmac_booth_recoder: radix-4 (modified) Booth recoder for NDIG digits.
//
// Each overlapping triplet {b2, b1, b0} stands for the digit -2*b2 + b1 + b0
// and is turned into exactly one of the five one-hot selects selze, selp1,
// selp2, seln1, seln2. The recoder itself is the scalar one; the vector
// modes only change the triplets it is given (see vmac_booth_mask).
// Combinational; NDIG defaults to the 32 digits of a 64-bit multiplier.
module vmac_booth_recoder
  import vmac_pkg::*;
#(
  parameter int unsigned NDIGITS = NDIG
) (
  input  logic [2:0]  trip [NDIGITS],
  output booth_sel_t  sel  [NDIGITS]
);

  always_comb begin
    for (int unsigned j = 0; j < NDIGITS; j++) begin
      logic b2, b1, b0;
      {b2, b1, b0} = trip[j];
      sel[j].p1 = ~b2 & (b1 ^ b0);
      sel[j].p2 = ~b2 & b1 & b0;
      sel[j].n1 =  b2 & (b1 ^ b0);
      sel[j].n2 =  b2 & ~b1 & ~b0;
      sel[j].ze = ~(b1 ^ b0) & ~(b2 ^ b1);
    end
  end

endmodule
