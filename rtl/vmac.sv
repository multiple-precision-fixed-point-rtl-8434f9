// vmac: 64-bit multiple-precision fixed-point vector multiply-accumulator.
//
// One datapath performs R = C + A * B as one 64x64, two 32x32, four 16x16 or
// eight 8x8 multiply-accumulates, signed or unsigned, picked by the one-hot
// mode word (bit 0 = 8-bit ... bit 3 = 64-bit) and uns. Element i of width w
// uses A[w*i +: w], B[w*i +: w], C[2w*i +: 2w] and yields R[2w*i +: 2w]
// modulo 2^(2w). The scalar structure is reused ("shared segmentation"):
//   vmac_booth_mask    masks B at element boundaries, makes per-element signs
//   vmac_booth_recoder radix-4 Booth selects for 32 digits + 1 extra per element
//   vmac_vppg          33 partial products (vector muxing, sign encoding,
//                      hot ones, one shared unsigned-support row)
//   vmac_pprt          Wallace tree over 33 rows + C with carry kills
//   vmac_cpa           128-bit CLA of 4-bit blocks with carry kills
// The whole unit is combinational with no pipeline registers, like the
// version whose timing the published design reports; where to pipeline it is not
// given. The mode word is decoded as in vmac_pkg; an assertion flags a word
// that is not one-hot.
module vmac
  import vmac_pkg::*;
(
  input  logic [N-1:0]  a,      // multiplicand
  input  logic [N-1:0]  b,      // multiplier
  input  logic [RW-1:0] c,      // accumulator
  input  vmode_t        mode,   // one-hot: 0001 8-bit, 0010 16-bit, 0100 32-bit, 1000 64-bit
  input  logic          uns,    // 1: unsigned operands
  output logic [RW-1:0] r       // result
);

  logic [2:0]    trip     [NDIG];
  logic [2:0]    ext_trip [MAXEL];
  booth_sel_t    sel      [NDIG];
  booth_sel_t    ext_sel  [MAXEL];
  logic [RW-1:0] pp       [NPP];
  logic [RW-1:0] kmask;
  logic [RW-1:0] s0, s1;

  assign kmask = result_kill(mode);

  // The mode word must select exactly one element width.
  always_comb begin
    assert (mode inside {MODE8, MODE16, MODE32, MODE64})
      else $error("vmac: mode %b is not one-hot", mode);
  end

  vmac_booth_mask u_mask (
    .b       (b),
    .mode    (mode),
    .uns     (uns),
    .trip    (trip),
    .ext_trip(ext_trip)
  );

  vmac_booth_recoder #(.NDIGITS(NDIG)) u_rec (
    .trip(trip),
    .sel (sel)
  );

  vmac_booth_recoder #(.NDIGITS(MAXEL)) u_rec_ext (
    .trip(ext_trip),
    .sel (ext_sel)
  );

  vmac_vppg u_ppg (
    .a      (a),
    .sel    (sel),
    .ext_sel(ext_sel),
    .mode   (mode),
    .uns    (uns),
    .pp     (pp)
  );

  vmac_pprt u_tree (
    .pp   (pp),
    .acc  (c),
    .kmask(kmask),
    .out0 (s0),
    .out1 (s1)
  );

  vmac_cpa u_cpa (
    .a    (s0),
    .b    (s1),
    .kmask(kmask),
    .s    (r)
  );

endmodule
