// tb_vmac: end-to-end self-checking testbench of the vector MAC at its
// default size (64-bit operands, 128-bit accumulator).
//
// For each of the four modes, signed and unsigned, it applies
//  * structured operands: in every element the two top and two bottom bits
//    take all 16 values and the bits between are all ones or all zeros
//    (element 0 sweeps all 32 x 32 A/B combinations, the other elements pick
//    patterns at random), with a random accumulator, and
//  * fully random operands,
// and compares R with a reference computed per element with plain integer
// arithmetic: R_e = (C_e + A_e * B_e) mod 2^(2w). The unit is combinational, so
// results are sampled 1 time unit after the inputs change.
// It also counts the mechanisms the vectorization relies on and fails if one
// never happened: each mode/sign combination, a carry killed at an element
// boundary (an element sum that wraps below the top element), the extra
// unsigned partial product being used, and a -a / -2a Booth digit.
module tb_vmac;
  import vmac_pkg::*;

  logic [N-1:0]  a, b;
  logic [RW-1:0] c, r;
  vmode_t        mode;
  logic          uns;

  int checks = 0, failures = 0;
  int n_mode [4][2];
  int n_kill = 0, n_unsfix = 0, n_neg = 0;

  vmac dut (.a(a), .b(b), .c(c), .mode(mode), .uns(uns), .r(r));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [RW-1:0] mask_n(int unsigned nb);
    return (nb >= RW) ? '1 : ((RW'(1) << nb) - 1);
  endfunction

  // Reference result and event counting.
  function automatic logic [RW-1:0] ref_mac(logic [N-1:0] ai, logic [N-1:0] bi,
                                            logic [RW-1:0] ci, int unsigned w,
                                            logic u, output bit wrapped,
                                            output bit unsfix, output bit neg);
    logic [RW-1:0] res, av, bv, cv, sum, prod;
    res = '0; wrapped = 0; unsfix = 0; neg = 0;
    for (int unsigned e = 0; e < N / w; e++) begin
      av = (RW'(ai) >> (w * e)) & mask_n(w);
      bv = (RW'(bi) >> (w * e)) & mask_n(w);
      cv = (ci >> (2 * w * e)) & mask_n(2 * w);
      if (u && bv[w-1]) unsfix = 1;
      if (!u && av[w-1]) av = av | ~mask_n(w);
      if (!u && bv[w-1]) bv = bv | ~mask_n(w);
      prod = av * bv;
      sum  = cv + (prod & mask_n(2 * w));
      if ((sum >> (2 * w)) != 0 && (e + 1) < N / w) wrapped = 1;
      res = res | ((sum & mask_n(2 * w)) << (2 * w * e));
    end
    for (int unsigned k = 0; k + 2 < N; k += 2)
      if (bi[k+1] && !(bi[k] && (k == 0 ? 1'b0 : bi[k-1]))) neg = 1;
    return res;
  endfunction

  // Structured element value: 2 MSBs, 2 LSBs from pat[3:0], middle from pat[4].
  function automatic logic [N-1:0] pattern(int unsigned w, int unsigned pat);
    logic [N-1:0] v;
    v = {N{pat[4]}};
    v[1:0] = pat[1:0];
    v[w-1 -: 2] = pat[3:2];
    return v & ((w >= N) ? '1 : ((N'(1) << w) - 1));
  endfunction

  task automatic apply_check(int mi, int si);
    logic [RW-1:0] exp;
    bit wr, uf, ng;
    #1;
    exp = ref_mac(a, b, c, elem_width(mode), uns, wr, uf, ng);
    checks++;
    n_mode[mi][si]++;
    if (wr) n_kill++;
    if (uf) n_unsfix++;
    if (ng) n_neg++;
    if (r !== exp) begin
      failures++;
      if (failures < 10 || (failures % 500 == 0))
        $display("FAIL mode=%b uns=%0d a=%h b=%h c=%h r=%h exp=%h", mode, uns, a, b, c, r, exp);
    end
  endtask

  initial begin
    foreach (n_mode[i, j]) n_mode[i][j] = 0;
    for (int mi = 0; mi < 4; mi++) begin
      for (int si = 0; si < 2; si++) begin
        int unsigned w;
        mode = vmode_t'(1 << mi);
        uns  = si[0];
        w    = elem_width(mode);
        for (int pa = 0; pa < 32; pa++) begin
          for (int pb = 0; pb < 32; pb++) begin
            a = '0; b = '0;
            for (int unsigned e = 0; e < N / w; e++) begin
              int unsigned qa, qb;
              qa = (e == 0) ? pa : $urandom_range(31);
              qb = (e == 0) ? pb : $urandom_range(31);
              a = a | (pattern(w, qa) << (w * e));
              b = b | (pattern(w, qb) << (w * e));
            end
            c = {$urandom(), $urandom(), $urandom(), $urandom()};
            apply_check(mi, si);
          end
        end
        for (int t = 0; t < 1000; t++) begin
          a = {$urandom(), $urandom()};
          b = {$urandom(), $urandom()};
          c = {$urandom(), $urandom(), $urandom(), $urandom()};
          apply_check(mi, si);
        end
      end
    end
    for (int mi = 0; mi < 4; mi++)
      for (int si = 0; si < 2; si++) begin
        $display("mode %0d-bit %s: %0d operations", 8 << mi, si ? "unsigned" : "signed", n_mode[mi][si]);
        if (n_mode[mi][si] == 0) failures++;
      end
    $display("boundary carry kills: %0d, unsigned partial product used: %0d, negative Booth digits: %0d",
             n_kill, n_unsfix, n_neg);
    if (n_kill == 0) failures++;
    if (n_unsfix == 0) failures++;
    if (n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
