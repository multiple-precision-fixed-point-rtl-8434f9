// tb_vmac_vppg: the partial products of each vector element must add up to
// the element's product. Booth selects are made here by an independent
// recoding of B (digits from {B_e, 0} plus the extra digit from the signs),
// not by the recoder block. For every element e, the rows restricted to the
// element's 2w result columns must sum to A_e * B_e mod 2^(2w), and no row may
// set a bit outside the columns of the element it belongs to.
module tb_vmac_vppg;
  import vmac_pkg::*;

  logic [N-1:0]  a, b;
  vmode_t        mode;
  logic          uns;
  booth_sel_t    sel     [NDIG];
  booth_sel_t    ext_sel [MAXEL];
  logic [RW-1:0] pp      [NPP];
  int checks = 0, failures = 0;

  vmac_vppg dut (.a(a), .sel(sel), .ext_sel(ext_sel), .mode(mode), .uns(uns), .pp(pp));

  function automatic booth_sel_t enc(int d);
    booth_sel_t s = '0;
    case (d)
      0: s.ze = 1; 1: s.p1 = 1; 2: s.p2 = 1; -1: s.n1 = 1; default: s.n2 = 1;
    endcase
    return s;
  endfunction

  function automatic logic [RW-1:0] msk(int unsigned nb);
    return (nb >= RW) ? '1 : ((RW'(1) << nb) - 1);
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 800; t++) begin
      int unsigned w;
      mode = vmode_t'(1 << (t % 4));
      w    = 8 << (t % 4);
      uns  = t[2];
      a    = {$urandom(), $urandom()};
      b    = {$urandom(), $urandom()};
      if (t < 64) begin a = t[3] ? '1 : '0; b = t[4] ? '1 : {N/2{2'b10}}; end
      for (int unsigned e = 0; e < N / w; e++) begin
        logic [N+2:0] ext;
        ext = '0;
        for (int unsigned k = 0; k < w; k++) ext[k+1] = b[w*e + k];
        ext[w+1] = b[w*e + w - 1] & ~uns;
        ext[w+2] = ext[w+1];
        for (int unsigned m = 0; m < w / 2; m++)
          sel[e*w/2 + m] = enc(-2 * int'(ext[2*m+2]) + int'(ext[2*m+1]) + int'(ext[2*m]));
        ext_sel[e] = enc(-2 * int'(ext[w+2]) + int'(ext[w+1]) + int'(ext[w]));
      end
      for (int unsigned e = N / w; e < MAXEL; e++) ext_sel[e] = enc(0);
      #1;
      for (int unsigned e = 0; e < N / w; e++) begin
        logic [RW-1:0] av, bv, tot, prod;
        av = (RW'(a) >> (w * e)) & msk(w);
        bv = (RW'(b) >> (w * e)) & msk(w);
        if (!uns && av[w-1]) av = av | ~msk(w);
        if (!uns && bv[w-1]) bv = bv | ~msk(w);
        prod = (av * bv) & msk(2 * w);
        tot  = '0;
        for (int unsigned j = 0; j < NPP; j++) tot = tot + ((pp[j] >> (2 * w * e)) & msk(2 * w));
        checks++;
        if ((tot & msk(2 * w)) !== prod) begin
          failures++;
          if (failures < 10) $display("FAIL w=%0d uns=%0d e=%0d a=%h b=%h sum=%h exp=%h", w, uns, e, a, b, tot & msk(2*w), prod);
        end
      end
      for (int unsigned j = 0; j < NDIG; j++) begin
        int unsigned e;
        e = 2 * j / w;
        checks++;
        if ((pp[j] & ~(msk(2 * w) << (2 * w * e))) != 0) begin
          failures++;
          $display("FAIL row %0d leaves its element in %0d-bit mode", j, w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
