// tb_vmac_edge_patterns: the edge-bit verification workload, run on every
// element at once. In each element the two most and two least significant
// bits of A and B take all 16 values while the bits between are all ones or
// all zeros (32 patterns per operand). The accumulator element gets the same
// kind of pattern over its 2w bits. For every mode and sign the test walks all
// 32 x 32 x 32 (A, B, C) pattern triples; element e uses the triple rotated by
// e, so neighbouring elements see different patterns in the same operation.
// The reference is plain per-element integer arithmetic.
module tb_vmac_edge_patterns;
  import vmac_pkg::*;

  logic [N-1:0]  a, b;
  logic [RW-1:0] c, r;
  vmode_t        mode;
  logic          uns;
  int checks = 0, failures = 0;

  vmac dut (.a(a), .b(b), .c(c), .mode(mode), .uns(uns), .r(r));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [RW-1:0] msk(int unsigned nb);
    return (nb >= RW) ? '1 : ((RW'(1) << nb) - 1);
  endfunction

  // nb-bit value: bits [1:0] and [nb-1:nb-2] from pat[3:0], the rest pat[4].
  function automatic logic [RW-1:0] edge_pat(int unsigned nb, int unsigned pat);
    logic [RW-1:0] v;
    v = {RW{pat[4]}} & msk(nb);
    v[1:0] = pat[1:0];
    v[nb-1 -: 2] = pat[3:2];
    return v;
  endfunction

  initial begin
    for (int mi = 0; mi < 4; mi++) begin
      for (int si = 0; si < 2; si++) begin
        int unsigned w;
        int fails_here;
        mode = vmode_t'(1 << mi);
        uns  = si[0];
        w    = elem_width(mode);
        fails_here = 0;
        for (int pa = 0; pa < 32; pa++)
          for (int pb = 0; pb < 32; pb++)
            for (int pc = 0; pc < 32; pc++) begin
              logic [RW-1:0] exp;
              a = '0; b = '0; c = '0; exp = '0;
              for (int unsigned e = 0; e < N / w; e++) begin
                logic [RW-1:0] av, bv, cv;
                av = edge_pat(w, (pa + e) % 32);
                bv = edge_pat(w, (pb + 3 * e) % 32);
                cv = edge_pat(2 * w, (pc + 5 * e) % 32);
                a = a | N'(av << (w * e));
                b = b | N'(bv << (w * e));
                c = c | (cv << (2 * w * e));
                if (!uns && av[w-1]) av = av | ~msk(w);
                if (!uns && bv[w-1]) bv = bv | ~msk(w);
                exp = exp | (((cv + av * bv) & msk(2 * w)) << (2 * w * e));
              end
              #1;
              checks++;
              if (r !== exp) begin
                failures++;
                fails_here++;
                if (failures < 10) $display("FAIL mode=%b uns=%0d a=%h b=%h c=%h r=%h exp=%h", mode, uns, a, b, c, r, exp);
              end
            end
        $display("%0d-bit %s: 32768 operations, %0d failures", w, uns ? "unsigned" : "signed", fails_here);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
