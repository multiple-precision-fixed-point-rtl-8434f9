// tb_vmac_pprt: random 34 rows and each mode's boundary kill mask. The two
// output rows, added with carries stopped at the element boundaries, must
// equal the per-element sum of all input rows mod 2^(2w). The output rows
// must also be free of carries into a boundary column from a carry row
// (checked implicitly by the per-element sum, since a leaked carry changes
// the element above).
module tb_vmac_pprt;
  import vmac_pkg::*;

  logic [RW-1:0] pp [NPP];
  logic [RW-1:0] acc, kmask, out0, out1;
  int checks = 0, failures = 0;

  vmac_pprt dut (.pp(pp), .acc(acc), .kmask(kmask), .out0(out0), .out1(out1));

  function automatic logic [RW-1:0] rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
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
    for (int t = 0; t < 400; t++) begin
      int unsigned w2;
      w2 = 16 << (t % 4);
      kmask = '0;
      for (int unsigned c = w2; c < RW; c += w2) kmask[c] = 1'b1;
      for (int j = 0; j < NPP; j++) pp[j] = (t < 40) ? '1 : rnd();
      acc = (t < 40) ? '1 : rnd();
      #1;
      for (int unsigned e = 0; e < RW / w2; e++) begin
        logic [RW-1:0] s, o;
        s = (acc >> (w2 * e)) & msk(w2);
        for (int j = 0; j < NPP; j++) s = s + ((pp[j] >> (w2 * e)) & msk(w2));
        o = ((out0 >> (w2 * e)) & msk(w2)) + ((out1 >> (w2 * e)) & msk(w2));
        checks++;
        if ((s & msk(w2)) !== (o & msk(w2))) begin
          failures++;
          if (failures < 10) $display("FAIL w2=%0d e=%0d", w2, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
