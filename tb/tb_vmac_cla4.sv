// tb_vmac_cla4: exhaustive over all generate/propagate patterns (g and p never
// both 1 in a position, as with p = a ^ b), carry-in and kill vectors. The
// reference is a ripple chain: carry into position i+1 = (g[i] | p[i] & c[i])
// with the killed positions forced to 0; the block generate is the ripple
// carry out with cin = 0 and the block propagate says whether a carry-in
// reaches the top unchanged through unkilled positions 1..3.
module tb_vmac_cla4;
  logic [3:0] g, p, kill, c;
  logic       cin, gout, pout;
  int checks = 0, failures = 0;

  vmac_cla4 dut (.g(g), .p(p), .cin(cin), .kill(kill), .c(c), .gout(gout), .pout(pout));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 81 * 32; t++) begin
      int code;
      logic [4:0] rc, rg;
      logic       rp;
      code = t % 81;
      for (int i = 0; i < 4; i++) begin
        g[i] = (code % 3) == 1;
        p[i] = (code % 3) == 2;
        code = code / 3;
      end
      {cin, kill} = 5'(t / 81);
      #1;
      rc[0] = cin & ~kill[0];
      rg[0] = 1'b0;
      rp    = 1'b1;
      for (int i = 0; i < 4; i++) begin
        rc[i+1] = g[i] | (p[i] & rc[i]);
        rg[i+1] = g[i] | (p[i] & rg[i]);
        if (i < 3 && kill[i+1]) begin rc[i+1] = 0; rg[i+1] = 0; end
        rp = rp & p[i] & ((i == 0) ? 1'b1 : ~kill[i]);
      end
      checks++;
      if (c !== rc[3:0] || gout !== rg[4] || pout !== rp) begin
        failures++;
        if (failures < 10) $display("FAIL g=%b p=%b cin=%b kill=%b c=%b/%b G=%b/%b P=%b/%b",
                                    g, p, cin, kill, c, rc[3:0], gout, rg[4], pout, rp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
