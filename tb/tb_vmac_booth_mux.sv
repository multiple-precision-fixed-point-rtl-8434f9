// tb_vmac_booth_mux: for random elements (random width, position, operand,
// sign mode) and each of the five selects, the signed value of the field
// (w+1 data bits with the sign n above them) plus the hot one the next row
// adds (1 for -a, 2 for -2a) must equal digit * a, and no bit outside the
// field may be set.
module tb_vmac_booth_mux;
  import vmac_pkg::*;

  logic [N:0] v, fmask, data;
  logic       sext, n;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  vmac_booth_mux dut (.v(v), .fmask(fmask), .sext(sext), .sel(sel), .data(data), .n(n));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int unsigned w, lo;
      logic [N-1:0] ae;
      logic         u;
      longint       dig;
      logic signed [N+3:0] aval, exp, got;
      w  = 8 << $urandom_range(3);
      lo = w * $urandom_range(N / w - 1);
      u  = $urandom_range(1);
      ae = {$urandom(), $urandom()};
      if (w < N) ae = ae & ((N'(1) << w) - 1);
      sext  = ~u & ae[w-1];
      v     = ((N+1)'(ae) << lo) | ((N+1)'(sext) << (lo + w));
      fmask = ((N+1)'(1) << (w + 1)) - 1;
      fmask = fmask << lo;
      aval  = (N+4)'(ae);
      if (!u && ae[w-1]) aval = aval - ((N+4)'(1) << w);
      sel = '0;
      unique case (t % 5)
        0: begin sel.ze = 1; dig = 0;  end
        1: begin sel.p1 = 1; dig = 1;  end
        2: begin sel.p2 = 1; dig = 2;  end
        3: begin sel.n1 = 1; dig = -1; end
        default: begin sel.n2 = 1; dig = -2; end
      endcase
      #1;
      exp = aval * (N+4)'(dig);
      got = (N+4)'(data >> lo);
      if (n) got = got - ((N+4)'(1) << (w + 1));
      got = got + (sel.n1 ? 1 : 0) + (sel.n2 ? 2 : 0);
      checks++;
      if (got !== exp || (data & ~fmask) != 0) begin
        failures++;
        if (failures < 10) $display("FAIL w=%0d lo=%0d u=%0d a=%h dig=%0d got=%0d exp=%0d", w, lo, u, ae, dig, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
