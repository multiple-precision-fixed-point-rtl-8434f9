// tb_vmac_cpa: random and carry-heavy operands in each mode. Every element
// slice of the sum must be (a_e + b_e) mod 2^(2w): carries stop at element
// boundaries and the carry out of bit 127 is dropped.
module tb_vmac_cpa;
  import vmac_pkg::*;

  logic [RW-1:0] a, b, kmask, s;
  int checks = 0, failures = 0;

  vmac_cpa dut (.a(a), .b(b), .kmask(kmask), .s(s));

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
    for (int t = 0; t < 2000; t++) begin
      int unsigned w2;
      w2 = 16 << (t % 4);
      kmask = '0;
      for (int unsigned c = w2; c < RW; c += w2) kmask[c] = 1'b1;
      a = rnd(); b = rnd();
      if (t % 8 >= 4) b = ~a ^ (RW'(1) << $urandom_range(RW - 1));   // long propagate chains
      if (t % 16 == 15) begin a = '1; b = RW'(1) | (RW'(1) << 64); end
      #1;
      for (int unsigned e = 0; e < RW / w2; e++) begin
        logic [RW-1:0] ae, be;
        ae = (a >> (w2 * e)) & msk(w2);
        be = (b >> (w2 * e)) & msk(w2);
        checks++;
        if (((s >> (w2 * e)) & msk(w2)) !== ((ae + be) & msk(w2))) begin
          failures++;
          if (failures < 10) $display("FAIL w2=%0d e=%0d a=%h b=%h s=%h", w2, e, a, b, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
