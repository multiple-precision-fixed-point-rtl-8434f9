// tb_vmac_booth_mask: checks the multiplier masking and sign extension.
// Reference: for each element the multiplier is rebuilt as the w+3-bit word
// {s, s, B_e, 0} with s = msb & ~uns, and local digit m must read bits
// [2m+2:2m] of it; the extra digit reads bits [w+2:w]. Random B, all modes,
// both signs.
module tb_vmac_booth_mask;
  import vmac_pkg::*;

  logic [N-1:0] b;
  vmode_t       mode;
  logic         uns;
  logic [2:0]   trip     [NDIG];
  logic [2:0]   ext_trip [MAXEL];
  int checks = 0, failures = 0;

  vmac_booth_mask dut (.b(b), .mode(mode), .uns(uns), .trip(trip), .ext_trip(ext_trip));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int unsigned w;
      mode = vmode_t'(1 << (t % 4));
      uns  = t[2];
      b    = {$urandom(), $urandom()};
      w    = 8 << (t % 4);
      #1;
      for (int unsigned e = 0; e < MAXEL; e++) begin
        logic [N+2:0] ext;
        logic         s;
        if (e < N / w) begin
          s   = b[w*e + w - 1] & ~uns;
          ext = '0;
          for (int unsigned k = 0; k < w; k++) ext[k+1] = b[w*e + k];
          ext[w+1] = s;
          ext[w+2] = s;
          for (int unsigned m = 0; m < w / 2; m++) begin
            checks++;
            if (trip[e*w/2 + m] !== ext[2*m +: 3]) begin
              failures++;
              $display("FAIL w=%0d e=%0d m=%0d trip=%b exp=%b", w, e, m, trip[e*w/2+m], ext[2*m +: 3]);
            end
          end
          checks++;
          if (ext_trip[e] !== ext[w +: 3]) failures++;
        end else begin
          checks++;
          if (ext_trip[e] !== 3'b000) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
