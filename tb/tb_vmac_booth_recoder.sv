// tb_vmac_booth_recoder: all eight triplets in every digit slot. The selects
// must be one-hot and stand for the digit -2*b2 + b1 + b0.
module tb_vmac_booth_recoder;
  import vmac_pkg::*;

  localparam int unsigned ND = 4;
  logic [2:0] trip [ND];
  booth_sel_t sel  [ND];
  int checks = 0, failures = 0;

  vmac_booth_recoder #(.NDIGITS(ND)) dut (.trip(trip), .sel(sel));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 64; t++) begin
      for (int d = 0; d < ND; d++) trip[d] = 3'((t + 3 * d) % 8);
      #1;
      for (int d = 0; d < ND; d++) begin
        int val, got;
        val = -2 * int'(trip[d][2]) + int'(trip[d][1]) + int'(trip[d][0]);
        got = sel[d].p1 ? 1 : sel[d].p2 ? 2 : sel[d].n1 ? -1 : sel[d].n2 ? -2 : 0;
        checks++;
        if ($countones(sel[d]) != 1 || got != val || (val == 0 && !sel[d].ze)) begin
          failures++;
          $display("FAIL trip=%b sel=%b", trip[d], sel[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
