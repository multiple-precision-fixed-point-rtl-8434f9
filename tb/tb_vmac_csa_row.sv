// tb_vmac_csa_row: random rows and kill masks. The row must keep the sum:
// sum + carry = (x & ~kill_x) + (y & ~kill_y) + (z & ~kill_z) mod 2^W, with
// carry[0] = 0.
module tb_vmac_csa_row;
  localparam int unsigned W = 128;
  logic [W-1:0] x, y, z, kx, ky, kz, sum, carry;
  int checks = 0, failures = 0;

  vmac_csa_row #(.W(W)) dut (.x(x), .y(y), .z(z), .kill_x(kx), .kill_y(ky), .kill_z(kz),
                             .sum(sum), .carry(carry));

  function automatic logic [W-1:0] rnd();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      x = rnd(); y = rnd(); z = rnd();
      kx = (t % 3 == 0) ? rnd() : '0;
      ky = (t % 3 == 1) ? rnd() : '0;
      kz = rnd();
      #1;
      checks++;
      if (W'(sum + carry) !== W'((x & ~kx) + (y & ~ky) + (z & ~kz)) || carry[0] !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
