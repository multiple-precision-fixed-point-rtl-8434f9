// tb_vmac_fa_kill: exhaustive check of the full adder with carry-in kill:
// {cout, sum} = a + b + (kill ? 0 : cin).
module tb_vmac_fa_kill;
  logic a, b, cin, kill, sum, cout;
  int checks = 0, failures = 0;

  vmac_fa_kill dut (.a(a), .b(b), .cin(cin), .kill(kill), .sum(sum), .cout(cout));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 16; t++) begin
      int s;
      {a, b, cin, kill} = 4'(t);
      #1;
      s = int'(a) + int'(b) + (kill ? 0 : int'(cin));
      checks++;
      if ({cout, sum} !== 2'(s)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b kill=%b -> %b%b", a, b, cin, kill, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
