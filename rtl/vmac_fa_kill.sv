// vmac_fa_kill: full adder whose carry-in can be killed.
//
// sum  = (a ^ b) ^ (cin & ~kill)
// cout = (a & b) | ((a | b) & (cin & ~kill))
// The kill gate sits in parallel with the a/b terms, so it adds no delay on
// the a/b path. In the vector reduction tree kill is set where the carry-in
// would cross a vector element boundary. These equations are the published ones;
// the gate-level form (nand/oai21 in the published drawing) is left to
// synthesis. Combinational.
module vmac_fa_kill (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic kill,
  output logic sum,
  output logic cout
);

  logic c_eff;
  assign c_eff = cin & ~kill;
  assign sum   = (a ^ b) ^ c_eff;
  assign cout  = (a & b) | ((a | b) & c_eff);

endmodule
