// rcwm_half_adder: half adder of the reduction tree and the final adder.
//
// The reduced-complexity tree uses half adders only where a column would
// otherwise be taller than a standard Wallace tree allows, and the final adder
// uses them in the low columns where only two inputs meet. Their insides are
// not specified, so this is the plain XOR/AND form.
//
// Interface: a, b in; sum = a ^ b, cout = a & b out. Combinational.
module rcwm_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
