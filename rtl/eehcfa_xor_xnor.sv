// eehcfa_xor_xnor: XOR/XNOR pair at the input of the hybrid full adder.
//
// In the transistor-level cell this is a double-pass-transistor-logic (DPL)
// gate: parallel NMOS and PMOS pass networks give A xor B and its complement
// at the same time, both with full voltage swing, so the two multiplexers
// that follow can be driven without extra inverter stages. At the logic level
// it is a plain XOR with a true and a complemented output.
//
// Interface: inputs a, b; outputs x = a ^ b and xn = ~(a ^ b).
// Timing: purely combinational.
module eehcfa_xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,
  output logic xn
);
  // Both rails are formed directly from the inputs (as the two DPL networks
  // do), not one as the inverse of the other.
  assign x  = (a & ~b) | (~a & b);
  assign xn = (a & b) | (~a & ~b);
endmodule
