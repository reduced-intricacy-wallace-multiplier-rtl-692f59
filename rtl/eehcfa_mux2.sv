// eehcfa_mux2: 2:1 multiplexer of the hybrid full adder.
//
// In the transistor-level cell each multiplexer is a pair of transmission
// gates whose control is one signal and its complement; one gate conducts
// d0 to the output when sel is low, the other conducts d1 when sel is high.
// Transmission gates give a full swing and can drive a large load.
//
// Interface: sel, d0, d1 in; y = sel ? d1 : d0 out.
// Timing: purely combinational.
module eehcfa_mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);
  // One AND term per transmission gate, at most one of them conducts.
  assign y = (~sel & d0) | (sel & d1);
endmodule
