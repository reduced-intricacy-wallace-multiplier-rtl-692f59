// eehcfa_full_adder: energy-efficient hybrid CMOS full adder.
//
// The adder follows an alternative logic structure instead of the usual
// sum-of-products one. An XOR/XNOR cell (eehcfa_xor_xnor) produces
// a ^ b and its complement. Two transmission-gate multiplexers then make
// the outputs:
//   sum  = c ? xnor(a,b) : xor(a,b)     (sum mux selected by input c)
//   cout = xor(a,b) ? c : a             (carry mux selected by the
//                                        intermediate xor signal)
// When a and b are equal the carry is their common value; otherwise it is c.
// Using the xor signal as the carry select follows the description of the
// proposed cell; the alternative scheme with both muxes selected by c is not
// used.
//
// Interface: a, b, c in; sum, cout out. Timing: purely combinational.
module eehcfa_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic cout
);
  logic x, xn;

  eehcfa_xor_xnor u_xor_xnor (
    .a (a),
    .b (b),
    .x (x),
    .xn(xn)
  );

  eehcfa_mux2 u_sum_mux (
    .sel(c),
    .d0 (x),
    .d1 (xn),
    .y  (sum)
  );

  eehcfa_mux2 u_carry_mux (
    .sel(x),
    .d0 (a),
    .d1 (c),
    .y  (cout)
  );
endmodule
