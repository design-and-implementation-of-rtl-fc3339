// qca_maj3: three-input majority gate, the logic primitive of the design.
//
// The output follows whichever value at least two of the three inputs
// share: F = AB + BC + AC. In a QCA layout this is a device cell with three
// input cells around it and an output cell beside it; here it is one
// combinational expression. Every other gate of the ACS unit (XOR,
// less-than comparator, multiplexer) is a small network of these gates with
// some inputs tied to a fixed polarization (see qca_pkg).
//
// Interface: a, b, c in; f out. Purely combinational, no clock or reset.
// The equation is the one the design is built on; writing it as a sum of
// products is the natural RTL form.
module qca_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic f
);

  always_comb f = (a & b) | (b & c) | (a & c);

endmodule : qca_maj3
