// qca_xor: two-input XOR built from majority gates; it serves as the
// adder of the ACS unit.
//
// A xor B = M(A, B', 0) OR M(A', B, 0). The two inner majority gates each
// have one input at fixed polarization 0, which makes them the AND terms
// A.B' and A'.B; the OR that joins them is a third majority gate whose
// third input is fixed at polarization 1. Inverters are the QCA inverter
// structure, written here as a plain NOT.
//
// Interface: a, b in; c = a xor b out. Purely combinational. The equation
// follows the design; the use of a majority gate with a fixed 1 for the
// final OR is how "OR" is realised in majority logic.
module qca_xor
  import qca_pkg::FIXED_0, qca_pkg::FIXED_1;
(
  input  logic a,
  input  logic b,
  output logic c
);

  logic a_and_nb;   // M(A, B', 0) = A.B'
  logic na_and_b;   // M(A', B, 0) = A'.B

  qca_maj3 u_and_anb (.a(a),  .b(~b), .c(FIXED_0), .f(a_and_nb));
  qca_maj3 u_and_nab (.a(~a), .b(b),  .c(FIXED_0), .f(na_and_b));
  qca_maj3 u_or      (.a(a_and_nb), .b(na_and_b), .c(FIXED_1), .f(c));

endmodule : qca_xor
