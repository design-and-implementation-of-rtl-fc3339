// qca_lt_cmp: one-bit less-than comparator in majority logic.
//
// For single bits, A < B holds only for A = 0, B = 1, so A<B = A'.B. It is
// one majority gate, M(A', B, 0), with one input cell fixed at
// polarization 0 and A entering through an inverter.
//
// Interface: a, b in; lt = (a < b) out. Purely combinational. The equation
// and the single fixed-0 majority gate follow the design.
module qca_lt_cmp
  import qca_pkg::FIXED_0;
(
  input  logic a,
  input  logic b,
  output logic lt
);

  qca_maj3 u_and (.a(~a), .b(b), .c(FIXED_0), .f(lt));

endmodule : qca_lt_cmp
