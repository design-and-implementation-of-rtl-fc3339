// qca_mux2: 2:1 multiplexer in majority logic.
//
// y = sel ? s1 : s0, formed as M( M(s0, sel', 0), M(s1, sel, 0), 1 ): two
// majority gates with an input fixed at polarization 0 act as the AND
// terms s0.sel' and s1.sel, and a third with an input fixed at 1 ORs them.
// The layout this follows has the data inputs S0 and S1, a select input I
// and two fixed -1.00 cells; which data input the select value 1 picks is
// this design's choice (s1), as is writing the final OR as a majority gate
// with a fixed 1.
//
// Interface: s0, s1, sel in; y out. Purely combinational.
module qca_mux2
  import qca_pkg::FIXED_0, qca_pkg::FIXED_1;
(
  input  logic s0,
  input  logic s1,
  input  logic sel,
  output logic y
);

  logic t0;   // M(s0, sel', 0) = s0.sel'
  logic t1;   // M(s1, sel, 0)  = s1.sel

  qca_maj3 u_and0 (.a(s0), .b(~sel), .c(FIXED_0), .f(t0));
  qca_maj3 u_and1 (.a(s1), .b(sel),  .c(FIXED_0), .f(t1));
  qca_maj3 u_or   (.a(t0), .b(t1),   .c(FIXED_1), .f(y));

endmodule : qca_mux2
