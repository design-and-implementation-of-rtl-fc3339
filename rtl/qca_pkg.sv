// qca_pkg: constants shared by the majority-logic gates of the ACS unit.
//
// In quantum-dot cellular automata a majority gate becomes an AND or an OR
// gate when one of its three inputs is a cell whose polarization is fixed:
// polarization -1.00 is logic 0 and +1.00 is logic 1. The two constants
// below stand for those fixed cells, so that every gate in this design is
// written as the majority vote the layout computes rather than as a
// plain AND or OR. The -1.00 / +1.00 to 0 / 1 mapping is the usual QCA
// convention and the one the gate equations of this design rely on.
package qca_pkg;

  // Fixed cell at polarization -1.00 (logic 0): turns a majority gate into AND.
  localparam logic FIXED_0 = 1'b0;
  // Fixed cell at polarization +1.00 (logic 1): turns a majority gate into OR.
  localparam logic FIXED_1 = 1'b1;

endpackage : qca_pkg
