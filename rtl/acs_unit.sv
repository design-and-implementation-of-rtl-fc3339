// acs_unit: 2-bit add-compare-select (ACS) unit in majority logic, the
// kernel a Viterbi decoder repeats for each trellis state.
//
// Two candidate paths enter, each as a one-bit path metric (pm1, pm2) and a
// one-bit branch metric (bm1, bm2): two bits per path, hence "2-bit".
//   add:     each path's new metric is pm xor bm (qca_xor). Sums of single
//            bits are kept to one bit, so the carry is not formed.
//   compare: dec = sum1 < sum2 (qca_lt_cmp).
//   select:  sm_q = dec ? sum1 : sum2 (qca_mux2), i.e. the smaller metric
//            survives; on a tie path 2 is kept.
// dec goes to the survivor path recording (traceback) logic and sm_q to the
// state metric update logic; both of those lie outside this unit. The sums
// are also brought out (sum1, sum2), as the layout labels them a and b.
//
// Timing: purely combinational, no clock or reset; in the QCA original the
// four-phase cell clock sets the latency, which has no counterpart here.
// The structure (two XOR adders, one less-than comparator, one 2:1
// multiplexer, all majority logic, one-bit operands) follows the design.
// Selecting the smaller sum when dec = 1 and keeping path 2 on a tie are
// this design's reading of the minimum-metric survivor rule.
module acs_unit (
  input  logic pm1,
  input  logic bm1,
  input  logic pm2,
  input  logic bm2,
  output logic sum1,
  output logic sum2,
  output logic dec,
  output logic sm_q
);

  qca_xor    u_add1 (.a(pm1), .b(bm1), .c(sum1));
  qca_xor    u_add2 (.a(pm2), .b(bm2), .c(sum2));
  qca_lt_cmp u_cmp  (.a(sum1), .b(sum2), .lt(dec));
  qca_mux2   u_sel  (.s0(sum2), .s1(sum1), .sel(dec), .y(sm_q));

endmodule : acs_unit
