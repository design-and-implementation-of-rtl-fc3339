// tb_acs_unit: end-to-end test of the add-compare-select unit at its only
// size (one-bit metrics, no parameters).
//
// Phase 1 applies all 16 combinations of pm1, bm1, pm2, bm2. Phase 2 runs
// the unit as it sits in a decoder: a path-metric register in this
// testbench takes sm_q back into pm1 every clock, as the state metric
// update would, while pm2 and the branch metrics are random; the decision
// bits are recorded in a survivor history as a traceback memory would.
//
// The reference model works with integers: each candidate is
// (pm + bm) mod 2, the decision is the integer comparison sum1 < sum2 and
// the survivor is the smaller candidate, path 2 on a tie. The three ways a
// selection can go (path 1 smaller, path 2 smaller, tie) are counted and
// each must occur. A watchdog stops a stalled run.
module tb_acs_unit;
  logic clk = 1'b0;
  logic pm1, bm1, pm2, bm2;
  logic sum1, sum2, dec, sm_q;
  int checks = 0, failures = 0;
  int n_sel_path1 = 0, n_sel_path2 = 0, n_tie = 0;

  localparam int Stages = 256;
  logic survivors [Stages];
  logic exp_dec [Stages];

  acs_unit dut (
    .pm1(pm1), .bm1(bm1), .pm2(pm2), .bm2(bm2),
    .sum1(sum1), .sum2(sum2), .dec(dec), .sm_q(sm_q)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare the unit's outputs with the integer reference for the inputs
  // now applied, and count which way the selection went.
  task automatic check_now();
    int c1, c2, e_dec, e_sm;
    c1 = (int'(pm1) + int'(bm1)) % 2;
    c2 = (int'(pm2) + int'(bm2)) % 2;
    e_dec = (c1 < c2) ? 1 : 0;
    e_sm  = (c1 < c2) ? c1 : c2;
    if (c1 < c2)      n_sel_path1++;
    else if (c2 < c1) n_sel_path2++;
    else              n_tie++;
    checks++;
    if (sum1 !== 1'(c1) || sum2 !== 1'(c2)) begin
      failures++;
      $display("FAIL add: pm1=%b bm1=%b pm2=%b bm2=%b sums=%b,%b expected %0d,%0d",
               pm1, bm1, pm2, bm2, sum1, sum2, c1, c2);
    end
    checks++;
    if (dec !== 1'(e_dec)) begin
      failures++;
      $display("FAIL compare: sums=%b,%b dec=%b expected %0d", sum1, sum2, dec, e_dec);
    end
    checks++;
    if (sm_q !== 1'(e_sm)) begin
      failures++;
      $display("FAIL select: sums=%b,%b sm_q=%b expected %0d", sum1, sum2, sm_q, e_sm);
    end
  endtask

  initial begin
    // Phase 1: every input combination.
    for (int v = 0; v < 16; v++) begin
      {pm1, bm1, pm2, bm2} = 4'(v);
      @(posedge clk);
      check_now();
    end

    // Phase 2: path metric fed back through a register, survivor decisions
    // recorded per stage.
    pm1 = 1'b0;
    for (int s = 0; s < Stages; s++) begin
      bm1 = 1'($urandom_range(1, 0));
      pm2 = 1'($urandom_range(1, 0));
      bm2 = 1'($urandom_range(1, 0));
      @(negedge clk);
      check_now();
      exp_dec[s] = ((int'(pm1) + int'(bm1)) % 2 < (int'(pm2) + int'(bm2)) % 2);
      @(posedge clk);
      survivors[s] = dec;
      pm1 = sm_q;
    end
    for (int s = 0; s < Stages; s++) begin
      checks++;
      if (survivors[s] !== exp_dec[s]) begin
        failures++;
        $display("FAIL survivor history stage %0d: %b expected %b", s, survivors[s], exp_dec[s]);
      end
    end

    $display("selections: path1=%0d path2=%0d tie=%0d", n_sel_path1, n_sel_path2, n_tie);
    checks++;
    if (n_sel_path1 == 0) begin failures++; $display("FAIL path 1 never selected"); end
    checks++;
    if (n_sel_path2 == 0) begin failures++; $display("FAIL path 2 never strictly smaller"); end
    checks++;
    if (n_tie == 0) begin failures++; $display("FAIL no tie between the candidates"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_acs_unit
