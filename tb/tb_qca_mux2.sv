// tb_qca_mux2: exhaustive check of the majority-logic 2:1 multiplexer.
// The expected output is looked up in a two-entry array indexed by the
// select bit.
module tb_qca_mux2;
  logic clk = 1'b0;
  logic s0, s1, sel, y;
  logic din [2];
  int checks = 0, failures = 0;

  qca_mux2 dut (.s0(s0), .s1(s1), .sel(sel), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v);
    {sel, s1, s0} = 3'(v);
    din[0] = s0;
    din[1] = s1;
    @(posedge clk);
    checks++;
    if (y !== din[sel]) begin
      failures++;
      $display("FAIL sel=%b s1=%b s0=%b y=%b", sel, s1, s0, y);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) apply(v);
    for (int k = 0; k < 32; k++) apply(int'($urandom_range(7, 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_qca_mux2
