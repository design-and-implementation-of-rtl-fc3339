// tb_qca_lt_cmp: exhaustive check of the one-bit less-than comparator,
// against the integer comparison of the two input bits.
module tb_qca_lt_cmp;
  logic clk = 1'b0;
  logic a, b, lt;
  int checks = 0, failures = 0;

  qca_lt_cmp dut (.a(a), .b(b), .lt(lt));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v);
    {a, b} = 2'(v);
    @(posedge clk);
    checks++;
    if (lt !== ((int'(a) < int'(b)) ? 1'b1 : 1'b0)) begin
      failures++;
      $display("FAIL %b < %b gave %b", a, b, lt);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++) apply(v);
    for (int k = 0; k < 32; k++) apply(int'($urandom_range(3, 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_qca_lt_cmp
