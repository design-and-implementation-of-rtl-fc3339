// tb_qca_maj3: exhaustive check of the three-input majority gate.
// All eight input combinations are applied; the expected output is the
// count of ones compared against two, worked out without any gate
// expression. A watchdog ends the run if it stalls.
module tb_qca_maj3;
  logic clk = 1'b0;
  logic a, b, c, f;
  int checks = 0, failures = 0;

  qca_maj3 dut (.a(a), .b(b), .c(c), .f(f));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      @(posedge clk);
      checks++;
      if (f !== (($countones(3'(v)) >= 2) ? 1'b1 : 1'b0)) begin
        failures++;
        $display("FAIL maj(%b,%b,%b) = %b", a, b, c, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_qca_maj3
