// tb_qca_xor: exhaustive check of the majority-logic XOR used as adder.
// The expected output is the low bit of the integer sum a + b. Every input
// pair is applied twice, once in ascending and once in a shuffled order.
module tb_qca_xor;
  logic clk = 1'b0;
  logic a, b, c;
  int checks = 0, failures = 0;

  qca_xor dut (.a(a), .b(b), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v);
    int s;
    {a, b} = 2'(v);
    @(posedge clk);
    s = int'(a) + int'(b);
    checks++;
    if (c !== 1'(s % 2)) begin
      failures++;
      $display("FAIL %b xor %b = %b", a, b, c);
    end
  endtask

  initial begin
    for (int v = 0; v < 4; v++) apply(v);
    for (int k = 0; k < 32; k++) apply(int'($urandom_range(3, 0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_qca_xor
