// tb_feynman_gate: exhaustive check of the Feynman gate (p = a, q = a ^ b),
// including its use as an inverter (b = 1) and as a copier (b = 0).
module tb_feynman_gate;
  logic a, b, p, q;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  feynman_gate dut (.a, .b, .p, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (b ? !a : a)) begin
        failures++;
        $display("FAIL ab=%b pq=%b", {a, b}, {p, q});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
