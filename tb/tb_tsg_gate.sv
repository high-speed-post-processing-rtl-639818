// tb_tsg_gate: exhaustive check of the TSG gate over all 16 input patterns.
// Expected outputs come from the gate equations; the test also checks that
// the gate is reversible (16 distinct output patterns) and that with c = 0 it
// adds a + b + d (r = sum bit, s = carry).
module tb_tsg_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  bit   seen [16];
  logic clk = 1'b0;

  tsg_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eq, er, es;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      eq = (~a & ~c) ^ ~b;
      er = eq ^ d;
      es = (eq & d) ^ ((a & b) ^ c);
      checks++;
      if ({p, q, r, s} !== {a, eq, er, es}) begin
        failures++;
        $display("FAIL abcd=%b pqrs=%b", {a, b, c, d}, {p, q, r, s});
      end
      if (c == 1'b0) begin
        checks++;
        if ({s, r} !== 2'(a + b + d)) begin
          failures++;
          $display("FAIL full adder abd=%b sr=%b", {a, b, d}, {s, r});
        end
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    for (int v = 0; v < 16; v++) begin
      checks++;
      if (!seen[v]) begin
        failures++;
        $display("FAIL output pattern %b never produced (not reversible)", 4'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
