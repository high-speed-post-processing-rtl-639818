// tb_rev_subtractor: exhaustive check of the 4-bit reversible subtractor
// (diff = a - b mod 16, borrow = a < b), then random checks at 16 bits.
module tb_rev_subtractor;
  logic [3:0]  a4, b4, d4;
  logic [15:0] a16, b16, d16;
  logic        br4, br16;
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;

  rev_subtractor #(.N(4))  dut4  (.a(a4),  .b(b4),  .diff(d4),  .borrow(br4));
  rev_subtractor #(.N(16)) dut16 (.a(a16), .b(b16), .diff(d16), .borrow(br16));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      @(negedge clk);
      checks++;
      if (d4 !== 4'(a4 - b4) || br4 !== (a4 < b4)) begin
        failures++;
        $display("FAIL 4-bit %0d-%0d -> %0d borrow %0b", a4, b4, d4, br4);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (i == 0) begin a16 = 16'h0000; b16 = 16'hffff; end
      @(negedge clk);
      checks++;
      if (d16 !== 16'(a16 - b16) || br16 !== (a16 < b16)) begin
        failures++;
        $display("FAIL 16-bit %0d-%0d -> %0d borrow %0b", a16, b16, d16, br16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
