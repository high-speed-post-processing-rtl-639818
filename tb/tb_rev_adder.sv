// tb_rev_adder: exhaustive check of the 4-bit TSG ripple-carry adder
// ({cout, sum} = a + b + cin for all 512 input combinations), then random
// checks of a 16-bit instance.
module tb_rev_adder;
  logic [3:0]  a4, b4, s4;
  logic [15:0] a16, b16, s16;
  logic        cin4, cin16, co4, co16;
  int          checks = 0, failures = 0;
  logic        clk = 1'b0;

  rev_adder #(.N(4))  dut4  (.a(a4),  .b(b4),  .cin(cin4),  .sum(s4),  .cout(co4));
  rev_adder #(.N(16)) dut16 (.a(a16), .b(b16), .cin(cin16), .sum(s16), .cout(co16));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_v;
    for (int v = 0; v < 512; v++) begin
      {cin4, a4, b4} = 9'(v);
      @(negedge clk);
      exp_v = a4 + b4 + cin4;
      checks++;
      if ({co4, s4} !== 5'(exp_v)) begin
        failures++;
        $display("FAIL 4-bit %0d+%0d+%0d -> %0d", a4, b4, cin4, {co4, s4});
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); cin16 = 1'($urandom);
      if (i == 0) begin a16 = 16'hffff; b16 = 16'h0000; cin16 = 1'b1; end
      @(negedge clk);
      exp_v = a16 + b16 + cin16;
      checks++;
      if ({co16, s16} !== 17'(exp_v)) begin
        failures++;
        $display("FAIL 16-bit %0d+%0d+%0d -> %0d", a16, b16, cin16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
