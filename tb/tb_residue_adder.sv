// tb_residue_adder: checks s = (a + b) mod m for the 4-bit residue adder over
// every modulus 1..15 and every pair of valid residues a, b < m, and counts
// how often each branch of the flow (raw sum kept, modulus subtracted) was
// taken; both must occur. Then random checks of a 16-bit instance.
module tb_residue_adder;
  logic [3:0]  a4, b4, m4, s4;
  logic [15:0] a16, b16, m16, s16;
  int          checks = 0, failures = 0, n_keep = 0, n_corr = 0;
  logic        clk = 1'b0;

  residue_adder #(.N(4))  dut4  (.a(a4),  .b(b4),  .m(m4),  .s(s4));
  residue_adder #(.N(16)) dut16 (.a(a16), .b(b16), .m(m16), .s(s16));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ma, mb, mm;
    for (int m = 1; m < 16; m++)
      for (int a = 0; a < m; a++)
        for (int b = 0; b < m; b++) begin
          m4 = 4'(m); a4 = 4'(a); b4 = 4'(b);
          @(negedge clk);
          if (a + b >= m) n_corr++; else n_keep++;
          checks++;
          if (s4 !== 4'((a + b) % m)) begin
            failures++;
            $display("FAIL (%0d+%0d) mod %0d -> %0d", a, b, m, s4);
          end
        end
    for (int i = 0; i < 2000; i++) begin
      mm = 1 + ($urandom % 65535);
      ma = $urandom % mm; mb = $urandom % mm;
      if (i == 0) begin mm = 65535; ma = 65534; mb = 65534; end
      m16 = 16'(mm); a16 = 16'(ma); b16 = 16'(mb);
      @(negedge clk);
      checks++;
      if (s16 !== 16'((ma + mb) % mm)) begin
        failures++;
        $display("FAIL 16-bit (%0d+%0d) mod %0d -> %0d", ma, mb, mm, s16);
      end
    end
    checks++;
    if (n_keep == 0 || n_corr == 0) begin
      failures++;
      $display("FAIL a branch of the flow never ran: keep=%0d correct=%0d", n_keep, n_corr);
    end
    $display("branches: raw sum kept %0d, modulus subtracted %0d", n_keep, n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
