// tb_residue_subtractor: checks s = (a - b) mod m for the residue subtractor
// at its default width of 16 bits (random moduli and residues, plus edge
// cases) and exhaustively at 4 bits (every modulus 1..15, every pair of valid
// residues). Counts the two branches of the flow (difference kept, modulus
// added back); both must occur.
module tb_residue_subtractor;
  logic [3:0]  a4, b4, m4, s4;
  logic [15:0] a16, b16, m16, s16;
  int          checks = 0, failures = 0, n_keep = 0, n_wrap = 0;
  logic        clk = 1'b0;

  residue_subtractor          dut16 (.a(a16), .b(b16), .m(m16), .s(s16));
  residue_subtractor #(.N(4)) dut4  (.a(a4),  .b(b4),  .m(m4),  .s(s4));

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
          if (a < b) n_wrap++; else n_keep++;
          checks++;
          if (s4 !== 4'((a - b + m) % m)) begin
            failures++;
            $display("FAIL (%0d-%0d) mod %0d -> %0d", a, b, m, s4);
          end
        end
    for (int i = 0; i < 2000; i++) begin
      mm = 1 + ($urandom % 65535);
      ma = $urandom % mm; mb = $urandom % mm;
      if (i == 0) begin mm = 65535; ma = 0; mb = 65534; end
      if (i == 1) begin mm = 65535; ma = 65534; mb = 0; end
      m16 = 16'(mm); a16 = 16'(ma); b16 = 16'(mb);
      @(negedge clk);
      checks++;
      if (s16 !== 16'((ma + mm - mb) % mm)) begin
        failures++;
        $display("FAIL 16-bit (%0d-%0d) mod %0d -> %0d", ma, mb, mm, s16);
      end
    end
    checks++;
    if (n_keep == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a branch of the flow never ran: keep=%0d wrap=%0d", n_keep, n_wrap);
    end
    $display("branches: difference kept %0d, modulus added %0d", n_keep, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
