// tb_reverse_converter: feeds every valid residue triple (r5, r3, r2), 30 in
// all, and checks that the output is the unique z in 0..29 with
// z mod 5 = r5, z mod 3 = r3 and z mod 2 = r2, found here by search.
module tb_reverse_converter;
  import rns_pkg::*;
  rns_vec_t r;
  bin_t     z;
  int       checks = 0, failures = 0;
  logic     clk = 1'b0;

  reverse_converter dut (.r, .z);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expz;
    for (int r0 = 0; r0 < 5; r0++)
      for (int r1 = 0; r1 < 3; r1++)
        for (int r2 = 0; r2 < 2; r2++) begin
          expz = -1;
          for (int v = 0; v < 30; v++)
            if (v % 5 == r0 && v % 3 == r1 && v % 2 == r2) expz = v;
          r[0] = residue_t'(r0); r[1] = residue_t'(r1); r[2] = residue_t'(r2);
          @(negedge clk);
          checks++;
          if (int'(z) != expz) begin
            failures++;
            $display("FAIL (%0d,%0d,%0d) -> %0d, expected %0d", r0, r1, r2, z, expz);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
