// tb_forward_converter: converts every 5-bit value 0..31 and compares each
// channel with x mod 5, x mod 3 and x mod 2 worked out here. Includes the
// worked example 29 -> (4, 2, 1).
module tb_forward_converter;
  import rns_pkg::*;
  bin_t     x;
  rns_vec_t r;
  int       checks = 0, failures = 0;
  logic     clk = 1'b0;

  forward_converter dut (.x, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      x = bin_t'(v);
      @(negedge clk);
      for (int ch = 0; ch < NUM_CH; ch++) begin
        checks++;
        if (r[ch] !== residue_t'(v % MODULI[ch])) begin
          failures++;
          $display("FAIL %0d mod %0d -> %0d", v, MODULI[ch], r[ch]);
        end
      end
    end
    x = bin_t'(29);
    @(negedge clk);
    checks++;
    if (r[0] !== 4 || r[1] !== 2 || r[2] !== 1) begin
      failures++;
      $display("FAIL 29 -> (%0d, %0d, %0d), expected (4, 2, 1)", r[0], r[1], r[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
