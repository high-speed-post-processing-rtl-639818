// tb_rns_top: end-to-end test of the whole design at its default sizes.
//
// RNS path: every pair x, y in 0..29 (900 operations). Checks the forward
// conversion of both operands, the per-channel residue sums and differences,
// and the binary results z_sum = (x + y) mod 30 and z_diff = (x - y) mod 30.
// It counts how often each mechanism happened and fails if one never did:
//   - a channel sum that reached the modulus and was reduced,
//   - a channel difference that borrowed and had the modulus added back,
//   - a binary sum that wrapped past the dynamic range (x + y >= 30),
//   - a binary difference that wrapped (x < y).
// 16-bit subtractor: the operand sequence of the published waveform
// (a = 7.., b = 4.., m counting up), with m replaced by a valid modulus
// where the waveform's is not above both operands, then random operations;
// expected values are (a - b) mod m.
module tb_rns_top;
  import rns_pkg::*;
  bin_t        x, y, z_sum, z_diff;
  rns_vec_t    x_rns, y_rns, sum_rns, diff_rns;
  logic [15:0] a16, b16, m16, s16;
  int          checks = 0, failures = 0;
  int          n_ch_reduce = 0, n_ch_borrow = 0, n_sum_wrap = 0, n_diff_wrap = 0, n_sub16_wrap = 0;
  logic        clk = 1'b0;

  rns_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input int unsigned a, input int unsigned b, input int unsigned m);
    a16 = 16'(a); b16 = 16'(b); m16 = 16'(m);
    @(negedge clk);
    if (a < b) n_sub16_wrap++;
    checks++;
    if (s16 !== 16'((a + m - b) % m)) begin
      failures++;
      $display("FAIL s16 (%0d-%0d) mod %0d -> %0d", a, b, m, s16);
    end
  endtask

  initial begin
    int unsigned mm;
    a16 = '0; b16 = '0; m16 = 16'd1;
    for (int xv = 0; xv < DYN_RANGE; xv++)
      for (int yv = 0; yv < DYN_RANGE; yv++) begin
        x = bin_t'(xv); y = bin_t'(yv);
        @(negedge clk);
        for (int ch = 0; ch < NUM_CH; ch++) begin
          int unsigned mi, xr, yr;
          mi = MODULI[ch]; xr = xv % mi; yr = yv % mi;
          if (xr + yr >= mi) n_ch_reduce++;
          if (xr < yr) n_ch_borrow++;
          checks++;
          if (x_rns[ch] !== residue_t'(xr) || y_rns[ch] !== residue_t'(yr) ||
              sum_rns[ch] !== residue_t'((xr + yr) % mi) ||
              diff_rns[ch] !== residue_t'((xr + mi - yr) % mi)) begin
            failures++;
            $display("FAIL channel %0d x=%0d y=%0d: xr=%0d yr=%0d sum=%0d diff=%0d",
                     ch, xv, yv, x_rns[ch], y_rns[ch], sum_rns[ch], diff_rns[ch]);
          end
        end
        if (xv + yv >= DYN_RANGE) n_sum_wrap++;
        if (xv < yv) n_diff_wrap++;
        checks++;
        if (int'(z_sum) != (xv + yv) % DYN_RANGE) begin
          failures++;
          $display("FAIL z_sum %0d+%0d -> %0d", xv, yv, z_sum);
        end
        checks++;
        if (int'(z_diff) != (xv - yv + DYN_RANGE) % DYN_RANGE) begin
          failures++;
          $display("FAIL z_diff %0d-%0d -> %0d", xv, yv, z_diff);
        end
      end

    // Waveform operand sequence: a = 7+k, b = 4+k, m = k (k = 0..7).
    for (int k = 0; k < 8; k++) begin
      mm = k;
      if (mm <= 7 + k) mm = 7 + k + 1;
      check16(7 + k, 4 + k, mm);
      check16(4 + k, 7 + k, mm);
    end
    for (int i = 0; i < 3000; i++) begin
      mm = 1 + ($urandom % 65535);
      check16($urandom % mm, $urandom % mm, mm);
    end

    $display("mechanisms: channel reduce %0d, channel borrow %0d, sum wrap %0d, diff wrap %0d, s16 wrap %0d",
             n_ch_reduce, n_ch_borrow, n_sum_wrap, n_diff_wrap, n_sub16_wrap);
    if (n_ch_reduce == 0) begin failures++; $display("FAIL no channel sum was reduced"); end
    if (n_ch_borrow == 0) begin failures++; $display("FAIL no channel difference borrowed"); end
    if (n_sum_wrap == 0)  begin failures++; $display("FAIL no binary sum wrapped"); end
    if (n_diff_wrap == 0) begin failures++; $display("FAIL no binary difference wrapped"); end
    if (n_sub16_wrap == 0) begin failures++; $display("FAIL 16-bit subtractor never wrapped"); end
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
