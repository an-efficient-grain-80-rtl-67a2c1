// tb_grain80_unroll: runs the Grain-80 core at every unrolling factor the
// design supports (1, 2, 4, 8, 16) side by side on the same clock. Each lane
// checks its keystream against the bit-serial reference and the published
// all-zero test vector, checks that initialisation takes 160/U clocks, and
// measures bits per clock in the keystream phase, which must equal U.
module tb_grain80_unroll;

  localparam int NL = 5;
  localparam int UNROLL [NL] = '{1, 2, 4, 8, 16};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   l_checks [NL], l_fail [NL], l_bits [NL], l_clocks [NL];
  logic l_fin [NL];
  int   checks = 0, failures = 0;

  for (genvar i = 0; i < NL; i++) begin : g_lane
    grain80_unroll_lane #(.U(UNROLL[i])) lane (
      .clk, .checks(l_checks[i]), .failures(l_fail[i]), .bits_out(l_bits[i]),
      .stream_clocks(l_clocks[i]), .finished(l_fin[i])
    );
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < NL; i++) all &= l_fin[i];
    end while (!all);
    for (int i = 0; i < NL; i++) begin
      checks   += l_checks[i] + 1;
      failures += l_fail[i];
      if (l_bits[i] != UNROLL[i] * l_clocks[i] || l_clocks[i] == 0) failures++;
      $display("U=%0d: %0d keystream bits in %0d clocks (%0d bits/clock), %0d checks, %0d failures",
               UNROLL[i], l_bits[i], l_clocks[i], l_bits[i] / (l_clocks[i] > 0 ? l_clocks[i] : 1),
               l_checks[i], l_fail[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
