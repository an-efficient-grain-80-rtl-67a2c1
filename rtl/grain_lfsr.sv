// grain_lfsr: the 80-bit linear feedback shift register of Grain-80, unrolled
// by U.
//
// On `load` the register takes the IV in its first 64 cells and ones in cells
// 64..79. On `shift` it advances U steps in one clock: every cell moves down by
// U and the U new bits fb[0..U-1] enter at the top, fb[0] at cell 80-U (the
// earliest) and fb[U-1] at cell 79. New bit j is the LFSR polynomial value
// f_j supplied by the register sets, XORed with the keystream bit z_j while
// `mix_h` is high, as Grain requires during the 160 initialisation rounds.
// The feedback value itself is not computed here: the register sets hold it
// ready in a flip-flop, which is the register-balancing idea of the design.
//
// Cell k holds l_{i+k}. IV bit order: iv[63] is IV_0 (the first bit shifted
// in, most significant first), so cell k loads iv[63-k].
//
// The shift register and its feedback rule follow Grain v1 and the
// register-balanced architecture this core implements; loading the whole IV
// in one clock (rather than shifting it in bit by bit) and the bit order are
// this design's choices.
//
// Timing: l_q is registered; l_next is the combinational next value, used by
// the register sets to precompute the next clock's feedback terms. Load has
// priority over shift. Asynchronous active-low reset clears the register.
module grain_lfsr
  import grain_pkg::*;
#(
  parameter int unsigned U = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [IV_W-1:0]   iv,
  input  logic              shift,
  input  logic              mix_h,
  input  logic [U-1:0]      f_bits,
  input  logic [U-1:0]      z_bits,
  output state_t            l_q,
  output state_t            l_next
);

  logic [U-1:0] fb;

  always_comb begin
    fb = f_bits ^ (z_bits & {U{mix_h}});
    if (load) begin
      for (int k = 0; k < STATE_W; k++)
        l_next[k] = (k < IV_W) ? iv[IV_W-1-k] : 1'b1;
    end else if (shift) begin
      l_next = {fb, l_q[STATE_W-1:U]};
    end else begin
      l_next = l_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) l_q <= '0;
    else        l_q <= l_next;
  end

endmodule
