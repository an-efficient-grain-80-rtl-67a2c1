// grain_nfsr: the 80-bit non-linear feedback shift register of Grain-80,
// unrolled by U.
//
// On `load` the register takes the 80-bit key. On `shift` it advances U steps
// in one clock: every cell moves down by U and the U new bits enter at the
// top, new bit 0 (the earliest) at cell 80-U and new bit U-1 at cell 79. New
// bit j is the NFSR polynomial value g_j (which already contains the masking
// LFSR bit l_0) supplied by the register sets, XORed with the keystream bit
// z_j while `mix_h` is high during initialisation. The non-linear function is
// evaluated by the register sets one clock ahead, so this block holds only
// the shift register, the load multiplexer and one XOR per new bit.
//
// Cell k holds n_{i+k}. Key bit order: key[79] is k_0 (the first bit shifted
// in, most significant first), so cell k loads key[79-k].
//
// The shift register and its feedback rule follow Grain v1 and the
// register-balanced architecture this core implements; loading the whole key
// in one clock and the bit order are this design's choices.
//
// Timing: n_q is registered; n_next is the combinational next value. Load has
// priority over shift. Asynchronous active-low reset clears the register.
module grain_nfsr
  import grain_pkg::*;
#(
  parameter int unsigned U = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [KEY_W-1:0]  key,
  input  logic              shift,
  input  logic              mix_h,
  input  logic [U-1:0]      g_bits,
  input  logic [U-1:0]      z_bits,
  output state_t            n_q,
  output state_t            n_next
);

  logic [U-1:0] fb;

  always_comb begin
    fb = g_bits ^ (z_bits & {U{mix_h}});
    if (load) begin
      for (int k = 0; k < STATE_W; k++)
        n_next[k] = key[KEY_W-1-k];
    end else if (shift) begin
      n_next = {fb, n_q[STATE_W-1:U]};
    end else begin
      n_next = n_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_q <= '0;
    else        n_q <= n_next;
  end

endmodule
