// grain_register_sets: the register sets R0..R4 of the register-balanced
// Grain-80 datapath, with U copies for an unrolling factor U.
//
// Instead of evaluating the feedback polynomials f(x), g(x) and the output
// function h(x) on the shift registers' outputs in the same clock they are
// needed, this block evaluates them on the registers' *next* state and keeps
// the results in flip-flops. In each clock the five registers of copy j
// therefore hold, for the current state,
//   R0_j = f       R1_j + R2_j = g       R3_j + R4_j = z (keystream bit)
// taken j steps ahead, and the outputs f_bits, g_bits, z_bits are those
// flip-flops combined by at most one XOR. The long AND/XOR trees move from
// the path "state -> feedback -> state" to the path "next state -> R", which
// with U = 1 starts at the shift register outputs (next-state cells 0..65 are
// current cells 1..66, never a new feedback bit).
//
// With U > 1 the highest taps of the later copies fall on the U bits that are
// being fed back in this clock; next state then includes those bits, which
// are one XOR away from the R flip-flops. The result stays exact for every U.
//
// The registers follow the state on every clock (load, shift or hold), so the
// invariant "R matches the state" also holds after reset, when both are zero
// (every term is 0 on an all-zero state).
//
// Interface: l_next/n_next are the shift registers' next values; f_bits[j],
// g_bits[j], z_bits[j] are copy j's values, bit 0 the earliest in time.
// The tap positions and monomials are those of Grain v1; the split of g into
// R1 (linear and quadratic terms) and R2 (higher-degree terms) and of z into
// R3 (linear) and R4 (non-linear) is this design's choice.
module grain_register_sets
  import grain_pkg::*;
#(
  parameter int unsigned U = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  state_t       l_next,
  input  state_t       n_next,
  output logic [U-1:0] f_bits,
  output logic [U-1:0] g_bits,
  output logic [U-1:0] z_bits
);

  logic [U-1:0] r0_d, r1_d, r2_d, r3_d, r4_d;
  logic [U-1:0] r0_q, r1_q, r2_q, r3_q, r4_q;

  always_comb begin
    for (int unsigned j = 0; j < U; j++) begin
      r0_d[j] = r0_term(l_next, j);
      r1_d[j] = r1_term(l_next, n_next, j);
      r2_d[j] = r2_term(n_next, j);
      r3_d[j] = r3_term(l_next, n_next, j);
      r4_d[j] = r4_term(l_next, n_next, j);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0_q <= '0;
      r1_q <= '0;
      r2_q <= '0;
      r3_q <= '0;
      r4_q <= '0;
    end else begin
      r0_q <= r0_d;
      r1_q <= r1_d;
      r2_q <= r2_d;
      r3_q <= r3_d;
      r4_q <= r4_d;
    end
  end

  // f = R0, g = R1 + R2, z = R3 + R4
  assign f_bits = r0_q;
  assign g_bits = r1_q ^ r2_q;
  assign z_bits = r3_q ^ r4_q;

endmodule
