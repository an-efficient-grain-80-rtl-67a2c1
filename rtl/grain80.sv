// grain80: register-balanced Grain-80 (Grain v1) keystream generator with an
// unrolling factor U (1, 2, 4, 8 or 16; default 16).
//
// The core generates U keystream bits per clock. It has two 80-bit shift
// registers, the LFSR and the NFSR, a bank of register sets R0..R4 per
// unrolled step that hold the feedback polynomials f, g and the output
// function h already evaluated for the current state, and a control logic
// unit. The feedback into the shift registers is therefore one XOR of
// flip-flop outputs, and the polynomial trees sit between the registers'
// next state and the register sets. Unrolling repeats only the register sets,
// the polynomials and the output function; the shift registers advance U
// cells per clock.
//
// Operation:
//   1. Hold `init` high for at least one clock with `key` and `iv` valid. The
//      NFSR takes the key, the LFSR the IV followed by sixteen ones.
//      key[79] is key bit k_0 and iv[63] is IV_0 (most significant first).
//   2. Drop `init`. For 160/U clocks the core runs the Grain initialisation,
//      feeding each keystream bit back into both registers. Nothing is output.
//   3. Then `ks_valid` rises and every clock delivers U keystream bits on
//      `ks_o`, earliest bit in ks_o[U-1]. `ks_counter` counts the delivered
//      bits up to 80, `done` rises once 80 bits have come out, and from then
//      on `ks_output` holds those 80 bits, z_0 in ks_output[79].
// The keystream continues for as long as `init` stays low; raising `init`
// starts a new key/IV.
//
// The register-balanced structure, the unrolling rule and the port names
// follow the published architecture and the Grain v1 definition; the bit
// orders, the U-bit ks_o port and the parallel key/IV load are this design's
// choices.
//
// Latency from the fall of `init` to the first keystream bits: 160/U clocks.
// Throughput: U bits per clock. Asynchronous active-low reset `rst_n`.
module grain80
  import grain_pkg::*;
#(
  parameter int unsigned U = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init,
  input  logic [KEY_W-1:0]   key,
  input  logic [IV_W-1:0]    iv,
  output logic [U-1:0]       ks_o,
  output logic               ks_valid,
  output logic [6:0]         ks_counter,
  output logic               done,
  output logic [KS_BITS-1:0] ks_output
);

  logic         load, shift, mix_h, capture;
  logic [U-1:0] f_bits, g_bits, z_bits;
  state_t       l_next, n_next;

  grain_ctrl #(.U(U)) u_ctrl (
    .clk, .rst_n, .init,
    .load, .shift, .mix_h, .ks_valid, .capture, .ks_counter, .done
  );

  grain_lfsr #(.U(U)) u_lfsr (
    .clk, .rst_n, .load, .iv, .shift, .mix_h,
    .f_bits, .z_bits, .l_q(), .l_next
  );

  grain_nfsr #(.U(U)) u_nfsr (
    .clk, .rst_n, .load, .key, .shift, .mix_h,
    .g_bits, .z_bits, .n_q(), .n_next
  );

  grain_register_sets #(.U(U)) u_rsets (
    .clk, .rst_n, .l_next, .n_next, .f_bits, .g_bits, .z_bits
  );

  // Keystream bit order on the port: earliest bit in the MSB.
  always_comb begin
    for (int unsigned j = 0; j < U; j++) ks_o[U-1-j] = z_bits[j];
  end

  grain_ks_out #(.U(U)) u_ks_out (
    .clk, .rst_n, .clear(load), .capture, .ks_chunk(ks_o), .ks_output
  );

endmodule
