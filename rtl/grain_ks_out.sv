// grain_ks_out: keystream output register of the Grain-80 core.
//
// It collects the first 80 keystream bits after initialisation into the
// 80-bit word `ks_output`. Each clock with `capture` high it shifts the word
// left by U and appends the U bits of `ks_chunk`, which arrive most
// significant (earliest) bit first. After 80/U captures the first keystream
// bit z_0 sits in ks_output[79] and z_79 in ks_output[0]. `clear` (the load
// phase) empties the word. The word is held, not overwritten, while the core
// keeps running. The 80-bit output word follows the architecture; its bit
// order and the clear-on-load rule are this design's choices.
// Asynchronous active-low reset clears it.
module grain_ks_out
  import grain_pkg::*;
#(
  parameter int unsigned U = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               capture,
  input  logic [U-1:0]       ks_chunk,
  output logic [KS_BITS-1:0] ks_output
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       ks_output <= '0;
    else if (clear)   ks_output <= '0;
    else if (capture) ks_output <= {ks_output[KS_BITS-1-U:0], ks_chunk};
  end

endmodule
