// grain_ctrl: control logic unit of the Grain-80 core.
//
// It sequences one key/IV set through its three phases with a small state
// machine and one counter:
//   load    while `init` is high the shift registers take key and IV (every
//           clock, so the last value seen before `init` falls is used);
//   INIT    after `init` falls, 160/U clocks of initialisation: the shift
//           registers advance U steps per clock with the keystream bits fed
//           back into both of them (`mix_h`), and no keystream is output;
//   STREAM  the registers advance U steps per clock without that feedback and
//           each clock yields U valid keystream bits (`ks_valid`).
// In STREAM `ks_counter` counts the keystream bits delivered, U per clock, up
// to 80; `done` is high once 80 bits have been delivered, and `capture` tells
// the keystream output register to take the bits of the current clock.
// Raising `init` again at any time restarts from the load phase. The
// keystream continues for as long as `init` stays low.
//
// The phases, the 160/U initialisation length and the ks_valid, ks_counter
// and done signals follow the architecture; the three-state machine, counting
// bits rather than clocks (the two agree at U = 1), and the restart rule are
// this design's choices.
//
// All outputs are decoded from registered state, apart from `load`, which is
// `init` itself. Asynchronous active-low reset goes to IDLE, where nothing
// moves.
module grain_ctrl
  import grain_pkg::*;
#(
  parameter int unsigned U = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  output logic       load,
  output logic       shift,
  output logic       mix_h,
  output logic       ks_valid,
  output logic       capture,
  output logic [6:0] ks_counter,
  output logic       done
);

  localparam int unsigned INIT_CYC = INIT_ROUNDS / U;

  typedef enum logic [1:0] {IDLE, INIT, STREAM} phase_e;

  phase_e     phase;
  logic [7:0] init_cnt;

  initial assert (unroll_ok(U))
    else $fatal(1, "grain_ctrl: unrolling factor U=%0d not in {1,2,4,8,16}", U);

  always_comb begin
    load     = init;
    shift    = !init && (phase != IDLE);
    mix_h    = !init && (phase == INIT);
    ks_valid = !init && (phase == STREAM);
    capture  = ks_valid && (ks_counter < 7'(KS_BITS));
    done     = (ks_counter == 7'(KS_BITS));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= IDLE;
      init_cnt   <= '0;
      ks_counter <= '0;
    end else if (init) begin
      phase      <= INIT;
      init_cnt   <= '0;
      ks_counter <= '0;
    end else begin
      unique case (phase)
        IDLE: ;
        INIT: begin
          if (init_cnt == 8'(INIT_CYC - 1)) phase <= STREAM;
          init_cnt <= init_cnt + 8'd1;
        end
        STREAM: begin
          if (capture) ks_counter <= ks_counter + 7'(U);
        end
        default: phase <= IDLE;
      endcase
    end
  end

  // The bit counter moves in whole clocks of U bits and stops exactly at 80.
  a_counter_bound: assert property (@(posedge clk) disable iff (!rst_n)
    ks_counter <= 7'(KS_BITS));
  a_no_stream_output_in_init: assert property (@(posedge clk) disable iff (!rst_n)
    !(ks_valid && mix_h));

endmodule
