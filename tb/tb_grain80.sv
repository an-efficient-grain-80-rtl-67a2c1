// tb_grain80: end-to-end test of the Grain-80 core at its default parameters
// (unrolling factor 16).
//
// For the all-zero key and IV it checks the keystream against the published
// test vector; for random keys and IVs against the bit-serial reference
// model. For every run it checks that initialisation takes 160/U clocks, that
// each following clock delivers U correct bits with ks_valid high, that
// ks_counter and done follow the delivered bit count, and that ks_output
// holds the first 80 bits. It also exercises a load held for several clocks,
// a restart while initialising and a restart while streaming, and counts how
// often each of these happened.
module tb_grain80;
  import grain_ref_pkg::*;

  localparam int U        = 16;          // grain80's default unrolling factor
  localparam int INIT_CYC = 160 / U;
  localparam int N_RUNS   = 12;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        init;
  logic [79:0] key;
  logic [63:0] iv;
  logic [U-1:0] ks_o;
  logic        ks_valid;
  logic [6:0]  ks_counter;
  logic        done;
  logic [79:0] ks_output;

  int checks = 0, failures = 0;
  int n_kat = 0, n_long_load = 0, n_restart_init = 0, n_restart_stream = 0;
  int n_done = 0, n_init_phase = 0, n_stream_cycles = 0;

  grain80 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Load key/iv for `hold` clocks, drop init; if abort_after > 0, raise init
  // again after that many initialisation clocks (restart while initialising).
  task automatic start(logic [79:0] k, logic [63:0] v, int hold);
    @(negedge clk);
    init = 1'b1; key = k; iv = v;
    repeat (hold) @(negedge clk);
    init = 1'b0;
    key = 80'({$urandom, $urandom, $urandom});  // inputs are don't-care after loading
    iv  = {$urandom, $urandom};
    if (hold > 1) n_long_load++;
  endtask

  // Runs one key/IV and checks `ncyc` streaming clocks.
  task automatic run(logic [79:0] k, logic [63:0] v, int hold, int ncyc, bit kat);
    bit z[$];
    grain_model m = new();
    int waited;
    logic [79:0] first80;
    m.keystream(k, v, ncyc * U, z);
    start(k, v, hold);
    // init is low now, between two rising edges
    waited = 0;
    while (!ks_valid && waited < 1000) begin
      check(ks_counter == 0 && !done, "counter idle during initialisation");
      @(negedge clk);
      waited++;
    end
    n_init_phase++;
    check(waited == INIT_CYC, $sformatf("initialisation took %0d clocks, expected %0d", waited, INIT_CYC));
    for (int c = 0; c < ncyc; c++) begin
      check(ks_valid, "ks_valid held in stream");
      for (int j = 0; j < U; j++) begin
        check(ks_o[U-1-j] == z[c*U+j], $sformatf("keystream bit %0d", c*U+j));
        if (kat && c*U+j < 80)
          check(ks_o[U-1-j] == kat_zero_bit(c*U+j), $sformatf("test vector bit %0d", c*U+j));
      end
      check(ks_counter == 7'((c*U < 80) ? c*U : 80), "ks_counter");
      check(done == (c*U >= 80), "done");
      n_stream_cycles++;
      @(negedge clk);
    end
    if (ncyc * U >= 80) begin
      for (int t = 0; t < 80; t++) first80[79-t] = z[t];
      check(done, "done after 80 bits");
      check(ks_output == first80, "ks_output holds the first 80 bits");
      n_done++;
    end
    if (kat) n_kat++;
  endtask

  initial begin
    init = 1'b0; key = '0; iv = '0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // idle after reset: nothing valid
    repeat (3) begin
      @(negedge clk);
      check(!ks_valid && !done && ks_counter == 0, "idle after reset");
    end
    // known-answer test, all zero key and IV
    run('0, '0, 1, 80 / U + 2, 1'b1);
    // random keys and IVs; each new run restarts a running keystream
    for (int r = 0; r < N_RUNS; r++) begin
      if (ks_valid) n_restart_stream++;
      run(80'({$urandom, $urandom, $urandom}), {$urandom, $urandom}, 1 + (r % 3),
          80 / U + (r % 4) * 3, 1'b0);
    end
    // restart during initialisation: abandon a run halfway through its setup
    start(80'({$urandom, $urandom, $urandom}), {$urandom, $urandom}, 1);
    repeat (INIT_CYC / 2) @(negedge clk);
    check(!ks_valid, "still initialising before restart");
    n_restart_init++;
    if (ks_valid) n_restart_stream++;
    run('0, '0, 1, 80 / U, 1'b1);

    check(n_kat > 0, "known-answer run happened");
    check(n_long_load > 0, "multi-clock load happened");
    check(n_restart_init > 0, "restart during initialisation happened");
    check(n_restart_stream > 0, "restart during keystream happened");
    check(n_done > 0, "done reached");
    $display("runs: kat=%0d long_load=%0d restart_init=%0d restart_stream=%0d done=%0d init_phases=%0d stream_cycles=%0d",
             n_kat, n_long_load, n_restart_init, n_restart_stream, n_done, n_init_phase, n_stream_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
