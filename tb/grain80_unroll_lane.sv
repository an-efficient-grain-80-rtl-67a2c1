// grain80_unroll_lane: drives one grain80 core built with unrolling factor U
// through a known-answer run (all-zero key and IV) and N_RUNS random key/IV
// runs, and checks against the bit-serial reference model: the
// initialisation length (160/U clocks), U keystream bits per clock, the
// ks_counter/done sequence and the captured 80-bit ks_output. It also
// measures the keystream rate as bits delivered per clock while ks_valid is
// high. Used by tb_grain80_unroll, once per unrolling factor.
module grain80_unroll_lane #(
  parameter int unsigned U      = 1,
  parameter int unsigned N_RUNS = 4,
  parameter int unsigned N_BITS = 320   // keystream bits checked per run
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   bits_out,
  output int   stream_clocks,
  output logic finished
);
  import grain_ref_pkg::*;

  localparam int unsigned INIT_CYC = 160 / U;

  logic         rst_n, init;
  logic [79:0]  key, ks_output;
  logic [63:0]  iv;
  logic [U-1:0] ks_o;
  logic         ks_valid, done;
  logic [6:0]   ks_counter;

  grain80 #(.U(U)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL U=%0d %s at %0t", U, what, $time);
    end
  endtask

  task automatic run(logic [79:0] k, logic [63:0] v, bit kat);
    bit z[$];
    grain_model m = new();
    int waited, ncyc;
    logic [79:0] first80;
    ncyc = N_BITS / U;
    m.keystream(k, v, N_BITS, z);
    @(negedge clk);
    init = 1'b1; key = k; iv = v;
    @(negedge clk);
    init = 1'b0;
    waited = 0;
    while (!ks_valid && waited < 1000) begin
      @(negedge clk);
      waited++;
    end
    check(waited == INIT_CYC, $sformatf("initialisation %0d clocks", waited));
    for (int c = 0; c < ncyc; c++) begin
      check(ks_valid, "ks_valid");
      for (int j = 0; j < U; j++) begin
        check(ks_o[U-1-j] == z[c*U+j], $sformatf("bit %0d", c*U+j));
        if (kat && c*U+j < 80) check(ks_o[U-1-j] == kat_zero_bit(c*U+j), "test vector");
      end
      check(done == (c*U >= 80), "done");
      if (ks_valid) begin
        bits_out += U;
        stream_clocks++;
      end
      @(negedge clk);
    end
    for (int t = 0; t < 80; t++) first80[79-t] = z[t];
    check(done && ks_output == first80, "ks_output");
  endtask

  initial begin
    checks = 0; failures = 0; bits_out = 0; stream_clocks = 0; finished = 1'b0;
    init = 1'b0; key = '0; iv = '0; rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run('0, '0, 1'b1);
    for (int r = 0; r < N_RUNS; r++)
      run(80'({$urandom, $urandom, $urandom}), {$urandom, $urandom}, 1'b0);
    finished = 1'b1;
  end

endmodule
