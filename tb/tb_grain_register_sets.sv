// tb_grain_register_sets: checks the register sets on their own (U = 16).
// Each clock it applies a random next state on l_next/n_next; after the
// rising edge copy j of f_bits, g_bits and z_bits must equal the LFSR
// feedback, the NFSR feedback and the keystream bit of that state advanced j
// steps, as computed by the bit-serial reference model loaded with the
// shifted state. Also checks the all-zero reset value.
module tb_grain_register_sets;
  import grain_ref_pkg::*;
  localparam int U = 16;

  logic clk = 1'b0, rst_n;
  logic [79:0] l_next, n_next;
  logic [U-1:0] f_bits, g_bits, z_bits;
  int checks = 0, failures = 0;

  grain_register_sets dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    grain_model m;
    logic [79:0] l, n;
    m = new();
    rst_n = 1'b0; l_next = '1; n_next = '1;
    #12;
    check(f_bits == '0 && g_bits == '0 && z_bits == '0, "reset value");
    rst_n = 1'b1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      l = 80'({$urandom, $urandom, $urandom});
      n = 80'({$urandom, $urandom, $urandom});
      if (it % 10 == 0) l = '0;           // sparse and dense states too
      if (it % 10 == 1) n = '1;
      l_next = l; n_next = n;
      @(posedge clk); #1;
      for (int j = 0; j < U; j++) begin
        for (int k = 0; k < 80; k++) begin
          m.s[k] = (k + j < 80) ? l[k + j] : 1'b0;
          m.b[k] = (k + j < 80) ? n[k + j] : 1'b0;
        end
        check(f_bits[j] == m.lfsr_fb(), $sformatf("f copy %0d", j));
        check(g_bits[j] == m.nfsr_fb(), $sformatf("g copy %0d", j));
        check(z_bits[j] == m.out_bit(), $sformatf("z copy %0d", j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
