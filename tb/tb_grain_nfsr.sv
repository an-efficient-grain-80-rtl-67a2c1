// tb_grain_nfsr: checks the NFSR shift register on its own (U = 16): reset to
// zero, loading the key (key[79] into cell 0), shifting U cells per clock
// with the feedback bits g (XORed with z only when mix_h is set) entering at
// the top in time order, holding, load priority over shift, and that n_next
// always announces the next register value. The expected contents come from
// a bit-array model shifted one cell at a time.
module tb_grain_nfsr;
  localparam int U = 16;

  logic clk = 1'b0, rst_n, load, shift, mix_h;
  logic [79:0] key;
  logic [U-1:0] g_bits, z_bits;
  logic [79:0] n_q, n_next;
  bit model [80];
  int checks = 0, failures = 0;

  grain_nfsr dut (.*);
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

  function automatic logic [79:0] pack();
    logic [79:0] v;
    foreach (model[k]) v[k] = model[k];
    return v;
  endfunction

  initial begin
    rst_n = 1'b0; load = 0; shift = 0; mix_h = 0; key = '0; g_bits = '0; z_bits = '0;
    #12;
    check(n_q == '0, "reset clears");
    rst_n = 1'b1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      load   = ($urandom % 8) == 0;
      shift  = ($urandom % 4) != 0;
      mix_h  = 1'($urandom % 2);
      key    = 80'({$urandom, $urandom, $urandom});
      g_bits = U'($urandom);
      z_bits = U'($urandom);
      if (load) begin
        for (int k = 0; k < 80; k++) model[k] = key[79 - k];
      end else if (shift) begin
        for (int j = 0; j < U; j++) begin
          for (int k = 0; k < 79; k++) model[k] = model[k + 1];
          model[79] = g_bits[j] ^ (mix_h & z_bits[j]);
        end
      end
      #1;
      check(n_next == pack(), $sformatf("n_next it=%0d load=%0b shift=%0b", it, load, shift));
      @(posedge clk); #1;
      check(n_q == pack(), $sformatf("n_q it=%0d", it));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
