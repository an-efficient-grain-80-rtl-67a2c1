// tb_grain_lfsr: checks the LFSR shift register on its own (U = 16): reset to
// zero, loading the IV with sixteen ones above it, shifting U cells per clock
// with the feedback bits f (XORed with z only when mix_h is set) entering at
// the top in time order, holding, load priority over shift, and that l_next
// always announces the next register value. The expected contents come from
// a bit-array model shifted one cell at a time.
module tb_grain_lfsr;
  localparam int U = 16;

  logic clk = 1'b0, rst_n, load, shift, mix_h;
  logic [63:0] iv;
  logic [U-1:0] f_bits, z_bits;
  logic [79:0] l_q, l_next;
  bit model [80];
  int checks = 0, failures = 0;

  grain_lfsr dut (.*);
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
    rst_n = 1'b0; load = 0; shift = 0; mix_h = 0; iv = '0; f_bits = '0; z_bits = '0;
    #12;
    check(l_q == '0, "reset clears");
    rst_n = 1'b1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      load   = ($urandom % 8) == 0;
      shift  = ($urandom % 4) != 0;
      mix_h  = 1'($urandom % 2);
      iv     = {$urandom, $urandom};
      f_bits = U'($urandom);
      z_bits = U'($urandom);
      if (load) begin
        for (int k = 0; k < 80; k++) model[k] = (k < 64) ? iv[63 - k] : 1'b1;
      end else if (shift) begin
        for (int j = 0; j < U; j++) begin
          for (int k = 0; k < 79; k++) model[k] = model[k + 1];
          model[79] = f_bits[j] ^ (mix_h & z_bits[j]);
        end
      end
      #1;
      check(l_next == pack(), $sformatf("l_next it=%0d load=%0b shift=%0b", it, load, shift));
      @(posedge clk); #1;
      check(l_q == pack(), $sformatf("l_q it=%0d", it));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
