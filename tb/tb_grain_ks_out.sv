// tb_grain_ks_out: checks the keystream output register on its own (U = 16)
// against a bit queue: random chunks, captured on random clocks, must appear
// first bit in ks_output[79]; clear empties it; no capture holds it.
module tb_grain_ks_out;
  localparam int U = 16;

  logic clk = 1'b0, rst_n, clear, capture;
  logic [U-1:0] ks_chunk;
  logic [79:0] ks_output;
  logic [79:0] model;
  int checks = 0, failures = 0;

  grain_ks_out dut (.*);
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
    rst_n = 1'b0; clear = 0; capture = 0; ks_chunk = '0; model = '0;
    #12;
    check(ks_output == '0, "reset");
    rst_n = 1'b1;
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      clear    = ($urandom % 16) == 0;
      capture  = 1'($urandom % 2);
      ks_chunk = U'($urandom);
      if (clear) model = '0;
      else if (capture)
        for (int j = 0; j < U; j++) model = {model[78:0], ks_chunk[U-1-j]};
      @(posedge clk); #1;
      check(ks_output == model, $sformatf("it %0d", it));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
