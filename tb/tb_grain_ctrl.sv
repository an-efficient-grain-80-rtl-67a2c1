// tb_grain_ctrl: checks the control logic unit on its own (U = 16): idle
// after reset, load while init is high, exactly 160/U initialisation clocks
// with shift and mix_h, then streaming with ks_valid, capture for 80/U
// clocks, ks_counter stepping by U to 80 and done; restart from both the
// initialisation and the streaming phase. Expected values come from a
// cycle-by-cycle schedule computed in the testbench.
module tb_grain_ctrl;
  localparam int U = 16;
  localparam int INIT_CYC = 160 / U;

  logic clk = 1'b0, rst_n, init;
  logic load, shift, mix_h, ks_valid, capture, done;
  logic [6:0] ks_counter;
  int checks = 0, failures = 0;

  grain_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // init held `hold` clocks, then `len` clocks low; checks every clock.
  task automatic session(int hold, int len);
    int t;
    for (int c = 0; c < hold; c++) begin
      @(negedge clk);
      init = 1'b1;
      #1;
      check(load && !shift && !mix_h && !ks_valid && !capture, "load phase");
    end
    for (t = 0; t < len; t++) begin
      @(negedge clk);
      init = 1'b0;
      #1;
      if (t < INIT_CYC) begin
        check(!load && shift && mix_h && !ks_valid && !capture, $sformatf("init clock %0d", t));
        check(ks_counter == 0 && !done, "counter cleared in init");
      end else begin
        int b = (t - INIT_CYC) * U;
        check(!load && shift && !mix_h && ks_valid, $sformatf("stream clock %0d", t));
        check(capture == (b < 80), "capture");
        check(ks_counter == 7'((b < 80) ? b : 80), "ks_counter");
        check(done == (b >= 80), "done");
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; init = 1'b0;
    #12;
    rst_n = 1'b1;
    repeat (4) begin
      @(negedge clk); #1;
      check(!load && !shift && !ks_valid && !done && ks_counter == 0, "idle");
    end
    session(1, INIT_CYC + 80 / U + 6);   // full run, then keeps streaming
    session(3, INIT_CYC / 2);            // restart from streaming, abandon in init
    session(1, INIT_CYC + 2);            // restart from initialisation
    session(2, INIT_CYC + 80 / U + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
