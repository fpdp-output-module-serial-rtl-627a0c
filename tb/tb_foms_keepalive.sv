// tb_foms_keepalive -- self-checking testbench for foms_keepalive.
//
// Uses a short timeout (T = 100 cycles) so the run is brief. Checks: the
// first timeout comes exactly T cycles after reset release; commands spaced
// closer than T keep it from firing; a timeout comes exactly T cycles after
// the last command; it fires once and not again until the next command; with
// the enable jumper open it never fires.
//
// The keep-alive restart and safe state follow the specification; the
// one-shot behaviour and the start at reset are this design's choices.
module tb_foms_keepalive;
  localparam int T = 100;

  logic clk = 0, rst_n = 0, enable = 1, cmd_ok = 0, timeout;
  int checks = 0, failures = 0;
  int cyc = 0;
  int fires [$];

  foms_keepalive #(.TIMEOUT_CYCLES(T)) dut (.*);

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (timeout) fires.push_back(cyc);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic command();
    @(negedge clk); cmd_ok = 1;
    @(negedge clk); cmd_ok = 0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    @(negedge clk); rst_n = 1; t0 = cyc;
    repeat (T + 20) @(negedge clk);
    check(fires.size() == 1, "one timeout after reset");
    check(fires.size() == 1 && fires[0] - t0 == T,
          $sformatf("timeout after reset at %0d cycles", fires.size() ? fires[0] - t0 : -1));
    // commands every T-10 cycles: no timeout
    fires = {};
    repeat (8) begin command(); repeat (T - 12) @(negedge clk); end
    check(fires.size() == 0, "no timeout while commands arrive");
    // silence: exactly one timeout, T cycles after the last command
    command(); t0 = cyc;
    repeat (3 * T) @(negedge clk);
    check(fires.size() == 1, "exactly one timeout in a silence");
    check(fires.size() == 1 && fires[0] - t0 == T,
          $sformatf("timeout %0d cycles after command", fires.size() ? fires[0] - t0 : -1));
    // disabled
    enable = 0; fires = {};
    command();
    repeat (3 * T) @(negedge clk);
    check(fires.size() == 0, "disabled: no timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
