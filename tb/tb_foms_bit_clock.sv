// tb_foms_bit_clock -- self-checking testbench for foms_bit_clock.
//
// Runs the default divider (8 clocks per half-bit, i.e. 3.125 Mbit/s from
// 50 MHz) and checks that half_tick pulses for exactly one cycle every 8
// cycles, that first_half alternates starting with 1, and that a bit (two
// half-bits) lasts 320 ns of a 50 MHz clock.
//
// The 320 ns bit is the specified serial rate; the 50 MHz clock and the
// divider are this design's choice.
module tb_foms_bit_clock;
  localparam int H = 8;

  logic clk = 0, rst_n = 0, half_tick, first_half;
  int checks = 0, failures = 0;
  int cyc = 0;
  int ticks [$];
  logic fh [$];
  realtime tt [$];

  foms_bit_clock dut (.*);

  always #10 clk = ~clk;     // 50 MHz
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (half_tick) begin
    ticks.push_back(cyc); fh.push_back(first_half); tt.push_back($realtime);
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
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
    repeat (40 * H + 2) @(negedge clk);
    check(ticks.size() == 40, $sformatf("40 half-bit ticks expected, got %0d", ticks.size()));
    check(ticks.size() > 0 && ticks[0] - t0 == H, "first tick H cycles after reset");
    for (int i = 1; i < ticks.size(); i++)
      check(ticks[i] - ticks[i-1] == H, $sformatf("tick spacing %0d", ticks[i] - ticks[i-1]));
    for (int i = 0; i < fh.size(); i++)
      check(fh[i] == ((i % 2) == 0), $sformatf("first_half at tick %0d", i));
    check(tt.size() > 2 && (tt[2] - tt[0]) == 320.0, $sformatf("bit time %0t", tt[2] - tt[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
