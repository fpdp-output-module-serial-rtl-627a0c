// tb_foms_status_leds -- self-checking testbench for foms_status_leds.
//
// Uses a short stretch time (S = 50 cycles). Checks the address LEDs and the
// power LED follow their inputs, that each activity LED lights on its event
// and stays lit exactly S cycles (re-armed by a later event), and that each
// fault LED latches until latch_clr, with a new fault winning over a
// simultaneous clear.
//
// The LED set and latching follow the specification; the stretch of the
// activity LEDs is this design's choice.
module tb_foms_status_leds;
  localparam int S = 50;

  logic clk = 0, rst_n = 0, latch_clr = 0;
  logic [2:0] group_addr = 3'b101;
  logic [4:0] module_addr = 5'b10011;
  logic power_ok = 1;
  logic bus_evt = 0, mod_evt = 0, load_evt = 0;
  logic parity_evt = 0, fifo_ovf_evt = 0, vfault_evt = 0, addr_fault_evt = 0;
  logic [15:0] led;

  int checks = 0, failures = 0;

  foms_status_leds #(.STRETCH_CYCLES(S)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse_act(input int i);
    @(negedge clk);
    {bus_evt, mod_evt, load_evt} = 3'b100 >> i;
    @(negedge clk);
    {bus_evt, mod_evt, load_evt} = 3'b000;
  endtask

  task automatic pulse_flt(input int i);
    @(negedge clk);
    {parity_evt, fifo_ovf_evt, vfault_evt, addr_fault_evt} = 4'b1000 >> i;
    @(negedge clk);
    {parity_evt, fifo_ovf_evt, vfault_evt, addr_fault_evt} = 4'b0000;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int on;
    @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(led[15:8] == 8'b101_10011, "address LEDs");
    check(led[7] == 1'b1, "power LED on");
    check(led[6:0] == 7'b0, "all others off after reset");
    power_ok = 0; @(negedge clk);
    check(led[7] == 1'b0, "power LED off");
    power_ok = 1;
    // activity LEDs: lit for exactly S cycles
    for (int i = 0; i < 3; i++) begin
      pulse_act(i);
      on = 0;
      while (led[6 - i]) begin @(negedge clk); on++; end
      check(on == S, $sformatf("activity LED %0d lit %0d cycles", i, on));
    end
    // re-arm
    pulse_act(0);
    repeat (S - 10) @(negedge clk);
    pulse_act(0);
    repeat (S - 10) @(negedge clk);
    check(led[6], "bus LED re-armed");
    // fault latches
    for (int i = 0; i < 4; i++) begin
      pulse_flt(i);
      repeat (3 * S) @(negedge clk);
      check(led[3 - i], $sformatf("fault LED %0d latched", i));
    end
    check(led[3:0] == 4'hF, "all faults latched");
    latch_clr = 1; @(negedge clk); latch_clr = 0;
    @(negedge clk);
    check(led[3:0] == 4'h0, "faults cleared by latch reset");
    latch_clr = 1; parity_evt = 1; @(negedge clk); latch_clr = 0; parity_evt = 0;
    @(negedge clk);
    check(led[3:0] == 4'b1000, "new fault wins over clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
