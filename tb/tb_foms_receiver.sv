// tb_foms_receiver -- self-checking testbench for foms_receiver.
//
// A behavioural line driver produces FOMS frames (see tb_foms_rx_decoder).
// The watchdog is shortened to W = 3000 cycles (60 us). Checked: default
// level and data_valid low after reset; a good frame sets the 12-bit output
// and READY/SPARE/BYPASS/CONVERT from bits 12..15 and raises data_valid; a
// frame with a parity error changes nothing and pulses frame_error; the
// watchdog drops data_valid and restores the default level W cycles after
// the last good frame; link_good low forces the default; two default-level
// jumpers raise cfg_error.
//
// The outputs follow the specified receiver block diagram; the watchdog and
// the default state are this design's choices.
module tb_foms_receiver;
  import foms_pkg::*;
  localparam int W = 3000;

  logic clk = 0, rst_n = 0, din = 0, link_good = 1;
  dflt_jmp_t dflt_jmp = 4'b0100;          // 0x7FF
  logic [11:0] dac_data;
  logic data_valid, ready, spare, bypass, convert, link_led, frame_error, cfg_error;

  int checks = 0, failures = 0, n_ferr = 0;
  realtime HB = 160ns;

  foms_receiver #(.WATCHDOG_CYCLES(W)) dut (.*);

  always #10 clk = ~clk;
  always @(negedge clk) if (frame_error) n_ferr++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic half(input logic v); din = v; #(HB); endtask
  task automatic idle_bits(input int n); repeat (n) begin half(1); half(0); end endtask
  task automatic send(input logic [15:0] d, input bit bad_par = 0);
    logic [16:0] f;
    f = {d, ~(^d) ^ bad_par};
    repeat (3) half(1);
    repeat (3) half(0);
    for (int i = 16; i >= 0; i--) begin half(~f[i]); half(f[i]); end
    idle_bits(3);
  endtask

  task automatic expect_out(input logic [11:0] a, input logic [3:0] c, input bit v, input string tag);
    check(dac_data == a, $sformatf("%s: dac %h expected %h", tag, dac_data, a));
    check({convert, bypass, spare, ready} == c, $sformatf("%s: control bits", tag));
    check(data_valid == v, $sformatf("%s: data_valid", tag));
  endtask

  initial begin : watchdog
    #5ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_last;
    int cyc_on;
    #100 rst_n = 1;
    idle_bits(4);
    expect_out(12'h7FF, 4'b0000, 0, "after reset");
    check(!cfg_error && link_led, "no config error, link LED on");
    send(16'hA123);
    expect_out(12'h123, 4'hA, 1, "frame 1");
    send(16'h5FED);
    expect_out(12'hFED, 4'h5, 1, "frame 2");
    send(16'h0001, 1);
    expect_out(12'hFED, 4'h5, 1, "bad frame ignored");
    check(n_ferr == 1, "frame_error pulsed once");
    // watchdog: count cycles until data_valid drops
    cyc_on = 0;
    while (data_valid) begin @(negedge clk); cyc_on++; end
    check(cyc_on > W - 700 && cyc_on <= W,
          $sformatf("watchdog dropped after %0d cycles of silence", cyc_on));
    expect_out(12'h7FF, 4'b0000, 0, "watchdog expired");
    // link good low
    send(16'h3456);
    expect_out(12'h456, 4'h3, 1, "frame 3");
    link_good = 0;
    repeat (4) @(negedge clk);
    expect_out(12'h7FF, 4'b0000, 0, "link lost");
    check(!link_led, "link LED off");
    link_good = 1;
    repeat (4) @(negedge clk);
    expect_out(12'h456, 4'h3, 1, "link back");
    dflt_jmp = 4'b0011;
    #1;
    check(cfg_error, "two default levels flagged");
    dflt_jmp = 4'b1000;
    link_good = 0;
    repeat (4) @(negedge clk);
    check(dac_data == 12'h800, "default 0x800");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
