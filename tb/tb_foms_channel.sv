// tb_foms_channel -- self-checking testbench for foms_channel.
//
// The bench makes its own half-bit strobes (one every H clocks, alternating
// first/second half) and samples sout in the middle of every half-bit. The
// expected line pattern of a frame is built independently: three high
// halves, three low halves, then for D15..D0 and the odd parity bit the pair
// (~b, b), followed by Manchester zeros (1, 0). Checked: the reset-value
// frame after reset, a frame after write+load, exact frame length (40
// half-bits), idle zeros after a frame, a load during a frame being deferred
// and then sent back to back with the newest holding value, and that a write
// without load sends nothing.
//
// The frame format and Manchester polarity follow the specification; the
// deferred-load behaviour and the reset frame are this design's choices.
module tb_foms_channel;
  import foms_pkg::*;

  localparam int H = 8;

  logic clk = 0, rst_n = 0;
  logic half_tick = 0, first_half = 0;
  logic wr = 0, load = 0;
  logic [15:0] wr_data = '0;
  logic [11:0] reset_level = 12'h7FF;
  logic sout, frame_start, busy;

  int checks = 0, failures = 0;
  int cyc = 0;

  foms_channel dut (.*);

  always #5 clk = ~clk;

  // half-bit strobes and mid-half sampling, driven on the falling edge
  logic halves [$];
  bit   capture = 0;
  int   start_cycles [$];
  always @(negedge clk) begin
    if (rst_n) begin
      cyc++;
      half_tick = (cyc % H == 0);
      if (half_tick) first_half = ~first_half;
      if (capture && (cyc % H == H / 2)) halves.push_back(sout);
    end
  end
  always @(negedge clk) if (frame_start) start_cycles.push_back(cyc);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic void expect_frame(input logic [15:0] d, ref logic q[$]);
    logic [16:0] f;
    f = {d, ~(^d)};
    q = {};
    repeat (3) q.push_back(1'b1);
    repeat (3) q.push_back(1'b0);
    for (int i = 16; i >= 0; i--) begin
      q.push_back(~f[i]);
      q.push_back(f[i]);
    end
  endfunction

  // wait for frame_start, then collect n half-bits starting with the first sync half
  task automatic grab(input int n, ref logic q[$]);
    do @(negedge clk); while (!frame_start);
    halves = {};
    capture = 1;
    // frame_start rises with the first sync half; its mid-point is H/2 later
    wait (halves.size() >= n);
    capture = 0;
    q = halves;
  endtask

  task automatic compare(input logic [15:0] d, input logic got[$], input string tag);
    logic exp[$];
    bit ok;
    expect_frame(d, exp);
    ok = 1;
    for (int i = 0; i < 40; i++) if (got[i] !== exp[i]) ok = 0;
    check(ok, $sformatf("%s: frame for %h wrong", tag, d));
    // after the frame: Manchester zeros
    for (int i = 40; i < got.size(); i++)
      if (got[i] !== ((i % 2) == 0)) ok = 0;
    check(ok, $sformatf("%s: idle zeros after frame wrong", tag));
  endtask

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic got[$];
    int n0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. reset value is sent once after reset
    grab(50, got);
    compare(16'h07FF, got, "reset");

    // 2. write + load
    @(negedge clk); wr = 1; wr_data = 16'hA5C3;
    @(negedge clk); wr = 0; load = 1;
    @(negedge clk); load = 0;
    grab(48, got);
    compare(16'hA5C3, got, "write+load");

    // 3. load during a frame is deferred and uses the newest holding value
    repeat (20 * H) @(posedge clk);
    @(negedge clk); wr = 1; wr_data = 16'h1234;
    @(negedge clk); wr = 0; load = 1;
    @(negedge clk); load = 0;
    n0 = start_cycles.size();
    do @(negedge clk); while (!frame_start);
    repeat (10 * H) @(posedge clk);           // inside the first frame
    @(negedge clk); wr = 1; wr_data = 16'h0F0F;
    @(negedge clk); wr = 0; load = 1;
    @(negedge clk); load = 0;
    grab(44, got);
    compare(16'h0F0F, got, "deferred");
    check(start_cycles.size() == n0 + 2, "two frames expected");
    check(start_cycles[n0 + 1] - start_cycles[n0] == 40 * H,
          $sformatf("back-to-back frames must be 20 bits apart, got %0d cycles",
                    start_cycles[n0 + 1] - start_cycles[n0]));

    // 4. write without load sends nothing, and the holding value is kept
    repeat (30 * H) @(posedge clk);
    n0 = start_cycles.size();
    @(negedge clk); wr = 1; wr_data = 16'hFFFF;
    @(negedge clk); wr = 0;
    repeat (60 * H) @(posedge clk);
    check(start_cycles.size() == n0, "write without load must not start a frame");
    check(!busy, "channel must be idle");
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    grab(42, got);
    compare(16'hFFFF, got, "late load");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
