// tb_foms_tx -- self-checking testbench for the FOMS transmitter (foms_tx).
//
// An FPDP bus model sends 32-bit command words at the 16 MHz strobe; eight
// line monitors decode the serial outputs independently of the RTL. The
// keep-alive time and the LED stretch time are shortened; FIFO depth and
// serial timing stay at their defaults. Scenarios:
//   reset value frame on every channel after reset;
//   the test points count 8 FIFO loads, unloads, writes and loads for 8 words;
//   asynchronous mode: 8 contiguous words update the 8 channels, latency of
//   the first and eighth update measured from the first word on the bus and
//   checked against 1300 ns, and the latency to the internal load strobe
//   printed for the asynchronous, FPDP-sync and external-sync methods;
//   words for another module or group and words with bad parity change
//   nothing and light the parity LED;
//   FPDP sync, external sync and PIO2 sync modes: writes wait for the sync
//   and then all channels are sent;
//   FIFO overflow with the system clock slowed to 10 MHz: the FIFO LED
//   latches and the bus flow-control lines never leave 'ready';
//   LATCH RESET clears the fault LEDs; keep-alive expiry sends the reset
//   value; group address 111 lights the address fault LED; an open J5 raises
//   cfg_error.
//
// Expected behaviour follows the specification; the reset frame, the
// one-shot keep-alive and the cfg_error output are this design's choices.
module tb_foms_tx;
  import foms_pkg::*;

  localparam int KA = 30_000;

  logic clk = 0, rst_n = 0, pstrobe = 0;
  logic [31:0] fpdp_data = '0;
  logic dvalid_n = 1, sync_n = 1, pio2 = 0;
  logic nrfd_n, suspend_n;
  logic [4:0] module_addr = 5'd9;
  logic [2:0] group_addr = 3'd4;
  logic ext_sync = 0;
  logic [7:0] sout;
  j5_t j5 = 4'b1000;                 // asynchronous
  logic ka_enable = 0;
  dflt_jmp_t dflt_jmp = 4'b0010;     // 0xFFF
  logic latch_rst_n = 1, power_ok = 1;
  logic [15:0] led;
  logic cfg_error;
  test_pts_t tp;

  int checks = 0, failures = 0;
  realtime tclk = 20ns;
  longint cyc = 0;
  bit flow_ok = 1;

  foms_tx #(.KEEPALIVE_CYCLES(KA), .STRETCH_CYCLES(500)) dut (.*);

  always #(tclk / 2) clk = ~clk;
  always #31.25ns pstrobe = ~pstrobe;
  always @(posedge clk) cyc++;
  always @(posedge pstrobe) if (rst_n && !(nrfd_n && suspend_n)) flow_ok = 0;

  // test-point pulse counters
  int n_tp_fload = 0, n_tp_unload = 0, n_tp_write = 0, n_tp_load = 0, n_tp_sel0 = 0;
  always @(posedge pstrobe) if (tp.fifo_load) n_tp_fload++;
  always @(posedge clk) begin
    if (tp.fifo_unload) n_tp_unload++;
    if (tp.write_sr)    n_tp_write++;
    if (tp.load_sr)     n_tp_load++;
    if (tp.sel_sr0)     n_tp_sel0++;
  end

  // clock cycles at which the controller pulses a shift-register load
  longint loads [$];
  always @(posedge clk) if (dut.load_sel != 0) loads.push_back(cyc);
  function automatic longint first_load_after(input longint t);
    foreach (loads[i]) if (loads[i] >= t) return loads[i] - t;
    return -1;
  endfunction

  logic [15:0] last [8];
  int          frames [8];
  int          errs [8];
  longint      lstart [8];
  for (genvar c = 0; c < 8; c++) begin : g_mon
    tb_foms_line_monitor #(.H(8)) mon (
      .clk(clk), .line(sout[c]), .last(last[c]), .frames(frames[c]),
      .errors(errs[c]), .last_start(lstart[c])
    );
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] mkword(input logic [2:0] g, input logic [4:0] m,
                                         input logic [2:0] ch, input logic [15:0] d,
                                         input bit bad = 0);
    logic [31:0] w;
    w = '0;
    w[15:0] = d; w[18:16] = ch; w[23:19] = m; w[31:29] = g;
    w[24] = ~(^w[15:0]) ^ bad;
    w[25] = ~(^w[23:16]);
    return w;
  endfunction

  task automatic bus(input logic [31:0] w, input bit sy = 0);
    @(negedge pstrobe);
    fpdp_data = w; dvalid_n = 0; sync_n = !sy;
    @(negedge pstrobe);
    dvalid_n = 1; sync_n = 1;
  endtask

  // back-to-back words, one per strobe
  task automatic burst(input logic [31:0] ws [$]);
    foreach (ws[i]) begin
      @(negedge pstrobe);
      fpdp_data = ws[i]; dvalid_n = 0;
    end
    @(negedge pstrobe);
    dvalid_n = 1;
  endtask

  task automatic snap(output int f[8]);
    for (int c = 0; c < 8; c++) f[c] = frames[c];
  endtask

  task automatic wait_us(input int n);
    #(n * 1us);
  endtask

  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f0[8];
    logic [31:0] ws [$];
    longint t0;
    int tp0 [5];
    logic [15:0] prev[8];
    #200ns rst_n = 1;

    // ---- reset value
    wait_us(12);
    for (int c = 0; c < 8; c++)
      check(frames[c] == 1 && last[c] == 16'h0FFF, $sformatf("ch%0d reset frame", c));
    check(!cfg_error, "no configuration error");
    check(led[15:8] == {3'd4, 5'd9}, "address LEDs");

    // ---- asynchronous: 8 contiguous words
    ws = {};
    for (int c = 0; c < 8; c++) ws.push_back(mkword(3'd4, 5'd9, 3'(c), 16'(16'h1000 * c + 16'h0123)));
    @(negedge pstrobe);
    t0 = cyc;
    tp0 = '{n_tp_fload, n_tp_unload, n_tp_write, n_tp_load, n_tp_sel0};
    burst(ws);
    wait_us(2);
    check(n_tp_fload - tp0[0] == 8 && n_tp_unload - tp0[1] == 8 && n_tp_write - tp0[2] == 8 &&
          n_tp_load - tp0[3] == 8 && n_tp_sel0 - tp0[4] == 1,
          "test points: 8 FIFO loads, unloads, writes and loads, channel 0 selected once");
    check(tp.fifo_dvalid_n && tp.buf_dvalid_n, "test points: buffer and FIFO empty again");
    check(led[6] && led[5] && led[4], "bus, module and load LEDs lit");
    wait_us(13);
    for (int c = 0; c < 8; c++)
      check(frames[c] == 2 && last[c] == 16'(16'h1000 * c + 16'h0123), $sformatf("async ch%0d", c));
    $display("async latency: first update %0d ns, eighth update %0d ns",
             (lstart[0] - t0) * 20, (lstart[7] - t0) * 20);
    $display("async latency to first load strobe: %0d ns", first_load_after(t0) * 20);
    check((lstart[0] - t0) * 20 <= 1300, "first update within 1300 ns");
    check((lstart[7] - t0) * 20 <= 1300, "eighth update within 1300 ns");

    // ---- filtering and parity
    snap(f0);
    bus(mkword(3'd4, 5'd8, 3'd0, 16'hDEAD));        // other module
    bus(mkword(3'd3, 5'd9, 3'd0, 16'hDEAD));        // other group
    bus(mkword(3'd4, 5'd9, 3'd0, 16'hDEAD, 1));     // bad parity
    wait_us(15);
    for (int c = 0; c < 8; c++) check(frames[c] == f0[c], $sformatf("filter: ch%0d unchanged", c));
    check(led[3], "parity LED latched");

    // ---- FPDP sync
    j5 = 4'b0010;
    for (int c = 0; c < 8; c++) prev[c] = last[c];
    snap(f0);
    bus(mkword(3'd4, 5'd9, 3'd2, 16'h2222));
    bus(mkword(3'd4, 5'd9, 3'd5, 16'h5555));
    wait_us(10);
    check(frames[2] == f0[2] && frames[5] == f0[5], "fsync: no frames before sync");
    @(negedge pstrobe);
    t0 = cyc;
    bus(mkword(3'd1, 5'd0, 3'd0, 16'h0000), 1);     // sync word for other modules
    wait_us(10);
    for (int c = 0; c < 8; c++) begin
      check(frames[c] == f0[c] + 1, $sformatf("fsync: ch%0d sent once", c));
      check(last[c] == ((c == 2) ? 16'h2222 : (c == 5) ? 16'h5555 : prev[c]),
            $sformatf("fsync: ch%0d value", c));
    end
    $display("fsync latency: %0d ns (load strobe %0d ns)", (lstart[0] - t0) * 20,
             first_load_after(t0) * 20);

    // ---- external sync
    j5 = 4'b0100;
    snap(f0);
    bus(mkword(3'd4, 5'd9, 3'd1, 16'h3333));
    bus(mkword(3'd4, 5'd9, 3'd0, 16'h0000), 1);     // sync word ignored in this mode
    wait_us(10);
    check(frames[1] == f0[1] && frames[0] == f0[0], "ext: nothing before the edge");
    t0 = cyc;
    ext_sync = 1; wait_us(1); ext_sync = 0;
    wait_us(10);
    for (int c = 0; c < 8; c++) check(frames[c] == f0[c] + 1, $sformatf("ext: ch%0d sent", c));
    check(last[1] == 16'h3333, "ext: ch1 value");
    $display("external sync latency: %0d ns (load strobe %0d ns)", (lstart[0] - t0) * 20,
             first_load_after(t0) * 20);

    // ---- PIO2 sync
    j5 = 4'b0001;
    snap(f0);
    bus(mkword(3'd4, 5'd9, 3'd6, 16'h6666));
    ext_sync = 1; wait_us(1); ext_sync = 0;
    wait_us(10);
    check(frames[6] == f0[6], "pio2: external edge ignored");
    pio2 = 1; wait_us(1); pio2 = 0;
    wait_us(10);
    check(frames[6] == f0[6] + 1 && last[6] == 16'h6666, "pio2: ch6 sent");

    // ---- FIFO overflow with a slow system clock
    j5 = 4'b1000;
    tclk = 100ns;
    ws = {};
    for (int i = 0; i < 1400; i++) ws.push_back(mkword(3'd4, 5'd9, 3'd3, 16'(i)));
    burst(ws);
    tclk = 20ns;
    wait_us(100);
    check(led[2], "FIFO overflow LED latched");
    check(flow_ok, "NRFD*/SUSPEND* always ready");
    check(last[3] != 16'h0000 && errs[3] == 0, "ch3 still sending good frames after overflow");

    // ---- latch reset
    latch_rst_n = 0; wait_us(1); latch_rst_n = 1;
    wait_us(1);
    check(led[3:0] == 4'b0000, "fault LEDs cleared");

    // ---- keep-alive
    ka_enable = 1;
    bus(mkword(3'd4, 5'd9, 3'd3, 16'h7777));
    wait_us(10);
    check(last[3] == 16'h7777, "ch3 command before keep-alive");
    snap(f0);
    wait_us(KA / 50);
    for (int c = 0; c < 8; c++)
      check(frames[c] == f0[c] + 1 && last[c] == 16'h0FFF, $sformatf("keep-alive: ch%0d safe value", c));
    ka_enable = 0;

    // ---- address fault and J5 error
    group_addr = 3'b111;
    wait_us(1);
    check(led[0], "group address fault LED");
    j5 = 4'b0000;
    #1ns;
    check(cfg_error, "open J5 flagged");

    for (int c = 0; c < 8; c++) check(errs[c] == 0, $sformatf("ch%0d no bad frames", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
