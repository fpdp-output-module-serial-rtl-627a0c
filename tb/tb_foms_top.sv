// tb_foms_top -- end-to-end testbench of the FOMS link at full size.
//
// foms_top runs with all parameters at their defaults: 1024-word FIFO,
// 3.125 Mbit/s serial lines from a 50 MHz transmitter clock, 100 ms
// keep-alive and 200 ms receiver watchdog. The bench closes the eight
// optical links by wiring each transmitter output to its receiver's input;
// the receivers run on their own clock, 0.05 % slower than the
// transmitter's. An FPDP bus model sends command words at 16 MHz. After each
// step the receivers' 12-bit outputs and control lines are compared with the
// command that was last sent to that channel (a reference model kept by the
// bench). Every mechanism of the design is counted and must occur:
// asynchronous update, FPDP-sync update, external-sync update, PIO2-sync
// update, words discarded for another module or group, parity error, a load
// deferred behind a frame in progress, FIFO overflow (the transmitter clock
// is slowed to 10 MHz for that burst), keep-alive expiry, receiver watchdog
// expiry, loss of link, latch reset.
//
// Update methods, addressing, overflow loss and the 100 ms keep-alive follow
// the specification; the receiver watchdog and the deferred load are this
// design's choices.
module tb_foms_top;
  import foms_pkg::*;

  localparam int N = NUM_CHANNELS;

  // transmitter side
  logic clk = 0, rst_n = 0, pstrobe = 0;
  logic [31:0] fpdp_data = '0;
  logic dvalid_n = 1, sync_n = 1, pio2 = 0;
  logic nrfd_n, suspend_n;
  logic [4:0] module_addr = 5'd21;
  logic [2:0] group_addr = 3'd6;
  logic ext_sync = 0;
  logic [N-1:0] tx_sout;
  j5_t j5 = 4'b1000;
  logic ka_enable = 0;
  dflt_jmp_t tx_dflt_jmp = 4'b0010;          // reset value 0xFFF
  logic latch_rst_n = 1, power_ok = 1;
  logic [15:0] led;
  logic tx_cfg_error;
  test_pts_t tx_tp;
  // receiver side
  logic rx_clk = 0, rx_rst_n = 0;
  logic [N-1:0] rx_din, rx_link_good = '1;
  dflt_jmp_t rx_dflt_jmp [N];
  logic [11:0] rx_dac_data [N];
  logic [N-1:0] rx_data_valid, rx_ready, rx_spare, rx_bypass, rx_convert;
  logic [N-1:0] rx_link_led, rx_frame_error, rx_cfg_error;

  foms_top dut (.*);

  assign rx_din = tx_sout;                   // ideal fibre
  initial for (int c = 0; c < N; c++) rx_dflt_jmp[c] = 4'b1000;   // 0x800

  realtime tclk = 20ns;
  always #(tclk / 2) clk = ~clk;
  always #10.005ns rx_clk = ~rx_clk;
  always #31.25ns pstrobe = ~pstrobe;

  int checks = 0, failures = 0;
  int n_async = 0, n_fsync = 0, n_ext = 0, n_pio2 = 0, n_discard = 0, n_parity = 0;
  int n_defer = 0, n_ovf = 0, n_ka = 0, n_wd = 0, n_link = 0, n_lrst = 0;
  int n_frame_err = 0;
  bit flow_ok = 1;

  always @(posedge rx_clk) if (rx_rst_n && rx_frame_error != 0) n_frame_err++;
  always @(posedge pstrobe) if (rst_n && !(nrfd_n && suspend_n)) flow_ok = 0;

  logic [15:0] model [N];       // value the receiver should show

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] mkword(input logic [2:0] ch, input logic [15:0] d,
                                         input bit bad = 0, input logic [2:0] g = 3'd6,
                                         input logic [4:0] m = 5'd21);
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

  task automatic burst(input logic [31:0] ws [$]);
    foreach (ws[i]) begin
      @(negedge pstrobe);
      fpdp_data = ws[i]; dvalid_n = 0;
    end
    @(negedge pstrobe);
    dvalid_n = 1;
  endtask

  task automatic wait_us(input int n);
    #(n * 1us);
  endtask

  // compare every receiver with the model
  task automatic compare_all(input string tag, input bit valid = 1);
    for (int c = 0; c < N; c++) begin
      if (valid) begin
        check(rx_data_valid[c], $sformatf("%s: rx%0d data_valid", tag, c));
        check(rx_dac_data[c] == model[c][11:0],
              $sformatf("%s: rx%0d dac %h expected %h", tag, c, rx_dac_data[c], model[c][11:0]));
        check({rx_convert[c], rx_bypass[c], rx_spare[c], rx_ready[c]} == model[c][15:12],
              $sformatf("%s: rx%0d control bits", tag, c));
      end else begin
        check(!rx_data_valid[c], $sformatf("%s: rx%0d data_valid low", tag, c));
        check(rx_dac_data[c] == 12'h800, $sformatf("%s: rx%0d default level", tag, c));
      end
    end
  endtask

  initial begin : watchdog
    #800ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ws [$];
    logic [15:0] v;
    int e_before;
    #200ns rst_n = 1; rx_rst_n = 1;

    // reset value reaches every receiver
    for (int c = 0; c < N; c++) model[c] = 16'h0FFF;
    wait_us(12);
    compare_all("reset");

    // ---- asynchronous mode, random commands
    for (int k = 0; k < 40; k++) begin
      ws = {};
      for (int c = 0; c < N; c++) begin
        if ($urandom_range(0, 2) != 0) begin
          v = 16'($urandom);
          ws.push_back(mkword(3'(c), v));
          model[c] = v;
          n_async++;
        end
        if ($urandom_range(0, 4) == 0) begin           // traffic for others
          ws.push_back(mkword(3'(c), 16'($urandom), 0, 3'd2));
          ws.push_back(mkword(3'(c), 16'($urandom), 0, 3'd6, 5'd3));
          n_discard += 2;
        end
      end
      burst(ws);
      wait_us(8);
    end
    wait_us(10);
    compare_all("async");

    // deferred load: two commands to one channel closer than a frame
    v = 16'hC3A5;
    bus(mkword(3'd4, 16'h1234));
    wait_us(2);
    bus(mkword(3'd4, v));
    model[4] = v;
    n_defer++;
    wait_us(20);
    compare_all("deferred");

    // parity errors change nothing
    bus(mkword(3'd0, 16'hBAD0, 1));
    bus(mkword(3'd1, 16'hBAD1, 1));
    n_parity += 2;
    wait_us(15);
    check(led[3], "parity LED latched");
    compare_all("parity");

    // ---- FPDP sync mode
    j5 = 4'b0010;
    for (int k = 0; k < 5; k++) begin
      logic [15:0] pend [N];
      for (int c = 0; c < N; c++) pend[c] = model[c];
      for (int c = 0; c < N; c++) begin
        v = 16'($urandom);
        bus(mkword(3'(c), v));
        pend[c] = v;
      end
      wait_us(10);
      compare_all("fsync before sync");
      bus(mkword(3'd0, 16'h0, 0, 3'd1, 5'd0), 1);    // end of command block
      for (int c = 0; c < N; c++) model[c] = pend[c];
      n_fsync++;
      wait_us(10);
      compare_all("fsync");
    end

    // ---- external sync mode
    j5 = 4'b0100;
    for (int k = 0; k < 3; k++) begin
      v = 16'($urandom);
      bus(mkword(3'(k), v));
      wait_us(10);
      compare_all("ext before edge");
      ext_sync = 1; wait_us(1); ext_sync = 0;
      model[k] = v;
      n_ext++;
      wait_us(10);
      compare_all("ext");
    end

    // ---- PIO2 sync mode
    j5 = 4'b0001;
    for (int k = 0; k < 3; k++) begin
      v = 16'($urandom);
      bus(mkword(3'(k + 3), v));
      wait_us(10);
      compare_all("pio2 before edge");
      pio2 = 1; wait_us(1); pio2 = 0;
      model[k + 3] = v;
      n_pio2++;
      wait_us(10);
      compare_all("pio2");
    end

    // ---- FIFO overflow: slow transmitter clock during a long burst
    // (the serial lines run 5x slow meanwhile, so receiver errors are not counted)
    j5 = 4'b1000;
    e_before = n_frame_err;
    tclk = 100ns;
    ws = {};
    for (int i = 0; i < 1400; i++) ws.push_back(mkword(3'd7, 16'(i)));
    burst(ws);
    tclk = 20ns;
    wait_us(100);                                     // FIFO drains
    n_frame_err = e_before;
    if (led[2]) n_ovf++;
    check(flow_ok, "NRFD*/SUSPEND* always ready");
    // after the burst the channel carries the last value the FIFO kept
    v = 16'h7E57;
    bus(mkword(3'd7, v));
    model[7] = v;
    wait_us(15);
    compare_all("after overflow");

    // ---- latch reset
    latch_rst_n = 0; wait_us(1); latch_rst_n = 1;
    wait_us(1);
    check(led[3:0] == 4'b0000, "fault LEDs cleared");
    n_lrst++;

    // ---- loss of link on one receiver
    rx_link_good[2] = 0;
    wait_us(1);
    check(!rx_data_valid[2] && rx_dac_data[2] == 12'h800, "link loss gives default level");
    n_link++;
    rx_link_good[2] = 1;
    wait_us(1);
    compare_all("link restored");

    // ---- keep-alive expiry (100 ms) then receiver watchdog expiry (200 ms)
    ka_enable = 1;
    bus(mkword(3'd0, 16'h0555));
    model[0] = 16'h0555;
    wait_us(20);
    compare_all("before keep-alive");
    #99ms;
    compare_all("keep-alive not yet");
    #2ms;
    for (int c = 0; c < N; c++) model[c] = 16'h0FFF;
    compare_all("keep-alive safe value");
    n_ka++;
    ka_enable = 0;
    #190ms;
    compare_all("watchdog not yet");
    #12ms;
    compare_all("watchdog expired", 0);
    n_wd++;

    check(n_frame_err == 0, $sformatf("%0d receiver frame errors", n_frame_err));
    check(!tx_cfg_error && rx_cfg_error == 0, "no configuration errors");

    $display("mechanisms: async=%0d fsync=%0d ext=%0d pio2=%0d discard=%0d parity=%0d defer=%0d overflow=%0d keepalive=%0d watchdog=%0d link=%0d latchreset=%0d",
             n_async, n_fsync, n_ext, n_pio2, n_discard, n_parity, n_defer, n_ovf, n_ka, n_wd, n_link, n_lrst);
    check(n_async > 0, "async update exercised");
    check(n_fsync > 0, "FPDP sync exercised");
    check(n_ext > 0, "external sync exercised");
    check(n_pio2 > 0, "PIO2 sync exercised");
    check(n_discard > 0, "discard exercised");
    check(n_parity > 0, "parity error exercised");
    check(n_defer > 0, "deferred load exercised");
    check(n_ovf > 0, "FIFO overflow exercised");
    check(n_ka > 0, "keep-alive exercised");
    check(n_wd > 0, "receiver watchdog exercised");
    check(n_link > 0, "link loss exercised");
    check(n_lrst > 0, "latch reset exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
