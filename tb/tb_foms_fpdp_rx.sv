// tb_foms_fpdp_rx -- self-checking testbench for foms_fpdp_rx.
//
// Drives random FPDP bus cycles (random DVALID*, SYNC*, group select, Sync
// bit) at the 16 MHz strobe and records every FIFO write. The expected
// writes are worked out from the bus words: a valid word is written when its
// group equals the module's group address (not 111), or when it carries a
// sync request (SYNC* line or bit 26); the FIFO entry is {sync, word}, one
// strobe after the word. Also checks the bus-activity toggle count, that
// group address 111 accepts only sync words, and that the buffer test points
// (data valid, sync, data bit 11) show the word taken at the last strobe.
//
// The group filter (000..110) follows the specification; writing sync words
// for every group is this design's choice.
module tb_foms_fpdp_rx;
  logic pstrobe = 0, rst_n = 0;
  logic [31:0] fpdp_data = '0;
  logic dvalid_n = 1, sync_n = 1;
  logic [2:0] group_addr = 3'd5;
  logic fifo_wr, bus_toggle;
  logic [32:0] fifo_wdata;

  int checks = 0, failures = 0;
  logic [32:0] expq [$];
  int n_valid = 0, toggles = 0, n_sync = 0, n_dropped_group = 0;
  logic last_toggle = 0;

  logic buf_dvalid_n, buf_sync_n, buf_d11;

  foms_fpdp_rx dut (.*);

  always #31 pstrobe = ~pstrobe;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // test points: the buffer shows the word captured at the last strobe edge
  logic cap_dv = 0, cap_sy = 0, cap_d11 = 0;
  int   n_tp = 0;
  always @(posedge pstrobe) if (rst_n) begin
    cap_dv  = !dvalid_n;
    cap_sy  = !sync_n && !dvalid_n;
    cap_d11 = fpdp_data[11];
  end
  always @(negedge pstrobe) if (rst_n) begin
    if (buf_dvalid_n != !cap_dv || buf_sync_n != !cap_sy || buf_d11 != cap_d11) begin
      n_tp++;
      if (n_tp < 5) $display("FAIL: buffer test points %b%b%b", buf_dvalid_n, buf_sync_n, buf_d11);
    end
  end

  // compare FIFO writes against the expected queue
  always @(negedge pstrobe) if (rst_n) begin
    if (fifo_wr) begin
      if (expq.size() == 0) check(0, "unexpected FIFO write");
      else check(fifo_wdata == expq.pop_front(), $sformatf("FIFO data %h", fifo_wdata));
    end
    if (bus_toggle != last_toggle) toggles++;
    last_toggle = bus_toggle;
  end

  task automatic bus_word(input logic [31:0] d, input bit dv, input bit sy);
    bit s;
    @(negedge pstrobe);
    fpdp_data = d; dvalid_n = !dv; sync_n = !sy;
    if (dv) begin
      n_valid++;
      s = sy || d[26];
      if (s) n_sync++;
      if ((d[31:29] == group_addr && group_addr != 3'b111) || s)
        expq.push_back({s, d});
      else n_dropped_group++;
    end
  endtask

  initial begin : watchdog
    #5ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    #100 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      d = $urandom;
      if ($urandom_range(0, 1)) d[31:29] = group_addr;
      d[26] = ($urandom_range(0, 15) == 0);
      bus_word(d, $urandom_range(0, 3) != 0, $urandom_range(0, 15) == 0);
      if (i == 1000) group_addr = 3'b111;
    end
    bus_word('0, 0, 0);
    bus_word('0, 0, 0);
    bus_word('0, 0, 0);
    check(expq.size() == 0, $sformatf("%0d expected FIFO writes missing", expq.size()));
    check(toggles == n_valid, $sformatf("bus toggles %0d, valid words %0d", toggles, n_valid));
    check(n_sync > 10 && n_dropped_group > 100, "stimulus coverage");
    check(n_tp == 0, $sformatf("%0d buffer test point mismatches", n_tp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
