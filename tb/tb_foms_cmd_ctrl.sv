// tb_foms_cmd_ctrl -- self-checking testbench for foms_cmd_ctrl.
//
// A queue stands in for the FIFO (registered read data, one cycle after the
// pop). Each scenario clears a record of holding-register writes and loads,
// applies stimulus and compares the record with the expected list:
//   asynchronous mode: write then load of the addressed channel, with the
//   cycle distance pop->write = 2 and write->load = 1; words for other
//   modules and words with a bad data or address parity bit are not written;
//   a discarded word frees the controller after 2 cycles, a written one
//   after 3; FPDP sync mode: writes without loads until a sync word (even one
//   addressed elsewhere) loads all channels; external and PIO2 sync modes:
//   only the matching input loads all channels; an invalid J5 setting never
//   loads; keep-alive expiry writes the reset value into all channels and
//   loads them.
//
// Address, parity and update-method rules follow the specification; the cycle
// counts and the sync-word handling are this design's choices.
module tb_foms_cmd_ctrl;
  import foms_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [32:0] fifo_rdata;
  logic fifo_empty, fifo_rd;
  logic [4:0] module_addr = 5'd17;
  logic [2:0] group_addr = 3'd2;
  upd_mode_t upd_mode = UPD_ASYNC;
  logic [11:0] reset_level = 12'h800;
  logic ext_pulse = 0, pio2_pulse = 0, ka_timeout = 0;
  logic [7:0] wr_sel, load_sel;
  logic [15:0] wr_data;
  logic cmd_ok, addressed, parity_err, load_evt;

  int checks = 0, failures = 0;
  int cyc = 0;

  foms_cmd_ctrl dut (.*);

  always #10 clk = ~clk;

  typedef struct { int t; logic [7:0] sel; logic [15:0] d; } ev_t;
  ev_t wrs [$], lds [$], pops [$];

  // FIFO model
  logic [32:0] fq [$];
  initial fifo_empty = 1;
  task automatic push(input logic [32:0] w);
    fq.push_back(w);
    fifo_empty = 0;
  endtask
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fifo_rd) begin
      fifo_rdata <= fq.pop_front();
      pops.push_back('{cyc, 8'h0, 16'h0});
    end
  end

  // recorder
  int n_perr = 0, n_ok = 0;
  always @(negedge clk) begin
    fifo_empty = (fq.size() == 0);
    if (wr_sel != 0)   wrs.push_back('{cyc, wr_sel, wr_data});
    if (load_sel != 0) lds.push_back('{cyc, load_sel, 16'h0});
    if (parity_err) n_perr++;
    if (cmd_ok) n_ok++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [32:0] mkword(input logic [2:0] g, input logic [4:0] m,
                                         input logic [2:0] ch, input logic [15:0] d,
                                         input bit sync = 0, input bit bad_d = 0,
                                         input bit bad_a = 0);
    logic [31:0] w;
    w = '0;
    w[15:0]  = d;
    w[18:16] = ch;
    w[23:19] = m;
    w[31:29] = g;
    w[24] = ~(^w[15:0])  ^ bad_d;
    w[25] = ~(^w[23:16]) ^ bad_a;
    return {sync, w};
  endfunction

  task automatic clear();
    wrs = {}; lds = {}; pops = {}; n_perr = 0; n_ok = 0;
  endtask

  task automatic settle();
    repeat (20) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- asynchronous mode
    clear();
    push(mkword(3'd2, 5'd17, 3'd3, 16'hBEEF));
    settle();
    check(wrs.size() == 1 && wrs[0].sel == 8'h08 && wrs[0].d == 16'hBEEF, "async: write ch3");
    check(lds.size() == 1 && lds[0].sel == 8'h08, "async: load ch3 only");
    check(pops.size() == 1 && wrs[0].t - pops[0].t == 2, "async: pop->write 2 cycles");
    check(lds.size() == 1 && lds[0].t - wrs[0].t == 1, "async: write->load 1 cycle");
    check(n_ok == 1, "async: one accepted command");

    // other module, other group, bad data parity, bad address parity
    clear();
    push(mkword(3'd2, 5'd16, 3'd0, 16'h1111));
    push(mkword(3'd3, 5'd17, 3'd0, 16'h2222));
    push(mkword(3'd2, 5'd17, 3'd1, 16'h3333, 0, 1, 0));
    push(mkword(3'd2, 5'd17, 3'd1, 16'h4444, 0, 0, 1));
    push(mkword(3'd2, 5'd17, 3'd7, 16'h5555));
    settle();
    check(wrs.size() == 1 && wrs[0].sel == 8'h80 && wrs[0].d == 16'h5555, "filter: only ch7 word written");
    check(n_perr == 2, $sformatf("filter: 2 parity errors expected, saw %0d", n_perr));
    check(pops.size() == 5, $sformatf("filter: 5 pops, saw %0d", pops.size()));
    check(pops.size() == 5 && pops[1].t - pops[0].t == 2, "discarded word takes 2 cycles");
    // throughput of addressed words
    clear();
    repeat (4) push(mkword(3'd2, 5'd17, 3'd4, 16'h0042));
    settle();
    check(pops.size() == 4 && pops[1].t - pops[0].t == 3, "written word takes 3 cycles");

    // ---- FPDP sync mode
    upd_mode = UPD_FPDP_SYNC;
    clear();
    push(mkword(3'd2, 5'd17, 3'd0, 16'hA000));
    push(mkword(3'd2, 5'd17, 3'd1, 16'hA001));
    settle();
    check(wrs.size() == 2 && lds.size() == 0, "fsync: writes without loads");
    push(mkword(3'd5, 5'd3, 3'd0, 16'h0000, 1));   // sync word for others
    settle();
    check(wrs.size() == 2 && lds.size() == 1 && lds[0].sel == 8'hFF, "fsync: sync word loads all");
    clear();
    push(mkword(3'd2, 5'd17, 3'd6, 16'hA006, 1));  // addressed sync word
    settle();
    check(wrs.size() == 1 && lds.size() == 1 && lds[0].sel == 8'hFF && lds[0].t > wrs[0].t,
          "fsync: addressed sync word writes then loads all");
    clear();
    ext_pulse = 1; @(negedge clk); ext_pulse = 0;
    settle();
    check(lds.size() == 0, "fsync: external edge ignored");

    // ---- external sync mode
    upd_mode = UPD_EXT_SYNC;
    clear();
    push(mkword(3'd2, 5'd17, 3'd2, 16'hB002, 1));
    settle();
    check(wrs.size() == 1 && lds.size() == 0, "ext: sync word does not load");
    ext_pulse = 1; @(negedge clk); ext_pulse = 0;
    settle();
    check(lds.size() == 1 && lds[0].sel == 8'hFF, "ext: edge loads all");
    clear();
    pio2_pulse = 1; @(negedge clk); pio2_pulse = 0;
    settle();
    check(lds.size() == 0, "ext: PIO2 edge ignored");

    // ---- PIO2 sync mode
    upd_mode = UPD_PIO2_SYNC;
    clear();
    pio2_pulse = 1; @(negedge clk); pio2_pulse = 0;
    settle();
    check(lds.size() == 1 && lds[0].sel == 8'hFF, "pio2: edge loads all");

    // ---- invalid J5
    upd_mode = UPD_ERROR;
    clear();
    push(mkword(3'd2, 5'd17, 3'd2, 16'hC002, 1));
    ext_pulse = 1; pio2_pulse = 1; @(negedge clk); ext_pulse = 0; pio2_pulse = 0;
    settle();
    check(wrs.size() == 1 && lds.size() == 0, "error mode: write but never load");

    // ---- keep-alive expiry
    clear();
    ka_timeout = 1; @(negedge clk); ka_timeout = 0;
    settle();
    check(wrs.size() == 1 && wrs[0].sel == 8'hFF && wrs[0].d == 16'h0800, "keep-alive: reset value to all");
    check(lds.size() == 1 && lds[0].sel == 8'hFF && lds[0].t == wrs[0].t + 1, "keep-alive: load all");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
