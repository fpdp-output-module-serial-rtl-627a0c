// foms_tx -- FOMS transmitter: FPDP command words in, eight Manchester
// coded serial outputs out.
//
// Structure (one box per submodule):
//   FPDP strobe domain:  foms_fpdp_rx (input buffer, group filter)
//                        -> foms_fifo (1024 x 33, dual clock)
//   system clock domain: foms_cmd_ctrl (address/parity check, holding-register
//                        writes, update method) ; foms_keepalive ;
//                        foms_bit_clock ; 8 x foms_channel ; foms_status_leds
// A command word addressed to this module (group + module address) writes
// the holding register of the channel named by its 3-bit select. Jumper J5
// picks when holding registers move into the shift registers: right after
// the write (asynchronous), on an FPDP sync word, on a rising edge of the
// external sync input, or on a rising edge of the FPDP PIO2 line. The two
// FPDP flow-control lines NRFD* and SUSPEND* are held at 'ready' so this
// module never stalls the bus; words that find the FIFO full are lost and
// light the FIFO LED.
//
// Clocks: pstrobe is the 16 MHz FPDP strobe; clk is the system clock, 50 MHz
// by default (HALF_BIT_CYCLES = 8 gives the 3.125 Mbit/s serial rate).
// rst_n is the module reset (power-up or the RESET button), asynchronous and
// active low; it clears the FIFO and state machines and reloads every output
// with the reset value. latch_rst_n is the LATCH RESET button (active low).
// ext_sync, pio2, latch_rst_n and power_ok are asynchronous and synchronized
// here.
//
// Configuration errors (J5 with no or several positions, or several default
// levels on JMPR 3) are reported on cfg_error; the specification calls them
// error conditions without naming an indicator, so bringing them out on a pin
// is this design's choice. The group address 111 is outside the valid range
// 000..110 and is reported on the Adr LED.
//
// Latency at 50 MHz (measured): word on the bus to the load strobe 300 ns in
// asynchronous mode, sync word to load 280 ns, external sync edge to load
// 100 ns; the frames then start on the next bit boundary (up to 320 ns).
//
// tp brings out the board's test points (buffer, FIFO and holding/shift
// register strobes) as listed with test_pts_t in foms_pkg; the board shows
// them on probe pads, here they are a struct port.
//
// Three submodule outputs are left open on purpose: the FIFO's wfull (a full
// FIFO is reported through wr_drop, and NRFD*/SUSPEND* never follow it) and
// each channel's frame_start and busy (status for test benches; nothing in
// the transmitter needs them).
module foms_tx
  import foms_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH       = 1024,
  parameter int unsigned HALF_BIT_CYCLES  = 8,
  parameter int unsigned KEEPALIVE_CYCLES = 5_000_000,
  parameter int unsigned STRETCH_CYCLES   = 2_097_152
) (
  input  logic                    clk,
  input  logic                    rst_n,

  // FPDP front-panel port
  input  logic                    pstrobe,
  input  logic [31:0]             fpdp_data,
  input  logic                    dvalid_n,
  input  logic                    sync_n,
  input  logic                    pio2,
  output logic                    nrfd_n,
  output logic                    suspend_n,

  // paddle board via P2
  input  logic [4:0]              module_addr,
  input  logic [2:0]              group_addr,
  input  logic                    ext_sync,
  output logic [NUM_CHANNELS-1:0] sout,

  // jumpers
  input  j5_t                     j5,
  input  logic                    ka_enable,
  input  dflt_jmp_t               dflt_jmp,

  // front panel and board
  input  logic                    latch_rst_n,
  input  logic                    power_ok,
  output logic [15:0]             led,
  output logic                    cfg_error,
  output test_pts_t               tp           // board test points
);
  // ---------------- resets ----------------
  logic srst_n, prst_n;
  foms_rst_sync u_rst_sys (.clk(clk),     .rst_in_n(rst_n), .rst_out_n(srst_n));
  foms_rst_sync u_rst_fp  (.clk(pstrobe), .rst_in_n(rst_n), .rst_out_n(prst_n));

  assign nrfd_n    = 1'b1;
  assign suspend_n = 1'b1;

  // ---------------- FPDP strobe domain ----------------
  logic        fifo_wr, fifo_drop, bus_toggle;
  logic        tp_buf_dvalid_n, tp_buf_sync_n, tp_buf_d11;
  logic [32:0] fifo_wdata;
  logic        ovf_toggle;

  foms_fpdp_rx u_fpdp (
    .pstrobe    (pstrobe),
    .rst_n      (prst_n),
    .fpdp_data  (fpdp_data),
    .dvalid_n   (dvalid_n),
    .sync_n     (sync_n),
    .group_addr (group_addr),
    .fifo_wr    (fifo_wr),
    .fifo_wdata (fifo_wdata),
    .bus_toggle (bus_toggle),
    .buf_dvalid_n(tp_buf_dvalid_n),
    .buf_sync_n (tp_buf_sync_n),
    .buf_d11    (tp_buf_d11)
  );

  always_ff @(posedge pstrobe or negedge prst_n) begin
    if (!prst_n)        ovf_toggle <= 1'b0;
    else if (fifo_drop) ovf_toggle <= !ovf_toggle;
  end

  // ---------------- FIFO ----------------
  logic        fifo_rd, fifo_empty;
  logic [32:0] fifo_rdata;

  foms_fifo #(.WIDTH(33), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk   (pstrobe),
    .wrst_n (prst_n),
    .wr_en  (fifo_wr),
    .wdata  (fifo_wdata),
    .wfull  (),
    .wr_drop(fifo_drop),
    .rclk   (clk),
    .rrst_n (srst_n),
    .rd_en  (fifo_rd),
    .rdata  (fifo_rdata),
    .rempty (fifo_empty)
  );

  // ---------------- asynchronous inputs ----------------
  logic [5:0] async_in, async_s;
  logic       ext_s_d, pio2_s_d, bus_s_d, ovf_s_d;
  logic       ext_pulse, pio2_pulse, bus_evt, ovf_evt;

  assign async_in = {ext_sync, pio2, bus_toggle, ovf_toggle, !latch_rst_n, power_ok};

  foms_sync2 #(.WIDTH(6), .RESET_VAL(6'b000001)) u_sync (
    .clk(clk), .rst_n(srst_n), .d(async_in), .q(async_s)
  );

  always_ff @(posedge clk or negedge srst_n) begin
    if (!srst_n) begin
      ext_s_d  <= 1'b0;
      pio2_s_d <= 1'b0;
      bus_s_d  <= 1'b0;
      ovf_s_d  <= 1'b0;
    end else begin
      ext_s_d  <= async_s[5];
      pio2_s_d <= async_s[4];
      bus_s_d  <= async_s[3];
      ovf_s_d  <= async_s[2];
    end
  end

  assign ext_pulse  = async_s[5] && !ext_s_d;
  assign pio2_pulse = async_s[4] && !pio2_s_d;
  assign bus_evt    = async_s[3] != bus_s_d;
  assign ovf_evt    = async_s[2] != ovf_s_d;

  // ---------------- configuration ----------------
  upd_mode_t   upd_mode;
  logic [11:0] reset_level;

  assign upd_mode    = decode_j5(j5);
  assign reset_level = default_level(dflt_jmp);
  assign cfg_error   = (upd_mode == UPD_ERROR) || default_level_error(dflt_jmp);

  // ---------------- command controller and keep-alive ----------------
  logic [NUM_CHANNELS-1:0] wr_sel, load_sel;
  logic [15:0]             wr_data;
  logic cmd_ok, addressed, parity_err, load_evt, ka_timeout;

  foms_cmd_ctrl u_ctrl (
    .clk        (clk),
    .rst_n      (srst_n),
    .fifo_rdata (fifo_rdata),
    .fifo_empty (fifo_empty),
    .fifo_rd    (fifo_rd),
    .module_addr(module_addr),
    .group_addr (group_addr),
    .upd_mode   (upd_mode),
    .reset_level(reset_level),
    .ext_pulse  (ext_pulse),
    .pio2_pulse (pio2_pulse),
    .ka_timeout (ka_timeout),
    .wr_sel     (wr_sel),
    .wr_data    (wr_data),
    .load_sel   (load_sel),
    .cmd_ok     (cmd_ok),
    .addressed  (addressed),
    .parity_err (parity_err),
    .load_evt   (load_evt)
  );

  foms_keepalive #(.TIMEOUT_CYCLES(KEEPALIVE_CYCLES)) u_ka (
    .clk    (clk),
    .rst_n  (srst_n),
    .enable (ka_enable),
    .cmd_ok (cmd_ok),
    .timeout(ka_timeout)
  );

  // ---------------- serial outputs ----------------
  logic half_tick, first_half;

  foms_bit_clock #(.HALF_BIT_CYCLES(HALF_BIT_CYCLES)) u_bitclk (
    .clk       (clk),
    .rst_n     (srst_n),
    .half_tick (half_tick),
    .first_half(first_half)
  );

  for (genvar c = 0; c < NUM_CHANNELS; c++) begin : g_ch
    foms_channel u_ch (
      .clk        (clk),
      .rst_n      (srst_n),
      .half_tick  (half_tick),
      .first_half (first_half),
      .wr         (wr_sel[c]),
      .wr_data    (wr_data),
      .load       (load_sel[c]),
      .reset_level(reset_level),
      .sout       (sout[c]),
      .frame_start(),
      .busy       ()
    );
  end

  // ---------------- LEDs ----------------
  foms_status_leds #(.STRETCH_CYCLES(STRETCH_CYCLES)) u_leds (
    .clk           (clk),
    .rst_n         (srst_n),
    .latch_clr     (async_s[1]),
    .group_addr    (group_addr),
    .module_addr   (module_addr),
    .power_ok      (async_s[0]),
    .bus_evt       (bus_evt),
    .mod_evt       (addressed),
    .load_evt      (load_evt),
    .parity_evt    (parity_err),
    .fifo_ovf_evt  (ovf_evt),
    .vfault_evt    (!async_s[0]),
    .addr_fault_evt(group_addr == 3'b111),
    .led           (led)
  );

  // ---------------- test points ----------------
  assign tp.buf_d11       = tp_buf_d11;
  assign tp.fifo_d11      = fifo_rdata[11];
  assign tp.fifo_load     = fifo_wr;
  assign tp.load_sr       = |load_sel;
  assign tp.fifo_unload   = fifo_rd;
  assign tp.fifo_sync_n   = !fifo_rdata[32];
  assign tp.fifo_dvalid_n = fifo_empty;
  assign tp.buf_dvalid_n  = tp_buf_dvalid_n;
  assign tp.buf_sync_n    = tp_buf_sync_n;
  assign tp.write_sr      = |wr_sel;
  assign tp.sel_sr0       = wr_sel[0];
  assign tp.sel_sr1       = wr_sel[1];

endmodule
