// foms_top -- FOMS link: one transmitter module and the receivers of its
// eight serial channels.
//
// The transmitter (foms_tx) takes FPDP command words and drives eight
// Manchester coded serial lines; each line reaches a receiver unit
// (foms_receiver) that turns it back into a 12-bit setpoint and four control
// lines. Between them lie the optical output on the paddle board, the fibre
// and the receiver's optical input and quantizer. Those are analog parts, so
// the link is not closed inside this module: tx_sout[] leaves as the
// transmitter's serial outputs and rx_din[] / rx_link_good[] come back as
// the quantizer outputs of the receivers. Connecting tx_sout to rx_din and
// tying rx_link_good high models an ideal fibre.
//
// Clocks: clk is the transmitter's system clock, pstrobe the FPDP strobe and
// rx_clk the receivers' clock (each receiver has its own 50 MHz oscillator;
// here they share one input). Resets are active low and asynchronous.
// Parameters keep the defaults of the two units (1024-word FIFO, 100 ms
// keep-alive, 3.125 Mbit/s serial rate at 50 MHz).
//
// The pairing of one transmitter with eight receivers follows the
// specification's two block diagrams; the shared receiver clock input is
// this design's choice.
module foms_top
  import foms_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH       = 1024,
  parameter int unsigned HALF_BIT_CYCLES  = 8,
  parameter int unsigned KEEPALIVE_CYCLES = 5_000_000,
  parameter int unsigned STRETCH_CYCLES   = 2_097_152,
  parameter int unsigned WATCHDOG_CYCLES  = 10_000_000
) (
  // transmitter
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pstrobe,
  input  logic [31:0]             fpdp_data,
  input  logic                    dvalid_n,
  input  logic                    sync_n,
  input  logic                    pio2,
  output logic                    nrfd_n,
  output logic                    suspend_n,
  input  logic [4:0]              module_addr,
  input  logic [2:0]              group_addr,
  input  logic                    ext_sync,
  output logic [NUM_CHANNELS-1:0] tx_sout,
  input  j5_t                     j5,
  input  logic                    ka_enable,
  input  dflt_jmp_t               tx_dflt_jmp,
  input  logic                    latch_rst_n,
  input  logic                    power_ok,
  output logic [15:0]             led,
  output logic                    tx_cfg_error,
  output test_pts_t               tx_tp,

  // receivers
  input  logic                    rx_clk,
  input  logic                    rx_rst_n,
  input  logic [NUM_CHANNELS-1:0] rx_din,
  input  logic [NUM_CHANNELS-1:0] rx_link_good,
  input  dflt_jmp_t               rx_dflt_jmp [NUM_CHANNELS],
  output logic [11:0]             rx_dac_data [NUM_CHANNELS],
  output logic [NUM_CHANNELS-1:0] rx_data_valid,
  output logic [NUM_CHANNELS-1:0] rx_ready,
  output logic [NUM_CHANNELS-1:0] rx_spare,
  output logic [NUM_CHANNELS-1:0] rx_bypass,
  output logic [NUM_CHANNELS-1:0] rx_convert,
  output logic [NUM_CHANNELS-1:0] rx_link_led,
  output logic [NUM_CHANNELS-1:0] rx_frame_error,
  output logic [NUM_CHANNELS-1:0] rx_cfg_error
);
  foms_tx #(
    .FIFO_DEPTH      (FIFO_DEPTH),
    .HALF_BIT_CYCLES (HALF_BIT_CYCLES),
    .KEEPALIVE_CYCLES(KEEPALIVE_CYCLES),
    .STRETCH_CYCLES  (STRETCH_CYCLES)
  ) u_tx (
    .clk        (clk),
    .rst_n      (rst_n),
    .pstrobe    (pstrobe),
    .fpdp_data  (fpdp_data),
    .dvalid_n   (dvalid_n),
    .sync_n     (sync_n),
    .pio2       (pio2),
    .nrfd_n     (nrfd_n),
    .suspend_n  (suspend_n),
    .module_addr(module_addr),
    .group_addr (group_addr),
    .ext_sync   (ext_sync),
    .sout       (tx_sout),
    .j5         (j5),
    .ka_enable  (ka_enable),
    .dflt_jmp   (tx_dflt_jmp),
    .latch_rst_n(latch_rst_n),
    .power_ok   (power_ok),
    .led        (led),
    .cfg_error  (tx_cfg_error),
    .tp         (tx_tp)
  );

  logic rx_srst_n;
  foms_rst_sync u_rx_rst (.clk(rx_clk), .rst_in_n(rx_rst_n), .rst_out_n(rx_srst_n));

  for (genvar c = 0; c < NUM_CHANNELS; c++) begin : g_rx
    foms_receiver #(
      .HALF_BIT_CYCLES(HALF_BIT_CYCLES),
      .WATCHDOG_CYCLES(WATCHDOG_CYCLES)
    ) u_rx (
      .clk        (rx_clk),
      .rst_n      (rx_srst_n),
      .din        (rx_din[c]),
      .link_good  (rx_link_good[c]),
      .dflt_jmp   (rx_dflt_jmp[c]),
      .dac_data   (rx_dac_data[c]),
      .data_valid (rx_data_valid[c]),
      .ready      (rx_ready[c]),
      .spare      (rx_spare[c]),
      .bypass     (rx_bypass[c]),
      .convert    (rx_convert[c]),
      .link_led   (rx_link_led[c]),
      .frame_error(rx_frame_error[c]),
      .cfg_error  (rx_cfg_error[c])
    );
  end

endmodule
