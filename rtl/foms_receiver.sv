// foms_receiver -- logic of the FOMS receiver unit (one serial channel).
//
// The receiver turns one FOMS serial output back into a 12-bit analog
// setpoint and four control lines for the driven equipment (a firing
// generator or a switching power amplifier). Optical input, quantizer, DAC
// and output latch are board parts outside this module; this is the CPLD
// between them:
//   * foms_rx_decoder finds each frame and checks its coding and parity;
//   * a good frame updates the 12-bit output bus (to the DAC and the latch)
//     and the READY, SPARE, BYPASS and CONVERT lines from its bits 12..15;
//   * a watchdog restarts on every good frame; data_valid is high while the
//     watchdog has not expired and the quantizer reports link_good. When it
//     drops, the output bus returns to the jumper-selected default level and
//     the control lines to 0. data_valid enables the external 12-bit latch,
//     so the latch keeps the last good value while the DAC falls back to the
//     default. The same signal drives the Data Valid LED and the valid line
//     to the fault detector.
// The specification gives the block diagram only. How data_valid is formed,
// the watchdog time (WATCHDOG_CYCLES, default 10,000,000 cycles = 200 ms at
// the receiver's 50 MHz clock, twice the transmitter's nominal keep-alive
// time) and the zero control lines in the default state are this design's
// choices. The default level jumper uses the same four positions as the
// transmitter's reset-value jumper.
//
// Timing: outputs change one clock after the decoder accepts a frame.
// din and link_good are asynchronous. Reset asynchronous, active low; after
// reset the outputs hold the default level and data_valid is low.
module foms_receiver
  import foms_pkg::*;
#(
  parameter int unsigned HALF_BIT_CYCLES = 8,
  parameter int unsigned WATCHDOG_CYCLES = 10_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        din,          // quantizer data out
  input  logic        link_good,    // quantizer link good
  input  dflt_jmp_t   dflt_jmp,
  output logic [11:0] dac_data,     // to 12-bit DAC and 12-bit latch
  output logic        data_valid,   // latch enable, LED, valid to FD
  output logic        ready,
  output logic        spare,
  output logic        bypass,
  output logic        convert,
  output logic        link_led,
  output logic        frame_error,  // pulse: frame with coding/parity error
  output logic        cfg_error
);
  localparam int unsigned WW = $clog2(WATCHDOG_CYCLES + 1);

  logic [15:0]   fr_data;
  logic          fr_ok, fr_err;
  logic [WW-1:0] wd_cnt;
  logic          wd_ok;
  logic [15:0]   last;
  logic [1:0]    lg_sync;

  foms_rx_decoder #(.HALF_BIT_CYCLES(HALF_BIT_CYCLES)) u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .din      (din),
    .data     (fr_data),
    .frame_ok (fr_ok),
    .frame_err(fr_err)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wd_cnt  <= '0;
      wd_ok   <= 1'b0;
      last    <= '0;
      lg_sync <= '0;
    end else begin
      lg_sync <= {lg_sync[0], link_good};
      if (fr_ok) begin
        last   <= fr_data;
        wd_cnt <= WW'(WATCHDOG_CYCLES - 1);
        wd_ok  <= 1'b1;
      end else if (wd_cnt != '0) begin
        wd_cnt <= wd_cnt - 1'b1;
      end else begin
        wd_ok <= 1'b0;
      end
    end
  end

  assign data_valid = wd_ok && lg_sync[1];
  assign dac_data   = data_valid ? last[11:0] : default_level(dflt_jmp);
  assign ready      = data_valid && last[12];
  assign spare      = data_valid && last[13];
  assign bypass     = data_valid && last[14];
  assign convert    = data_valid && last[15];
  assign link_led   = lg_sync[1];
  assign cfg_error  = default_level_error(dflt_jmp);
  // frames with coding or parity errors leave the outputs unchanged; they
  // are only reported
  assign frame_error = fr_err;

endmodule
