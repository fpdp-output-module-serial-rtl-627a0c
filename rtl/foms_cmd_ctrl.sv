// foms_cmd_ctrl -- command controller of the FOMS transmitter (system clock).
//
// The controller unloads the FPDP FIFO one word at a time and decides what to
// do with it:
//   * the word is "addressed" when its group select equals the module's group
//     address and its module select equals the module address;
//   * the two FPDP parity bits are checked (bit 24 over bits 0..15, bit 25
//     over bits 16..23, odd parity); a failing word raises parity_err and is
//     not used;
//   * an addressed word with good parity writes its 16 low bits into the
//     holding register picked by its 3-bit output select (wr_sel one-hot);
//   * the shift-register load then follows the update method set by jumper
//     J5: Asynchronous loads the written channel right after the write;
//     FPDP_Sync loads all channels when a word carrying the sync flag is
//     unloaded (after that word's own write); External_Sync and PIO2_Sync load
//     all channels on a rising edge of the external / PIO2 input; an invalid
//     jumper setting loads nothing.
// Keep-alive expiry has top priority: all eight holding registers are written
// with the reset value and all channels are loaded, whatever the update mode.
// A pending sync edge is served only between FIFO words, so it never splits a
// holding-register write from its load.
//
// Timing (cycles of clk): an addressed word takes 3 cycles from its pop to the
// next pop (pop, check/write, load); a discarded word takes 2. wr_sel/wr_data
// are registered and appear the cycle after the check; load_sel the cycle
// after that. A sync edge reaches load_sel one cycle after ext_pulse /
// pio2_pulse when the controller is idle. These cycle counts are this
// design's own; the specification quotes only board-level times.
// Reset is asynchronous, active low, and returns the state machine to idle.
//
// The word's Sync bit (26) arrives already merged into the FIFO's sync flag,
// and PC Fault (27) and bit 28 have no function here, so those fields of the
// decoded struct stay unread; the payload is taken straight from the FIFO
// data.
module foms_cmd_ctrl
  import foms_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,

  // FIFO read side
  input  logic [32:0]             fifo_rdata,   // {sync, word}
  input  logic                    fifo_empty,
  output logic                    fifo_rd,

  // configuration
  input  logic [4:0]              module_addr,
  input  logic [2:0]              group_addr,
  input  upd_mode_t               upd_mode,
  input  logic [11:0]             reset_level,

  // sync sources (single-cycle pulses, already synchronized)
  input  logic                    ext_pulse,
  input  logic                    pio2_pulse,
  input  logic                    ka_timeout,

  // output channels
  output logic [NUM_CHANNELS-1:0] wr_sel,
  output logic [15:0]             wr_data,
  output logic [NUM_CHANNELS-1:0] load_sel,

  // events for keep-alive and LEDs (single-cycle pulses)
  output logic                    cmd_ok,
  output logic                    addressed,
  output logic                    parity_err,
  output logic                    load_evt
);
  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_LOAD, S_SAFE} state_t;
  state_t state;

  cmd_word_t w;
  logic      w_sync, w_addr, w_par_ok;
  logic      safe_pend, sync_pend;
  logic [NUM_CHANNELS-1:0] last_sel;
  logic      last_wr, last_sync;

  assign w        = cmd_word_t'(fifo_rdata[31:0]);
  assign w_sync   = fifo_rdata[32];
  assign w_addr   = (w.group_sel == group_addr) && (w.module_sel == module_addr) &&
                    (group_addr != 3'b111);
  assign w_par_ok = (w.par_data == odd_parity16(fifo_rdata[15:0])) &&
                    (w.par_addr == odd_parity8(fifo_rdata[23:16]));

  assign fifo_rd  = (state == S_IDLE) && !safe_pend && !sync_pend && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      safe_pend  <= 1'b0;
      sync_pend  <= 1'b0;
      last_sel   <= '0;
      last_wr    <= 1'b0;
      last_sync  <= 1'b0;
      wr_sel     <= '0;
      wr_data    <= '0;
      load_sel   <= '0;
      cmd_ok     <= 1'b0;
      addressed  <= 1'b0;
      parity_err <= 1'b0;
      load_evt   <= 1'b0;
    end else begin
      wr_sel     <= '0;
      load_sel   <= '0;
      cmd_ok     <= 1'b0;
      addressed  <= 1'b0;
      parity_err <= 1'b0;
      load_evt   <= 1'b0;

      if (ka_timeout) safe_pend <= 1'b1;
      if ((ext_pulse && upd_mode == UPD_EXT_SYNC) ||
          (pio2_pulse && upd_mode == UPD_PIO2_SYNC))
        sync_pend <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (safe_pend) begin
            safe_pend <= 1'b0;
            wr_sel    <= '1;
            wr_data   <= {4'b0000, reset_level};
            state     <= S_SAFE;
          end else if (sync_pend) begin
            sync_pend <= 1'b0;
            load_sel  <= '1;
            load_evt  <= 1'b1;
          end else if (!fifo_empty) begin
            state <= S_CHECK;
          end
        end

        S_CHECK: begin
          last_wr   <= 1'b0;
          last_sync <= w_sync;
          last_sel  <= NUM_CHANNELS'(1) << w.chan_sel;
          if (!w_par_ok) begin
            parity_err <= 1'b1;
          end else if (w_addr) begin
            wr_sel    <= NUM_CHANNELS'(1) << w.chan_sel;
            wr_data   <= fifo_rdata[15:0];
            last_wr   <= 1'b1;
            cmd_ok    <= 1'b1;
          end
          if (w_addr) addressed <= 1'b1;
          // a word that neither writes nor syncs needs no load cycle
          state <= ((w_par_ok && w_addr) || w_sync) ? S_LOAD : S_IDLE;
        end

        S_LOAD: begin
          if (upd_mode == UPD_FPDP_SYNC && last_sync) begin
            load_sel <= '1;
            load_evt <= 1'b1;
          end else if (upd_mode == UPD_ASYNC && last_wr) begin
            load_sel <= last_sel;
            load_evt <= 1'b1;
          end
          state <= S_IDLE;
        end

        S_SAFE: begin
          load_sel <= '1;
          load_evt <= 1'b1;
          state    <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
