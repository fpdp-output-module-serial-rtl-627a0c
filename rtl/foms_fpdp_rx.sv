// foms_fpdp_rx -- FPDP receive buffer and FIFO load logic (PSTROBE domain).
//
// Every rising edge of the FPDP strobe registers the 32 data lines, DVALID*
// and SYNC* into an input buffer. One strobe later a buffered valid word is
// written into the FIFO if its group select (bits 31..29) equals this
// module's group address and lies in the range 000..110; group 111 is never
// accepted. Words that carry a sync request (the SYNC* line active with
// DVALID*, or the Sync bit 26 set) are always written, whatever their group,
// so that a sync word that closes a command block addressed to other modules
// still updates this module's outputs: that exception is this design's
// choice. The FIFO entry is {sync_flag, word}.
//
// The module never throttles the bus: the FPDP NRFD* and SUSPEND* lines are
// held at 'ready' by the parent, and a word arriving while the FIFO is full is
// lost (the FIFO reports it on wr_drop). For the front-panel 'Bus' LED the
// module toggles bus_toggle on every valid bus word; a toggle crosses into
// the system clock domain safely through a plain synchronizer.
//
// Timing: a word on the bus at strobe edge n is written into the FIFO at
// edge n+1. Reset is asynchronous, active low.
module foms_fpdp_rx
  import foms_pkg::*;
(
  input  logic        pstrobe,     // FPDP strobe (16 MHz), rising edge active
  input  logic        rst_n,
  input  logic [31:0] fpdp_data,
  input  logic        dvalid_n,
  input  logic        sync_n,
  input  logic [2:0]  group_addr,  // from the paddle-board switch

  output logic        fifo_wr,
  output logic [32:0] fifo_wdata,  // {sync, word}
  output logic        bus_toggle,
  // test points: the input buffer's state
  output logic        buf_dvalid_n,
  output logic        buf_sync_n,
  output logic        buf_d11
);
  cmd_word_t buf_word;
  logic      buf_dv, buf_sync;
  logic      group_ok, sync_req;

  always_ff @(posedge pstrobe or negedge rst_n) begin
    if (!rst_n) begin
      buf_word   <= '0;
      buf_dv     <= 1'b0;
      buf_sync   <= 1'b0;
      bus_toggle <= 1'b0;
    end else begin
      buf_word <= cmd_word_t'(fpdp_data);
      buf_dv   <= !dvalid_n;
      buf_sync <= !sync_n && !dvalid_n;
      if (!dvalid_n) bus_toggle <= !bus_toggle;
    end
  end

  assign group_ok   = (buf_word.group_sel == group_addr) && (group_addr != 3'b111);
  assign sync_req   = buf_sync || buf_word.sync;
  assign fifo_wr    = buf_dv && (group_ok || sync_req);
  assign fifo_wdata = {sync_req, buf_word};

  assign buf_dvalid_n = !buf_dv;
  assign buf_sync_n   = !buf_sync;
  assign buf_d11      = buf_word.alpha[11];

endmodule
