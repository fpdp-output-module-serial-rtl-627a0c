// foms_fifo -- dual-clock FIFO that buffers FPDP command words.
//
// The FPDP bus delivers a word every 62.5 ns (16 MHz) while handling a word
// addressed to this module takes longer, so a 1024-word FIFO absorbs bursts.
// Words are written in the FPDP strobe domain (wclk) and read in the CPLD
// system clock domain (rclk). Read and write pointers carry one extra wrap
// bit and cross between domains in Gray code through two-flop synchronizers,
// the usual asynchronous FIFO structure. Depth and the 1024 default follow
// the specification; the dual-clock construction is this design's choice (the
// board uses a discrete FIFO device whose internals are not described).
//
// Interface: wr_en writes wdata when wfull is low (a write while full is
// ignored and reported on wr_drop for one wclk cycle). rd_en pops the head
// when rempty is low; rdata is registered and valid the rclk cycle after the
// pop. The flags are conservative: wfull and rempty may stay set up to two
// cycles of the other clock after the opposite side moved.
// Reset: wrst_n / rrst_n asynchronous, active low, each in its own domain.
module foms_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 1024   // power of two
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,
  output logic             wr_drop,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wbin_next;
  logic        do_write;

  assign do_write  = wr_en && !wfull;
  assign wbin_next = wbin + (AW+1)'(do_write);

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      wfull    <= 1'b0;
      wr_drop  <= 1'b0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      // full: next write pointer equals read pointer with the two MSBs inverted
      wfull    <= (bin2gray(wbin_next) ==
                   {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
      wr_drop  <= wr_en && wfull;
    end
  end

  // ---------------- read side ----------------
  logic [AW:0] rbin_next;
  logic        do_read;

  assign do_read   = rd_en && !rempty;
  assign rbin_next = rbin + (AW+1)'(do_read);

  always_ff @(posedge rclk) begin
    if (do_read) rdata <= mem[rbin[AW-1:0]];
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      rempty   <= 1'b1;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      rempty   <= (bin2gray(rbin_next) == wgray_r2);
    end
  end

endmodule
