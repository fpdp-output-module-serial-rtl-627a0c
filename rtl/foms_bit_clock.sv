// foms_bit_clock -- shared serial bit timing for the eight output channels.
//
// All serial outputs run at 3.125 Mbit/s (320 ns per bit). Manchester coding
// needs two half-bit slots per bit, so this block divides the system clock
// by HALF_BIT_CYCLES and emits a single-cycle half_tick at the start of every
// 160 ns half-bit, together with first_half, high while the half-bit that
// starts at that tick is the first half of a bit. Sharing one divider keeps
// all channels' bit boundaries aligned, as one 'Clock' line feeds every
// encoder. The default of 8 assumes a 50 MHz system clock (50 MHz / 16 =
// 3.125 MHz exactly); the clock frequency itself is this design's choice
// within the 50-100 MHz range the specification allows.
//
// Timing: after reset the first half_tick comes HALF_BIT_CYCLES cycles after
// reset release and has first_half = 1. Reset asynchronous, active low.
module foms_bit_clock #(
  parameter int unsigned HALF_BIT_CYCLES = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic half_tick,
  output logic first_half
);
  localparam int unsigned CW = (HALF_BIT_CYCLES > 1) ? $clog2(HALF_BIT_CYCLES) : 1;

  logic [CW-1:0] div;
  logic          phase;   // 0: next tick opens a first half

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div        <= '0;
      phase      <= 1'b0;
      half_tick  <= 1'b0;
      first_half <= 1'b0;
    end else begin
      half_tick <= 1'b0;
      if (div == CW'(HALF_BIT_CYCLES - 1)) begin
        div        <= '0;
        half_tick  <= 1'b1;
        first_half <= !phase;
        phase      <= !phase;
      end else begin
        div <= div + 1'b1;
      end
    end
  end

endmodule
