// foms_channel -- one FOMS serial output: holding register, shift register
// and sync/Manchester encoder.
//
// The output is double-buffered. A write (wr) stores the 16-bit command
// payload and its odd parity bit in the 17-bit holding register. A load
// request transfers the holding register into the 17-bit shift register and
// starts a serial frame:
//   sync high for 1.5 bit, sync low for 1.5 bit, then D15 first down to D0,
//   then the parity bit, each bit Manchester coded: '0' is high in the first
//   half and low in the second (falling mid-bit edge), '1' is low then high
//   (rising mid-bit edge).
// The shift register fills with zeros from its far end as it shifts, so once
// the frame is out the line carries Manchester zeros until the next frame.
// A frame lasts 20 bit times (6.4 us at 3.125 Mbit/s), which bounds the
// update rate at 156.25 kHz.
//
// A load that arrives while a frame is being sent is held pending and starts
// at the first bit boundary after the frame ends; frames then follow back to
// back. The frame is built from the holding register as it stands when the
// frame starts, i.e. the most recent value. Deferring the load rather than
// cutting a frame short is this design's choice; the specification does not
// say what happens to a frame in progress.
//
// After reset the holding register takes the jumper-selected reset value
// (control bits zero) and one frame carrying it is sent.
//
// Interface: half_tick / first_half come from foms_bit_clock. sout changes
// only on half_tick. frame_start pulses with the first sync half-bit.
// Reset asynchronous, active low.
module foms_channel
  import foms_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        half_tick,
  input  logic        first_half,
  input  logic        wr,
  input  logic [15:0] wr_data,
  input  logic        load,
  input  logic [11:0] reset_level,
  output logic        sout,
  output logic        frame_start,
  output logic        busy
);
  typedef enum logic [1:0] {E_IDLE, E_SYNC, E_DATA} enc_state_t;
  enc_state_t state;

  logic [16:0] hold;      // {data[15:0], parity}
  logic [16:0] shreg;
  logic        load_pend, init_pend;
  logic [2:0]  halfcnt;   // half-bits of the sync field
  logic [4:0]  bitcnt;    // bits of the data field

  assign busy = (state != E_IDLE) || load_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= E_IDLE;
      hold        <= '0;
      shreg       <= '0;
      load_pend   <= 1'b0;
      init_pend   <= 1'b1;
      halfcnt     <= '0;
      bitcnt      <= '0;
      sout        <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;

      // holding register
      if (init_pend) begin
        init_pend <= 1'b0;
        hold      <= {4'b0000, reset_level, odd_parity16({4'b0000, reset_level})};
        load_pend <= 1'b1;
      end else if (wr) begin
        hold <= {wr_data, odd_parity16(wr_data)};
      end
      // encoder
      if (half_tick) begin
        unique case (state)
          E_IDLE, E_DATA: begin
            if (first_half) begin
              if (state == E_IDLE && load_pend && !init_pend) begin
                shreg       <= hold;
                load_pend   <= 1'b0;
                state       <= E_SYNC;
                halfcnt     <= 3'd1;
                sout        <= 1'b1;
                frame_start <= 1'b1;
              end else begin
                sout <= !shreg[16];
              end
            end else begin
              sout  <= shreg[16];
              shreg <= {shreg[15:0], 1'b0};
              if (state == E_DATA) begin
                bitcnt <= bitcnt + 1'b1;
                if (bitcnt == 5'(FRAME_BITS - 1)) state <= E_IDLE;
              end
            end
          end

          E_SYNC: begin
            sout    <= (halfcnt < 3'(SYNC_HIGH_HALVES));
            halfcnt <= halfcnt + 1'b1;
            if (halfcnt == 3'(SYNC_HIGH_HALVES + SYNC_LOW_HALVES - 1)) begin
              state  <= E_DATA;
              bitcnt <= '0;
            end
          end

          default: state <= E_IDLE;
        endcase
      end

      // a load never gets lost, even in the cycle a frame starts
      if (load) load_pend <= 1'b1;
    end
  end

endmodule
