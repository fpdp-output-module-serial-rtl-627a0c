// foms_rx_decoder -- FOMS serial frame decoder of the receiver CPLD.
//
// Recovers the 16-bit payload from the Manchester coded serial line. The
// frame is: line high for 1.5 bit, low for 1.5 bit, then 17 bits (D15 first,
// D0, then odd parity), each bit low-then-high for '1' and high-then-low for
// '0'. Between frames the line carries Manchester zeros.
//
// Method: the line is oversampled with the receiver clock, HALF_BIT_CYCLES
// samples per half-bit (8 at 50 MHz for 3.125 Mbit/s). A run of high samples
// longer than 2.5 half-bits cannot occur inside Manchester data (the longest
// data run is one bit), so such a run followed by a falling edge marks the
// start of the sync-low field. From that edge the decoder times the frame:
// it checks that the line is low in the middle of the sync-low field, then
// samples the middle of each half-bit. The two halves of a bit must differ
// (otherwise a coding violation is counted); the second half is the bit
// value. After 17 bits the odd parity is checked. Timing from one edge per
// frame tolerates the small frequency offset between two crystal clocks over
// the 6.4 us frame. The decoding method is this design's own; the receiver
// is only shown as a block diagram.
//
// Outputs: frame_ok pulses for one cycle with data valid when a frame passes
// all checks; frame_err pulses for a frame with a coding violation, a parity
// error or an interrupted sync. din is asynchronous and synchronized here.
// Latency: frame_ok comes about 1.5 half-bits plus 3 cycles after the end of
// the parity bit. Reset asynchronous, active low.
module foms_rx_decoder
  import foms_pkg::*;
#(
  parameter int unsigned HALF_BIT_CYCLES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        din,
  output logic [15:0] data,
  output logic        frame_ok,
  output logic        frame_err
);
  localparam int unsigned H        = HALF_BIT_CYCLES;
  localparam int unsigned SYNC_MIN = (5 * H) / 2;           // > 2 halves, < 3
  localparam int unsigned LOW_LEN  = SYNC_LOW_HALVES * H;
  localparam int unsigned CW       = $clog2(LOW_LEN + 1);
  localparam int unsigned RW       = $clog2(SYNC_MIN + 1);

  typedef enum logic [1:0] {R_HUNT, R_SYNC_LOW, R_DATA} rx_state_t;
  rx_state_t state;

  logic          d_meta, d_s, d_prev;
  logic [RW-1:0] hi_run;
  logic          sync_edge;
  logic [CW-1:0] cnt;
  logic          half2;      // sampling the second half of a bit
  logic          first_s;    // first-half sample
  logic [4:0]    nbits;
  logic [15:0]   shreg;
  logic          viol;

  // input synchronizer and long-high detector
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_meta <= 1'b0;
      d_s    <= 1'b0;
      d_prev <= 1'b0;
      hi_run <= '0;
    end else begin
      d_meta <= din;
      d_s    <= d_meta;
      d_prev <= d_s;
      if (!d_s)                      hi_run <= '0;
      else if (hi_run != RW'(SYNC_MIN)) hi_run <= hi_run + 1'b1;
    end
  end

  // falling edge after a high run of at least SYNC_MIN samples
  assign sync_edge = d_prev && !d_s && (hi_run == RW'(SYNC_MIN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= R_HUNT;
      cnt       <= '0;
      half2     <= 1'b0;
      first_s   <= 1'b0;
      nbits     <= '0;
      shreg     <= '0;
      viol      <= 1'b0;
      data      <= '0;
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      frame_ok  <= 1'b0;
      frame_err <= 1'b0;

      if (sync_edge) begin
        // a new sync aborts any frame in progress
        if (state != R_HUNT) frame_err <= 1'b1;
        state <= R_SYNC_LOW;
        cnt   <= CW'(1);
      end else begin
        unique case (state)
          R_HUNT: ;

          R_SYNC_LOW: begin
            cnt <= cnt + 1'b1;
            if (cnt == CW'(LOW_LEN / 2) && d_s) begin
              state     <= R_HUNT;      // not a sync after all
              frame_err <= 1'b1;
            end else if (cnt == CW'(LOW_LEN - 1)) begin
              state <= R_DATA;
              cnt   <= '0;
              half2 <= 1'b0;
              nbits <= '0;
              viol  <= 1'b0;
            end
          end

          R_DATA: begin
            cnt <= (cnt == CW'(H - 1)) ? '0 : cnt + 1'b1;
            if (cnt == CW'(H - 1)) half2 <= !half2;
            if (cnt == CW'(H / 2)) begin
              if (!half2) begin
                first_s <= d_s;
              end else begin
                shreg <= {shreg[14:0], d_s};
                nbits <= nbits + 1'b1;
                if (first_s == d_s) viol <= 1'b1;
                if (nbits == 5'(FRAME_BITS - 1)) begin
                  state <= R_HUNT;
                  if (!viol && first_s != d_s &&
                      (^{shreg[15:0], d_s}) == 1'b1) begin
                    data     <= shreg[15:0];
                    frame_ok <= 1'b1;
                  end else begin
                    frame_err <= 1'b1;
                  end
                end
              end
            end
          end

          default: state <= R_HUNT;
        endcase
      end
    end
  end

endmodule
