// foms_rst_sync -- reset synchronizer.
//
// Asserts rst_out_n asynchronously as soon as rst_in_n goes low and releases
// it two clk edges after rst_in_n goes high, so that every flip-flop of the
// clock domain leaves reset on the same edge. One instance serves each clock
// domain of the transmitter and receiver.
//
// The specification only says RESET returns the state machines to idle;
// synchronizing its release is this design's choice.
module foms_rst_sync (
  input  logic clk,
  input  logic rst_in_n,
  output logic rst_out_n
);
  logic meta;

  always_ff @(posedge clk or negedge rst_in_n) begin
    if (!rst_in_n) begin
      meta      <= 1'b0;
      rst_out_n <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_out_n <= meta;
    end
  end

endmodule
