// foms_sync2 -- two-flop synchronizer for slow or level signals.
//
// Brings WIDTH independent asynchronous inputs into the clk domain through
// two flip-flops each. Use it for levels, toggles and pulses that last well
// over two clock periods (the external sync pulse lasts at least 1 us); it
// does not keep multi-bit values coherent. Latency: two to three clk cycles.
// Reset asynchronous, active low, clears the outputs to RESET_VAL.
//
// The specification asks that external loads be synchronized with FPDP
// writes; this two-flop form is this design's choice.
module foms_sync2 #(
  parameter int unsigned       WIDTH     = 1,
  parameter logic [WIDTH-1:0]  RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
